// tb_data_mem: random 64-bit writes and reads at random (also unaligned)
// addresses, compared with a byte-array reference; checks that rdata is 0
// when not reading, and that accesses past the end raise dmem_error and
// do not write.
module tb_data_mem;
  localparam int N = 128;
  logic clk = 0, read = 0, write = 0, dmem_error;
  logic [63:0] addr = 0, wdata = 0, rdata;
  logic [7:0] model [N];
  int checks = 0, failures = 0;

  data_mem #(.BYTES(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] mread(input int a);
    for (int k = 0; k < 8; k++) mread[8*k +: 8] = model[a + k];
  endfunction

  initial begin
    // initialise everything with aligned writes
    for (int a = 0; a < N; a += 8) begin
      write = 1; addr = 64'(a); wdata = {$urandom, $urandom};
      for (int k = 0; k < 8; k++) model[a + k] = wdata[8*k +: 8];
      @(posedge clk); #1;
    end
    write = 0;
    for (int i = 0; i < 400; i++) begin
      int a;
      a = int'($urandom % (N - 7));
      if (($urandom % 2) != 0) begin
        write = 1; read = 0; addr = 64'(a); wdata = {$urandom, $urandom};
        #1; checks++; if (dmem_error) begin failures++; $display("FAIL spurious error"); end
        @(posedge clk); #1;
        for (int k = 0; k < 8; k++) model[a + k] = wdata[8*k +: 8];
        write = 0;
      end else begin
        read = 1; addr = 64'(a); #1;
        checks++;
        if (rdata !== mread(a) || dmem_error) begin
          failures++; $display("FAIL read @%0d %h vs %h", a, rdata, mread(a));
        end
        read = 0; #1;
        checks++; if (rdata !== 0) begin failures++; $display("FAIL rdata without read"); end
      end
    end
    // out of range
    read = 1; addr = 64'(N - 4); #1;
    checks++; if (!dmem_error) begin failures++; $display("FAIL no error on read past end"); end
    read = 0; write = 1; addr = 64'(N - 7); wdata = '1; #1;
    checks++; if (!dmem_error) begin failures++; $display("FAIL no error on write past end"); end
    @(posedge clk); #1; write = 0; read = 1; addr = 64'(N - 8); #1;
    checks++; if (rdata !== mread(N - 8)) begin failures++; $display("FAIL bad write changed memory"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

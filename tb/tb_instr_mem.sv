// tb_instr_mem: loads random bytes through the program port, then checks
// that every 10-byte window is returned little-endian, that bytes past the
// end read 0 and that imem_error flags a PC outside the memory.
module tb_instr_mem;
  localparam int N = 256;
  logic clk = 0, prog_we = 0, imem_error;
  logic [63:0] pc = 0, prog_addr = 0;
  logic [7:0] prog_data = 0;
  logic [79:0] i10bytes;
  logic [7:0] model [N];
  int checks = 0, failures = 0;

  instr_mem #(.BYTES(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      model[i] = 8'($urandom);
      prog_we = 1; prog_addr = 64'(i); prog_data = model[i];
      @(posedge clk); #1;
    end
    prog_we = 0;
    for (int p = 0; p < N + 4; p++) begin
      logic [79:0] exp;
      pc = 64'(p); #1;
      for (int k = 0; k < 10; k++) exp[8*k +: 8] = (p + k < N) ? model[p + k] : 8'h00;
      checks++;
      if (i10bytes !== exp || imem_error !== (p >= N)) begin
        failures++; $display("FAIL pc=%0d got %h exp %h err=%b", p, i10bytes, exp, imem_error);
      end
    end
    pc = 64'hFFFF_FFFF_FFFF_FFFC; #1;
    checks++; if (!imem_error) begin failures++; $display("FAIL huge pc"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mem_rw_ctrl: all sixteen icodes, compared with the table of which
// instructions read memory (mrmovq, popq, ret), which write it (rmmovq,
// pushq, call) and which take their address from valA (popq, ret).
module tb_mem_rw_ctrl;
  logic clk = 0;
  logic [3:0] icode;
  logic [63:0] valE = 64'h1111, valA = 64'h2222, mem_addr;
  logic mem_read, mem_write;
  int checks = 0, failures = 0;

  mem_rw_ctrl dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  //                      icode: 0 1 2 3 4 5 6 7 8 9 A B C D E F
  logic rd_t [16] = '{0,0,0,0,0,1,0,0,0,1,0,1,0,0,0,0};
  logic wr_t [16] = '{0,0,0,0,1,0,0,0,1,0,1,0,0,0,0,0};
  logic a_t  [16] = '{0,0,0,0,0,0,0,0,0,1,0,1,0,0,0,0};

  initial begin
    for (int i = 0; i < 16; i++) begin
      icode = 4'(i); #1;
      checks++;
      if (mem_read !== rd_t[i] || mem_write !== wr_t[i]) begin
        failures++; $display("FAIL icode %h rd=%b wr=%b", i, mem_read, mem_write);
      end
      if (rd_t[i] || wr_t[i]) begin
        checks++;
        if (mem_addr !== (a_t[i] ? valA : valE)) begin failures++; $display("FAIL addr icode %h", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_regfile: random writes through the dstE, dstM and load ports and random
// reads, compared with a reference array. Also checks that register 0xF
// reads 0 and is never written, and that a value written at a clock edge is
// not seen by a read before that edge (no write-through).
module tb_regfile;
  logic clk = 0;
  logic [3:0] srcA, srcB, dstE, dstM, ld_idx;
  logic [63:0] valA, valB, valE, valM, ld_data;
  logic ld_we;
  int checks = 0, failures = 0;
  logic [63:0] model [16];

  regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask

  initial begin
    dstE = 4'hF; dstM = 4'hF; srcA = 0; srcB = 0; valE = 0; valM = 0; ld_we = 0; ld_idx = 0; ld_data = 0;
    // load every register
    for (int r = 0; r < 15; r++) begin
      ld_we = 1; ld_idx = 4'(r); ld_data = 64'(r) * 100;
      model[r] = 64'(r) * 100;
      @(posedge clk); #1;
    end
    ld_we = 0; model[15] = 0;
    for (int r = 0; r < 16; r++) begin
      srcA = 4'(r); srcB = 4'(15 - r); #1;
      chk(valA, model[r], "load A"); chk(valB, model[15 - r], "load B");
    end
    for (int i = 0; i < 400; i++) begin
      dstE = 4'($urandom); dstM = 4'($urandom); valE = {$urandom, $urandom}; valM = {$urandom, $urandom};
      if (dstM == dstE) dstM = 4'hF;
      srcA = dstE; srcB = 4'($urandom);
      #1;
      chk(valA, model[srcA], "no write-through A");
      chk(valB, model[srcB], "before edge B");
      @(posedge clk); #1;
      if (dstE != 4'hF) model[dstE] = valE;
      if (dstM != 4'hF) model[dstM] = valM;
      dstE = 4'hF; dstM = 4'hF;
      srcA = 4'($urandom); srcB = 4'($urandom); #1;
      chk(valA, model[srcA], "read A"); chk(valB, model[srcB], "read B");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pc_update: drives the fetch PC logic through each case by hand:
// next-PC prediction per icode (valP, valC for jmp/call, the same PC for
// ret/halt/bad fetch), stall keeping the predicted PC, and the overrides of
// the fetch address by a conditional jump in the memory stage (target when
// taken, fall-through when not) and by a ret in writeback (loaded address).
module tb_pc_update;
  import y86_pkg::*;
  logic clk = 0, rst = 1, stall = 0, f_ok = 1, M_cnd = 0;
  logic [3:0] f_icode = I_NOP, f_ifun = 0, M_icode = I_NOP, M_ifun = 0, W_icode = I_NOP;
  logic [63:0] f_valC = 0, f_valP = 0, M_valE = 0, M_valA = 0, W_valM = 0, f_pc, predPC;
  int checks = 0, failures = 0;

  pc_update dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask

  task automatic step(input logic [3:0] ic, input logic [3:0] fn, input logic [63:0] c, input logic [63:0] p);
    f_icode = ic; f_ifun = fn; f_valC = c; f_valP = p;
    @(posedge clk); #1;
  endtask

  initial begin
    @(posedge clk); #1 rst = 0; #1;
    chk(f_pc, 0, "reset pc");
    step(I_OPQ, 0, 0, 64'h2);            chk(f_pc, 64'h2, "OPq -> valP");
    step(I_CALL, 0, 64'h40, 64'h0B);     chk(f_pc, 64'h40, "call -> valC");
    step(I_JXX, C_ALWAYS, 64'h80, 64'h49); chk(f_pc, 64'h80, "jmp -> valC");
    step(I_JXX, C_E, 64'h100, 64'h89);   chk(f_pc, 64'h89, "je -> valP");
    step(I_RET, 0, 0, 64'h8A);           chk(f_pc, 64'h89, "ret -> same pc");
    stall = 1;
    step(I_OPQ, 0, 0, 64'h8B);           chk(f_pc, 64'h89, "stall keeps");
    stall = 0;
    step(I_HALT, 0, 0, 64'h8A);          chk(f_pc, 64'h89, "halt -> same pc");
    f_ok = 0;
    step(I_IRMOVQ, 0, 64'h5, 64'h93);    chk(f_pc, 64'h89, "bad fetch -> same pc");
    f_ok = 1;
    // overrides
    M_icode = I_JXX; M_ifun = C_NE; M_cnd = 1; M_valE = 64'h300; M_valA = 64'h120; #1;
    chk(f_pc, 64'h300, "taken jCC in M");
    M_cnd = 0; #1;
    chk(f_pc, 64'h120, "not-taken jCC in M");
    step(I_OPQ, 0, 0, 64'h122);          chk(predPC, 64'h122, "predict after redirect");
    M_icode = I_JXX; M_ifun = C_ALWAYS; M_cnd = 1; #1;
    chk(f_pc, 64'h122, "unconditional jmp in M does not redirect");
    M_icode = I_NOP; W_icode = I_RET; W_valM = 64'h777; #1;
    chk(f_pc, 64'h777, "ret in W");
    step(I_RET, 0, 0, 64'h778);          W_icode = I_NOP; #1;
    chk(f_pc, 64'h777, "ret fetched at return address waits there");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pipe_control: applies pipeline states by hand and compares the
// stall/bubble outputs with the expected action for each rule: no hazard,
// a decode read of a register pending in execute/memory/writeback (dstE or
// dstM), a conditional jump in decode or execute, a ret in decode, execute
// or memory, and an abnormal status in the pipeline.
module tb_pipe_control;
  import y86_pkg::*;
  logic clk = 0;
  logic [3:0] D_icode, D_ifun, d_srcA, d_srcB, E_icode, E_ifun, E_dstE, E_dstM, M_icode, M_dstE, M_dstM, W_dstE, W_dstM;
  stat_t D_stat, E_stat, m_stat, W_stat;
  logic F_stall, D_stall, D_bubble, E_bubble, M_bubble, W_stall, cc_enable;
  logic ev_data_hazard, ev_jcc_wait, ev_ret_wait, ev_exc_stop;
  int checks = 0, failures = 0;

  pipe_control dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    D_icode = I_NOP; D_ifun = 0; d_srcA = 4'hF; d_srcB = 4'hF; E_icode = I_NOP; E_ifun = 0;
    E_dstE = 4'hF; E_dstM = 4'hF; M_icode = I_NOP; M_dstE = 4'hF; M_dstM = 4'hF;
    W_dstE = 4'hF; W_dstM = 4'hF; D_stat = S_AOK; E_stat = S_AOK; m_stat = S_AOK; W_stat = S_AOK;
  endtask

  // expected {F_stall, D_stall, D_bubble, E_bubble, M_bubble, W_stall, cc_enable}
  task automatic expect_ctl(input logic [6:0] exp, input string what);
    #1; checks++;
    if ({F_stall, D_stall, D_bubble, E_bubble, M_bubble, W_stall, cc_enable} !== exp) begin
      failures++;
      $display("FAIL %s: got %b exp %b", what, {F_stall, D_stall, D_bubble, E_bubble, M_bubble, W_stall, cc_enable}, exp);
    end
  endtask

  initial begin
    idle(); expect_ctl(7'b0000001, "idle");
    idle(); D_icode = I_OPQ; d_srcA = 8; d_srcB = 9; E_dstE = 9; expect_ctl(7'b1101001, "srcB = E_dstE");
    idle(); D_icode = I_OPQ; d_srcA = 8; d_srcB = 9; E_dstM = 8; expect_ctl(7'b1101001, "srcA = E_dstM");
    idle(); D_icode = I_OPQ; d_srcA = 8; d_srcB = 9; M_dstE = 8; expect_ctl(7'b1101001, "srcA = M_dstE");
    idle(); D_icode = I_OPQ; d_srcA = 8; d_srcB = 9; M_dstM = 9; expect_ctl(7'b1101001, "srcB = M_dstM");
    idle(); D_icode = I_OPQ; d_srcA = 8; d_srcB = 9; W_dstE = 9; expect_ctl(7'b1101001, "srcB = W_dstE");
    idle(); D_icode = I_OPQ; d_srcA = 8; d_srcB = 9; W_dstM = 8; expect_ctl(7'b1101001, "srcA = W_dstM");
    idle(); D_icode = I_OPQ; d_srcA = 8; d_srcB = 9; E_dstE = 10; M_dstM = 11; W_dstE = 12;
    expect_ctl(7'b0000001, "unrelated writers");
    idle(); D_icode = I_IRMOVQ; E_dstE = 4'hF; expect_ctl(7'b0000001, "0xF never matches");
    idle(); D_icode = I_JXX; D_ifun = C_E; expect_ctl(7'b1010001, "je in decode");
    idle(); E_icode = I_JXX; E_ifun = C_L; expect_ctl(7'b1010001, "jl in execute");
    idle(); D_icode = I_JXX; D_ifun = C_ALWAYS; expect_ctl(7'b0000001, "jmp needs no wait");
    idle(); M_icode = I_JXX; expect_ctl(7'b0000001, "jump in memory: no wait");
    idle(); D_icode = I_RET; expect_ctl(7'b1010001, "ret in decode");
    idle(); E_icode = I_RET; expect_ctl(7'b1010001, "ret in execute");
    idle(); M_icode = I_RET; expect_ctl(7'b1010001, "ret in memory");
    idle(); D_icode = I_RET; d_srcA = 4; d_srcB = 4; M_dstE = 4; expect_ctl(7'b1101001, "ret waits for rsp");
    idle(); D_stat = S_HLT; expect_ctl(7'b1010001, "halt in decode stops fetch");
    idle(); m_stat = S_ADR; expect_ctl(7'b1010100, "memory error");
    idle(); W_stat = S_HLT; expect_ctl(7'b1010110, "halt in writeback");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

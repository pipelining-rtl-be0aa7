// tb_pipelines_top: whole-design test at default parameters.
// Loads both processors while reset is held (registers R[i] = 100*i), then
// runs them together:
//   addq pipeline : addq %r8,%r9 ; addq %r9,%r8 ; addq %r10,%r11, then no-ops
//   Y86-64 pipeline: a program with a dependent addq pair, a call to a
//                    subroutine that pushes, pops and returns, a counted loop
//                    closed by jne, and a final halt.
// Checks the results (registers, status) and counts how often each
// mechanism acted: addq hazard stalls, Y86 data hazard stalls, conditional
// jump waits, ret waits, data memory reads and writes and the halt freezing
// the pipeline. Every mechanism
// must act at least once; the exact counts are checked where they follow
// from the program by hand.
module tb_pipelines_top;
  import y86_pkg::*;
  logic clk = 0, rst = 1;
  logic a_imem_we = 0, a_rf_ld_we = 0, y_imem_we = 0, y_rf_ld_we = 0;
  logic [63:0] a_imem_addr = 0, a_rf_ld_data = 0, y_imem_addr = 0, y_rf_ld_data = 0;
  logic [7:0] a_imem_data = 0, y_imem_data = 0;
  logic [3:0] a_rf_ld_idx = 0, y_rf_ld_idx = 0;
  logic [63:0] a_pc, a_E_valA, a_E_valB, a_W_valE, y_pc;
  logic [3:0] a_D_rA, a_D_rB, a_E_dstE, a_W_dstE;
  logic a_stall, a_bubble_D, a_stall_D, a_bubble_E;
  stat_t y_stat;
  logic y_ev_data_hazard, y_ev_jcc_wait, y_ev_ret_wait, y_ev_exc_stop;
  int checks = 0, failures = 0;

  pipelines_top dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] yp [$];
  function automatic void b8(input logic [7:0] b); yp.push_back(b); endfunction
  function automatic void q64(input logic [63:0] v); for (int i = 0; i < 8; i++) b8(v[8*i +: 8]); endfunction

  task automatic expect_v(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    static logic [7:0] ap [6] = '{8'h60, 8'h89, 8'h60, 8'h98, 8'h60, 8'hAB};
    static int n_astall = 0, n_abub = 0, n_data = 0, n_jcc = 0, n_ret = 0, n_frozen = 0, n_rd = 0, n_wr = 0, cyc = 0, loop;

    // Y86-64 program
    b8(8'h30); b8(8'hF4); q64(64'h800);        //  0: irmovq $0x800,%rsp
    b8(8'h60); b8(8'h89);                      // 10: addq %r8,%r9
    b8(8'h60); b8(8'h98);                      // 12: addq %r9,%r8
    b8(8'h80); q64(64'd64);                    // 14: call sub
    b8(8'h30); b8(8'hF1); q64(64'd3);          // 23: irmovq $3,%rcx
    b8(8'h30); b8(8'hF2); q64(64'd1);          // 33: irmovq $1,%rdx
    loop = yp.size();                          // 43: loop:
    b8(8'h60); b8(8'h10);                      //     addq %rcx,%rax
    b8(8'h61); b8(8'h21);                      //     subq %rdx,%rcx
    b8(8'h74); q64(64'(loop));                 //     jne loop
    b8(8'h00);                                 // 56: halt
    while (yp.size() < 64) b8(8'h10);
    b8(8'hA0); b8(8'h8F);                      // 64: sub: pushq %r8
    b8(8'hB0); b8(8'hCF);                      //      popq %r12
    b8(8'h90);                                 //      ret
    for (int i = 0; i < 10; i++) b8(8'h00);

    for (int i = 0; i < 4096; i++) begin
      a_imem_we = 1; a_imem_addr = 64'(i);
      a_imem_data = (i < 6) ? ap[i] : (((i % 2) != 0) ? 8'hFF : 8'h60);
      y_imem_we = (i < yp.size()); y_imem_addr = 64'(i); y_imem_data = (i < yp.size()) ? yp[i] : 8'h00;
      @(posedge clk); #1;
    end
    a_imem_we = 0; y_imem_we = 0;
    for (int r = 0; r < 15; r++) begin
      a_rf_ld_we = 1; a_rf_ld_idx = 4'(r); a_rf_ld_data = 64'(100 * r);
      y_rf_ld_we = 1; y_rf_ld_idx = 4'(r); y_rf_ld_data = 64'(100 * r);
      @(posedge clk); #1;
    end
    a_rf_ld_we = 0; y_rf_ld_we = 0;

    rst = 0; #1;
    while (cyc < 200) begin
      if (a_stall) n_astall++;
      if (a_bubble_D) n_abub++;
      if (dut.u_y86.mem_read) n_rd++;
      if (dut.u_y86.mem_write) n_wr++;
      if (y_ev_data_hazard) n_data++;
      if (y_ev_jcc_wait) n_jcc++;
      if (y_ev_ret_wait && !y_ev_data_hazard) n_ret++;
      if (y_stat != S_AOK) n_frozen++;
      @(posedge clk); #1;
      cyc++;
    end

    // addq pipeline results
    expect_v("addq R[9]", longint'(dut.u_addq.u_rf.regs[9]), 1700);
    expect_v("addq R[8]", longint'(dut.u_addq.u_rf.regs[8]), 2500);
    expect_v("addq R[11]", longint'(dut.u_addq.u_rf.regs[11]), 2100);
    expect_v("addq stall cycles", longint'(n_astall), 2);
    // Y86-64 results
    expect_v("y86 status", longint'(y_stat), longint'(S_HLT));
    expect_v("y86 R[9]", longint'(dut.u_y86.u_rf.regs[9]), 1700);
    expect_v("y86 R[8]", longint'(dut.u_y86.u_rf.regs[8]), 2500);
    expect_v("y86 R[12]", longint'(dut.u_y86.u_rf.regs[12]), 2500);
    expect_v("y86 R[0] = 3+2+1", longint'(dut.u_y86.u_rf.regs[0]), 6);
    expect_v("y86 R[1]", longint'(dut.u_y86.u_rf.regs[1]), 0);
    expect_v("y86 R[4]", longint'(dut.u_y86.u_rf.regs[4]), 64'h800);
    expect_v("y86 jCC wait cycles (3 jne x 2)", longint'(n_jcc), 6);
    expect_v("y86 ret wait cycles", longint'(n_ret), 3);
    // each mechanism must have acted
    checks++; if (n_data == 0)   begin failures++; $display("FAIL no data hazard stall"); end
    checks++; if (n_frozen == 0) begin failures++; $display("FAIL halt never reached"); end
    checks++; if (n_astall == 0) begin failures++; $display("FAIL no addq stall"); end
    checks++; if (n_abub == 0)   begin failures++; $display("FAIL no addq bubble"); end
    checks++; if (n_rd == 0)     begin failures++; $display("FAIL no data memory read"); end
    checks++; if (n_wr == 0)     begin failures++; $display("FAIL no data memory write"); end
    $display("mechanisms: addq stalls %0d, addq bubbles %0d, y86 data stalls %0d, jCC waits %0d, ret waits %0d, memory reads %0d, writes %0d, frozen cycles %0d",
             n_astall, n_abub, n_data, n_jcc, n_ret, n_rd, n_wr, n_frozen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

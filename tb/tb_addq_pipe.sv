// tb_addq_pipe: runs the four-stage addq pipeline with both hazard-check
// placements (u0: check in fetch, u1: check in decode) on three programs,
// registers initialised to R[i] = 100*i:
//   A  addq %r8,%r9 ; addq %r9,%r8 ; addq %r10,%r11   (dependent pair)
//   B  addq %r8,%r9 ; addq %r10,%r11 ; addq %r12,%r13 ; addq %r9,%r8
//   C  addq %r8,%r9 ; addq %r10,%r11 ; addq %r9,%r8 ; addq %r11,%r10
// For A and B the pipeline-register contents are compared cycle by cycle
// with hand-worked timing tables (PC, fD rA/rB, dE valA/valB/dstE, eW
// valE/dstE); for every program the number of stall cycles (A: 2, B: 0,
// C: 1) and the final register values are checked.
// Memory after the program holds rA = rB = 0xF no-ops.
module tb_addq_pipe;
  logic clk = 0, rst = 1;
  logic imem_we = 0, rf_ld_we = 0;
  logic [63:0] imem_addr = 0, rf_ld_data = 0;
  logic [7:0] imem_data = 0;
  logic [3:0] rf_ld_idx = 0;
  logic [63:0] P_pc [2], E_valA [2], E_valB [2], W_valE [2];
  logic [3:0] D_rA [2], D_rB [2], E_dstE [2], W_dstE [2];
  logic stall_P [2], bubble_D [2], stall_D [2], bubble_E [2];
  int checks = 0, failures = 0;

  addq_pipe #(.IMEM_BYTES(64), .STALL_IN_DECODE(1'b0)) u0 (
    .clk, .rst, .imem_we, .imem_addr, .imem_data, .rf_ld_we, .rf_ld_idx, .rf_ld_data,
    .P_pc(P_pc[0]), .D_rA(D_rA[0]), .D_rB(D_rB[0]), .E_valA(E_valA[0]), .E_valB(E_valB[0]),
    .E_dstE(E_dstE[0]), .W_valE(W_valE[0]), .W_dstE(W_dstE[0]),
    .stall_P(stall_P[0]), .bubble_D(bubble_D[0]), .stall_D(stall_D[0]), .bubble_E(bubble_E[0]));
  addq_pipe #(.IMEM_BYTES(64), .STALL_IN_DECODE(1'b1)) u1 (
    .clk, .rst, .imem_we, .imem_addr, .imem_data, .rf_ld_we, .rf_ld_idx, .rf_ld_data,
    .P_pc(P_pc[1]), .D_rA(D_rA[1]), .D_rB(D_rB[1]), .E_valA(E_valA[1]), .E_valB(E_valB[1]),
    .E_dstE(E_dstE[1]), .W_valE(W_valE[1]), .W_dstE(W_dstE[1]),
    .stall_P(stall_P[1]), .bubble_D(bubble_D[1]), .stall_D(stall_D[1]), .bubble_E(bubble_E[1]));

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef longint row_t [8];   // PC rA rB valA valB dstE(E) valE dstE(W); -1 = not checked
  localparam longint X = -1;

  task automatic load(input logic [7:0] prog []);
    rst = 1;
    for (int a = 0; a < 64; a++) begin
      imem_we = 1; imem_addr = 64'(a);
      imem_data = (a < prog.size()) ? prog[a] : (((a % 2) != 0) ? 8'hFF : 8'h60);
      @(posedge clk); #1;
    end
    imem_we = 0;
    for (int r = 0; r < 15; r++) begin
      rf_ld_we = 1; rf_ld_idx = 4'(r); rf_ld_data = 64'(100 * r);
      @(posedge clk); #1;
    end
    rf_ld_we = 0;
  endtask

  task automatic cmp(input int u, input int cyc, input row_t exp);
    longint got [8];
    got = '{longint'(P_pc[u]), longint'(D_rA[u]), longint'(D_rB[u]), longint'(E_valA[u]),
            longint'(E_valB[u]), longint'(E_dstE[u]), longint'(W_valE[u]), longint'(W_dstE[u])};
    for (int k = 0; k < 8; k++)
      if (exp[k] != X) begin
        checks++;
        if (got[k] != exp[k]) begin
          failures++;
          $display("FAIL unit %0d cycle %0d column %0d: got %0d expected %0d", u, cyc, k, got[k], exp[k]);
        end
      end
  endtask

  // run: release reset, step ncyc cycles, compare rows of the tables given
  task automatic run(input int ncyc, input row_t t0 [], input row_t t1 [], output int stalls [2]);
    stalls = '{0, 0};
    rst = 0; #1;
    for (int c = 0; c < ncyc; c++) begin
      if (c < t0.size()) cmp(0, c, t0[c]);
      if (c < t1.size()) cmp(1, c, t1[c]);
      for (int u = 0; u < 2; u++) if (stall_P[u]) stalls[u]++;
      @(posedge clk); #1;
    end
  endtask

  task automatic regs_are(input int r, input longint v);
    checks += 2;
    if (u0.u_rf.regs[r] != 64'(v)) begin failures++; $display("FAIL u0 R[%0d]=%0d exp %0d", r, u0.u_rf.regs[r], v); end
    if (u1.u_rf.regs[r] != 64'(v)) begin failures++; $display("FAIL u1 R[%0d]=%0d exp %0d", r, u1.u_rf.regs[r], v); end
  endtask

  task automatic stalls_are(input int s [2], input int exp, input string what);
    for (int u = 0; u < 2; u++) begin
      checks++;
      if (s[u] != exp) begin failures++; $display("FAIL %s unit %0d: %0d stall cycles, expected %0d", what, u, s[u], exp); end
    end
  endtask

  initial begin
    int s [2];
    // program A: two stalls
    load('{8'h60, 8'h89, 8'h60, 8'h98, 8'h60, 8'hAB});
    run(12,
      '{'{0, 15, 15, X, X, 15, X, 15},
        '{2, 8, 9, X, X, 15, X, 15},
        '{2, 15, 15, 800, 900, 9, X, 15},
        '{2, 15, 15, X, X, 15, 1700, 9},
        '{4, 9, 8, X, X, 15, X, 15},
        '{X, 10, 11, 1700, 800, 8, X, 15},
        '{X, X, X, 1000, 1100, 11, 2500, 8}},
      '{'{0, 15, 15, X, X, 15, X, 15},
        '{2, 8, 9, X, X, 15, X, 15},
        '{4, 9, 8, 800, 900, 9, X, 15},
        '{4, 9, 8, X, X, 15, 1700, 9},
        '{4, 9, 8, X, X, 15, X, 15},
        '{X, 10, 11, 1700, 800, 8, X, 15},
        '{X, X, X, 1000, 1100, 11, 2500, 8}}, s);
    stalls_are(s, 2, "program A");
    regs_are(9, 1700); regs_are(8, 2500); regs_are(11, 2100); regs_are(10, 1000);

    // program B: no hazard needs a stall
    load('{8'h60, 8'h89, 8'h60, 8'hAB, 8'h60, 8'hCD, 8'h60, 8'h98});
    run(12,
      '{'{0, X, X, X, X, X, X, X},
        '{2, 8, 9, X, X, X, X, X},
        '{4, 10, 11, 800, 900, 9, X, X},
        '{6, 12, 13, 1000, 1100, 11, 1700, 9},
        '{X, 9, 8, 1200, 1300, 13, 2100, 11},
        '{X, X, X, 1700, 800, 8, 2500, 13},
        '{X, X, X, X, X, X, 2500, 8}},
      '{'{0, X, X, X, X, X, X, X},
        '{2, 8, 9, X, X, X, X, X},
        '{4, 10, 11, 800, 900, 9, X, X},
        '{6, 12, 13, 1000, 1100, 11, 1700, 9},
        '{X, 9, 8, 1200, 1300, 13, 2100, 11},
        '{X, X, X, 1700, 800, 8, 2500, 13},
        '{X, X, X, X, X, X, 2500, 8}}, s);
    stalls_are(s, 0, "program B");
    regs_are(9, 1700); regs_are(11, 2100); regs_are(13, 2500); regs_are(8, 2500);

    // program C: one stall
    load('{8'h60, 8'h89, 8'h60, 8'hAB, 8'h60, 8'h98, 8'h60, 8'hBA});
    run(14, '{}, '{}, s);
    stalls_are(s, 1, "program C");
    regs_are(9, 1700); regs_are(11, 2100); regs_are(8, 2500); regs_are(10, 3100);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

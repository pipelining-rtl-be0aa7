// tb_addq_stall: both placements of the hazard check, driven with the
// pipeline register contents of the two-stall example
// (addq %r8,%r9 followed by addq %r9,%r8), cycle by cycle, and with
// non-hazard states.
module tb_addq_stall;
  logic clk = 0;
  logic [3:0] f_rA, f_rB, D_rA, D_rB, E_dstE, W_dstE;
  logic sP0, bD0, sD0, bE0, sP1, bD1, sD1, bE1;
  int checks = 0, failures = 0;

  addq_stall #(.STALL_IN_DECODE(1'b0)) u_f (.f_rA, .f_rB, .D_rA, .D_rB, .E_dstE, .W_dstE,
    .stall_P(sP0), .bubble_D(bD0), .stall_D(sD0), .bubble_E(bE0));
  addq_stall #(.STALL_IN_DECODE(1'b1)) u_d (.f_rA, .f_rB, .D_rA, .D_rB, .E_dstE, .W_dstE,
    .stall_P(sP1), .bubble_D(bD1), .stall_D(sD1), .bubble_E(bE1));

  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic st(input logic [3:0] fa, fb, da, db, ed, wd);
    f_rA = fa; f_rB = fb; D_rA = da; D_rB = db; E_dstE = ed; W_dstE = wd; #1;
  endtask
  task automatic exp0(input logic [3:0] e, input string w);
    checks++; if ({sP0, bD0, sD0, bE0} !== e) begin failures++; $display("FAIL fetch-check %s: %b", w, {sP0, bD0, sD0, bE0}); end
  endtask
  task automatic exp1(input logic [3:0] e, input string w);
    checks++; if ({sP1, bD1, sD1, bE1} !== e) begin failures++; $display("FAIL decode-check %s: %b", w, {sP1, bD1, sD1, bE1}); end
  endtask

  initial begin
    // fetch-stage check: cycles 1..4 of the stall example
    st(9, 8, 8, 9, 4'hF, 4'hF);     exp0(4'b1100, "cycle 1: D writes r9");
    st(9, 8, 4'hF, 4'hF, 9, 4'hF);  exp0(4'b1100, "cycle 2: E writes r9");
    st(9, 8, 4'hF, 4'hF, 4'hF, 9);  exp0(4'b0000, "cycle 3: only W writes r9");
    st(10, 11, 9, 8, 4'hF, 4'hF);   exp0(4'b0000, "cycle 4: no hazard");
    // decode-stage check
    st(10, 11, 9, 8, 9, 4'hF);      exp1(4'b1011, "cycle 2: E writes r9");
    st(10, 11, 9, 8, 4'hF, 9);      exp1(4'b1011, "cycle 3: W writes r9");
    st(10, 11, 9, 8, 4'hF, 4'hF);   exp1(4'b0000, "cycle 4: no hazard");
    st(4'hF, 4'hF, 4'hF, 4'hF, 4'hF, 4'hF); exp0(4'b0000, "all none"); exp1(4'b0000, "all none");
    st(1, 2, 3, 4, 5, 6);           exp0(4'b0000, "distinct"); exp1(4'b0000, "distinct");
    st(2, 5, 3, 4, 5, 6);           exp0(4'b1100, "f_rB = E_dstE");
    st(1, 2, 3, 6, 5, 6);           exp1(4'b1011, "D_rB = W_dstE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

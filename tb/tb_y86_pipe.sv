// tb_y86_pipe: end-to-end test of the five-stage Y86-64 pipeline.
// Programs are assembled here into bytes and loaded through the program
// port; registers start at R[i] = 100*i. An instruction-level reference
// interpreter written in this testbench (one instruction at a time, no
// pipeline) runs the same program; after the pipeline stops, its registers,
// status and the data memory words the program used are compared with the
// interpreter's.
// Directed programs also check timing, counted in cycles from the release of
// reset to the first cycle the status leaves AOK:
//   hazard : addq %r8,%r9 ; addq %r9,%r8 ; halt    -> 3 stall cycles, 9 cycles
//   je     : subq %r8,%r8 ; je L ; irmovq ; L: irmovq ; halt
//            -> 2 wait cycles, target fetched in cycle 4, 9 cycles
//   ret    : irmovq rsp ; 3 nops ; call f ; halt ; f: ret
//            -> 3 data stall cycles then 3 ret wait cycles, 16 cycles
// plus a loop, a call/push/pop program, a memory address error, an invalid
// instruction, and 60 random programs (OPq, irmovq, cmovXX, rmmovq, mrmovq,
// pushq, popq and forward conditional jumps).
module tb_y86_pipe;
  import y86_pkg::*;
  logic clk = 0, rst = 1;
  logic imem_we = 0, rf_ld_we = 0;
  logic [63:0] imem_addr = 0, rf_ld_data = 0, pc;
  logic [7:0] imem_data = 0;
  logic [3:0] rf_ld_idx = 0;
  stat_t stat;
  logic ev_data_hazard, ev_jcc_wait, ev_ret_wait, ev_exc_stop;
  int checks = 0, failures = 0;
  int n_data = 0, n_jcc = 0, n_ret = 0;

  localparam int MEMB = 4096;

  y86_pipe dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ assembler
  logic [7:0] prog [$];
  function automatic void b8(input logic [7:0] b); prog.push_back(b); endfunction
  function automatic void q64(input logic [63:0] v); for (int i = 0; i < 8; i++) b8(v[8*i +: 8]); endfunction
  function automatic void a_rr(input logic [3:0] ic, input logic [3:0] fn, input logic [3:0] ra, input logic [3:0] rb);
    b8({ic, fn}); b8({ra, rb});
  endfunction
  function automatic void a_irmovq(input logic [63:0] v, input logic [3:0] rb);
    b8(8'h30); b8({4'hF, rb}); q64(v);
  endfunction
  function automatic void a_mem(input logic [3:0] ic, input logic [3:0] ra, input logic [3:0] rb, input logic [63:0] d);
    b8({ic, 4'h0}); b8({ra, rb}); q64(d);
  endfunction
  function automatic void a_jmp(input logic [3:0] ic, input logic [3:0] fn, input logic [63:0] dest);
    b8({ic, fn}); q64(dest);
  endfunction
  function automatic int here(); return prog.size(); endfunction

  // ------------------------------------------------------------ reference interpreter
  logic [63:0] mr [15];
  logic [7:0]  mdm [int];
  stat_t       mstat;

  function automatic logic [63:0] ifetch(input int a, input int n);
    logic [63:0] v = 0;
    for (int i = 0; i < n; i++) v[8*i +: 8] = (a + i < prog.size()) ? prog[a + i] : 8'h00;
    return v;
  endfunction
  function automatic logic dm_ok(input logic [63:0] a); return a <= 64'(MEMB - 8); endfunction
  function automatic logic [63:0] dm_rd(input logic [63:0] a);
    logic [63:0] v;
    for (int i = 0; i < 8; i++) v[8*i +: 8] = mdm.exists(int'(a) + i) ? mdm[int'(a) + i] : 8'h00;
    return v;
  endfunction
  function automatic void dm_wr(input logic [63:0] a, input logic [63:0] v);
    for (int i = 0; i < 8; i++) mdm[int'(a) + i] = v[8*i +: 8];
  endfunction

  task automatic ref_run(output int steps);
    logic [63:0] p = 0;
    logic zf = 1, sf = 0, of = 0;
    steps = 0;
    for (int r = 0; r < 15; r++) mr[r] = 64'(100 * r);
    mdm.delete();
    mstat = S_AOK;
    while (mstat == S_AOK && steps < 5000) begin
      logic [3:0] ic, fn, ra, rb;
      logic [63:0] c, vp, a, b, e, t;
      logic cnd;
      logic signed [64:0] w;
      steps++;
      if (p >= 64'(MEMB)) begin mstat = S_ADR; break; end
      t = ifetch(int'(p), 2);
      ic = t[7:4]; fn = t[3:0]; ra = t[15:12]; rb = t[11:8];
      case (fn)
        0: cnd = 1;  1: cnd = (sf ^ of) | zf;  2: cnd = sf ^ of;  3: cnd = zf;
        4: cnd = !zf;  5: cnd = !(sf ^ of);  6: cnd = !(sf ^ of) && !zf;  default: cnd = 0;
      endcase
      case (ic)
        4'h0: begin mstat = S_HLT; end
        4'h1: p = p + 1;
        4'h2: begin if (cnd) mr[rb] = mr[ra]; p = p + 2; end
        4'h3: begin mr[rb] = ifetch(int'(p) + 2, 8); p = p + 10; end
        4'h4: begin
          a = mr[rb] + ifetch(int'(p) + 2, 8);
          if (!dm_ok(a)) mstat = S_ADR; else begin dm_wr(a, mr[ra]); p = p + 10; end
        end
        4'h5: begin
          a = mr[rb] + ifetch(int'(p) + 2, 8);
          if (!dm_ok(a)) mstat = S_ADR; else begin mr[ra] = dm_rd(a); p = p + 10; end
        end
        4'h6: begin
          a = mr[ra]; b = mr[rb];
          case (fn)
            0: begin w = $signed({b[63], b}) + $signed({a[63], a}); e = w[63:0]; of = w[64] != w[63]; end
            1: begin w = $signed({b[63], b}) - $signed({a[63], a}); e = w[63:0]; of = w[64] != w[63]; end
            2: begin e = a & b; of = 0; end
            default: begin e = a ^ b; of = 0; end
          endcase
          zf = (e == 0); sf = e[63]; mr[rb] = e; p = p + 2;
        end
        4'h7: begin c = ifetch(int'(p) + 1, 8); p = cnd ? c : p + 9; end
        4'h8: begin
          c = ifetch(int'(p) + 1, 8); vp = p + 9; t = mr[4] - 8;
          if (!dm_ok(t)) mstat = S_ADR; else begin dm_wr(t, vp); mr[4] = t; p = c; end
        end
        4'h9: begin
          if (!dm_ok(mr[4])) mstat = S_ADR; else begin p = dm_rd(mr[4]); mr[4] = mr[4] + 8; end
        end
        4'hA: begin
          t = mr[4] - 8; e = mr[ra];
          if (!dm_ok(t)) mstat = S_ADR; else begin dm_wr(t, e); mr[4] = t; p = p + 2; end
        end
        4'hB: begin
          if (!dm_ok(mr[4])) mstat = S_ADR; else begin e = dm_rd(mr[4]); mr[4] = mr[4] + 8; mr[ra] = e; p = p + 2; end
        end
        default: mstat = S_INS;
      endcase
    end
  endtask

  // ------------------------------------------------------------ running the pipeline
  // returns the cycle (0 = first cycle out of reset) in which stat left AOK
  task automatic dut_run(output int cycles, output int d_cnt, output int j_cnt, output int r_cnt);
    rst = 1;
    foreach (prog[i]) begin
      imem_we = 1; imem_addr = 64'(i); imem_data = prog[i];
      @(posedge clk); #1;
    end
    // pad with zero bytes so that fetches of a final halt read defined bytes
    for (int i = 0; i < 10; i++) begin
      imem_we = 1; imem_addr = 64'(prog.size() + i); imem_data = 0;
      @(posedge clk); #1;
    end
    imem_we = 0;
    for (int r = 0; r < 15; r++) begin
      rf_ld_we = 1; rf_ld_idx = 4'(r); rf_ld_data = 64'(100 * r);
      @(posedge clk); #1;
    end
    rf_ld_we = 0;
    rst = 0; #1;
    cycles = 0; d_cnt = 0; j_cnt = 0; r_cnt = 0;
    while (stat == S_AOK && cycles < 20000) begin
      if (ev_data_hazard) d_cnt++;
      if (ev_jcc_wait)    j_cnt++;
      if (ev_ret_wait && !ev_data_hazard) r_cnt++;   // ret waiting for its address only
      @(posedge clk); #1;
      cycles++;
    end
    n_data += d_cnt; n_jcc += j_cnt; n_ret += r_cnt;
    // a few more cycles: the frozen pipeline must not change anything
    repeat (5) @(posedge clk);
    #1;
  endtask

  task automatic compare(input string name, input logic [63:0] addrs [$]);
    int steps;
    ref_run(steps);
    checks++;
    if (stat !== mstat) begin failures++; $display("FAIL %s: stat %0d, reference %0d", name, stat, mstat); end
    for (int r = 0; r < 15; r++) begin
      checks++;
      if (dut.u_rf.regs[r] !== mr[r]) begin
        failures++; $display("FAIL %s: R[%0d]=%h reference %h", name, r, dut.u_rf.regs[r], mr[r]);
      end
    end
    foreach (addrs[k]) begin
      logic [63:0] v;
      if (!mdm.exists(int'(addrs[k]))) continue;
      for (int i = 0; i < 8; i++) v[8*i +: 8] = dut.u_dmem.mem[int'(addrs[k]) + i];
      checks++;
      if (v !== dm_rd(addrs[k])) begin
        failures++; $display("FAIL %s: M[%h]=%h reference %h", name, addrs[k], v, dm_rd(addrs[k]));
      end
    end
  endtask

  task automatic expect_int(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, exp); end
  endtask

  logic [63:0] none [$];

  initial begin
    int cyc, dc, jc, rc, lbl;
    logic [63:0] slots [$];

    // --- data hazard between adjacent addqs
    prog = {};
    a_rr(4'h6, 0, 8, 9); a_rr(4'h6, 0, 9, 8); b8(8'h00);
    dut_run(cyc, dc, jc, rc);
    compare("hazard", none);
    expect_int("hazard: cycles", cyc, 9);
    expect_int("hazard: stall cycles", dc, 3);
    expect_int("hazard: R[8]", int'(dut.u_rf.regs[8]), 2500);

    // --- je taken (slide example)
    prog = {};
    a_rr(4'h6, 1, 8, 8);              // subq %r8,%r8  (ZF = 1)
    a_jmp(4'h7, 4'h3, 64'd21);        // je L
    a_irmovq(64'd1, 0);               // skipped
    lbl = here();                     // L = 21
    a_irmovq(64'd7, 3);
    b8(8'h00);
    fork
      begin
        dut_run(cyc, dc, jc, rc);
      end
      begin
        @(negedge rst); #1;
        repeat (4) @(posedge clk); #1;
        checks++;
        if (pc !== 64'(lbl)) begin failures++; $display("FAIL je: cycle 4 fetches %h, expected %h", pc, lbl); end
      end
    join
    compare("je", none);
    expect_int("je: wait cycles", jc, 2);
    expect_int("je: cycles", cyc, 9);
    expect_int("je: R[0] untouched", int'(dut.u_rf.regs[0]), 0);

    // --- jne not taken
    prog = {};
    a_rr(4'h6, 1, 8, 8); a_jmp(4'h7, 4'h4, 64'd100); a_irmovq(64'd5, 0); b8(8'h00);
    dut_run(cyc, dc, jc, rc);
    compare("jne not taken", none);
    expect_int("jne: R[0]", int'(dut.u_rf.regs[0]), 5);

    // --- ret (slide example, preceded by stack setup)
    prog = {};
    a_irmovq(64'h100, 4); b8(8'h10); b8(8'h10); b8(8'h10);
    a_jmp(4'h8, 0, 64'd23);           // call f
    b8(8'h00);                        // 22: halt
    b8(8'h90);                        // 23: f: ret
    dut_run(cyc, dc, jc, rc);
    compare("ret", '{64'hF8});
    expect_int("ret: data stall cycles", dc, 3);
    expect_int("ret: ret wait cycles", rc, 3);
    expect_int("ret: cycles", cyc, 16);

    // --- loop: sum 1..10
    prog = {};
    a_irmovq(64'd10, 1); a_irmovq(64'd1, 2); a_irmovq(64'd0, 0);
    lbl = here();
    a_rr(4'h6, 0, 1, 0); a_rr(4'h6, 1, 2, 1); a_jmp(4'h7, 4'h4, 64'(lbl)); b8(8'h00);
    dut_run(cyc, dc, jc, rc);
    compare("loop", none);
    expect_int("loop: sum", int'(dut.u_rf.regs[0]), 55);

    // --- call, push, pop, memory, cmov
    prog = {};
    a_irmovq(64'h800, 4); a_irmovq(64'h200, 14);
    a_jmp(4'h8, 0, 64'd40);           // call f (at 40)
    a_mem(4'h5, 6, 14, 64'd8);        // mrmovq 8(%r14),%rsi
    b8(8'h00);
    while (here() < 40) b8(8'h10);
    a_rr(4'hA, 0, 8, 4'hF);           // f: pushq %r8
    a_rr(4'hA, 0, 9, 4'hF);           // pushq %r9
    a_rr(4'hB, 0, 10, 4'hF);          // popq %r10  (= 900)
    a_rr(4'hB, 0, 11, 4'hF);          // popq %r11  (= 800)
    a_mem(4'h4, 10, 14, 64'd8);       // rmmovq %r10,8(%r14)
    a_rr(4'h6, 1, 11, 10);            // subq %r11,%r10 -> 100, not zero
    a_rr(4'h2, 4'h4, 13, 12);         // cmovne %r13,%r12
    a_rr(4'h2, 4'h3, 13, 3);          // cmove %r13,%rbx (not done)
    b8(8'h90);                        // ret
    dut_run(cyc, dc, jc, rc);
    compare("call/push/pop", '{64'h208, 64'h7F8, 64'h7F0, 64'h7E8});
    expect_int("call/push/pop: R[6]", int'(dut.u_rf.regs[6]), 900);

    // --- memory address error: later instructions must have no effect
    prog = {};
    a_irmovq(64'hFFFF_0000, 2);
    a_mem(4'h5, 3, 2, 64'd0);         // mrmovq 0(%rdx),%rbx -> bad address
    a_irmovq(64'd77, 5);              // must not execute
    a_rr(4'h6, 0, 8, 9);              // must not execute
    b8(8'h00);
    dut_run(cyc, dc, jc, rc);
    compare("address error", none);
    expect_int("address error: status", int'(stat), int'(S_ADR));

    // --- invalid instruction
    prog = {};
    a_irmovq(64'd3, 1); b8(8'hE0); a_irmovq(64'd9, 2); b8(8'h00);
    dut_run(cyc, dc, jc, rc);
    compare("invalid instruction", none);
    expect_int("invalid: status", int'(stat), int'(S_INS));

    // --- random programs
    for (int n = 0; n < 60; n++) begin
      automatic int depth = 0;
      automatic logic [3:0] wr [13] = '{0, 1, 2, 3, 5, 6, 7, 8, 9, 10, 11, 12, 13};
      prog = {}; slots = {};
      a_irmovq(64'h800, 4); a_irmovq(64'h400, 14);
      for (int k = 0; k < 16; k++) begin
        a_mem(4'h4, 4'($urandom % 14), 14, 64'(8 * k));
        slots.push_back(64'h400 + 64'(8 * k));
      end
      for (int i = 0; i < 40; i++) begin
        automatic int kind = int'($urandom % 9);
        automatic logic [3:0] ra = 4'($urandom % 15);
        automatic logic [3:0] rb = wr[$urandom % 13];
        case (kind)
          0: a_irmovq((($urandom % 2) != 0) ? 64'($urandom % 8) : 64'({$urandom, $urandom}), rb);
          1, 2: a_rr(4'h6, 4'($urandom % 4), ra, rb);
          3: a_rr(4'h2, 4'($urandom % 7), ra, rb);
          4: a_mem(4'h4, ra, 14, 64'(8 * int'($urandom % 16)));
          5: a_mem(4'h5, rb, 14, 64'(8 * int'($urandom % 16)));
          6: if (depth < 8) begin a_rr(4'hA, 0, ra, 4'hF); depth++; end else b8(8'h10);
          7: if (depth > 0) begin a_rr(4'hB, 0, rb, 4'hF); depth--; end else b8(8'h10);
          default: begin
            // forward conditional jump over one OPq
            a_jmp(4'h7, 4'($urandom % 7), 64'(here() + 11));
            a_rr(4'h6, 4'($urandom % 4), ra, rb);
          end
        endcase
      end
      b8(8'h00);
      for (int k = 1; k <= 8; k++) slots.push_back(64'h800 - 64'(8 * k));
      dut_run(cyc, dc, jc, rc);
      compare($sformatf("random %0d", n), slots);
      expect_int($sformatf("random %0d halts", n), int'(stat), int'(S_HLT));
    end

    $display("events: data hazard stall cycles %0d, jCC wait cycles %0d, ret wait cycles %0d", n_data, n_jcc, n_ret);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

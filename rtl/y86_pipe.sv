// y86_pipe: five-stage pipelined Y86-64 processor that resolves every hazard
// by stalling.
// Stages and the pipeline registers between them:
//   predicted PC -> fetch -> fD -> decode -> dE -> execute -> eM -> memory
//   -> mW -> writeback
// Fetch reads ten bytes at f_pc, splits them and predicts the next PC
// (pc_update). Decode reads the register file and picks the destination
// registers (dstE, dstM). Execute runs the ALU, writes the condition codes
// (OPq only) and evaluates jXX/cmovXX conditions. Memory reads or writes the
// data memory (mem_rw_ctrl picks read/write/address from M_icode). Writeback
// writes the register file and the status register Stat (= W_stat), so the
// processor halts only after every older instruction has finished.
// Each pipeline register is a pipe_reg bank with stall/bubble; pipe_control
// drives them. A conditional jump costs two bubbles, a ret three, and a
// decode-stage register read waits until the writer has left writeback.
// call and jXX carry valP in valA; the ALU passes a jump target (valC + 0)
// through valE.
// Interface: imem_* loads the instruction memory and rf_ld_* the registers
// while rst is held; stat reports the status of the instruction in writeback.
// Memory sizes are this design's choice.
module y86_pipe #(
  parameter int unsigned IMEM_BYTES = 4096,
  parameter int unsigned DMEM_BYTES = 4096
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           imem_we,
  input  logic [63:0]    imem_addr,
  input  logic [7:0]     imem_data,
  input  logic           rf_ld_we,
  input  logic [3:0]     rf_ld_idx,
  input  logic [63:0]    rf_ld_data,
  output y86_pkg::stat_t stat,
  output logic [63:0]    pc,
  output logic           ev_data_hazard,
  output logic           ev_jcc_wait,
  output logic           ev_ret_wait,
  output logic           ev_exc_stop
);
  import y86_pkg::*;

  // ---------------- control
  logic F_stall, D_stall, D_bubble, E_bubble, M_bubble, W_stall, cc_enable;

  fd_t D, f_out;
  de_t E, d_out;
  em_t M, e_out;
  mw_t W, m_out;

  // ---------------- fetch
  logic [63:0] f_pc;
  logic [79:0] i10bytes;
  logic        imem_error, instr_valid;
  logic [3:0]  f_icode, f_ifun, f_rA, f_rB;
  logic [63:0] f_valC, f_valP;
  stat_t       f_stat;

  instr_mem #(.BYTES(IMEM_BYTES)) u_imem (
    .clk, .pc(f_pc), .i10bytes, .imem_error,
    .prog_we(imem_we), .prog_addr(imem_addr), .prog_data(imem_data)
  );

  fetch_split u_split (
    .pc(f_pc), .i10bytes, .icode(f_icode), .ifun(f_ifun), .rA(f_rA), .rB(f_rB),
    .valC(f_valC), .valP(f_valP), .instr_valid
  );

  always_comb begin
    if (imem_error)            f_stat = S_ADR;
    else if (!instr_valid)     f_stat = S_INS;
    else if (f_icode == I_HALT) f_stat = S_HLT;
    else                       f_stat = S_AOK;
    f_out = '{stat: f_stat, icode: (imem_error ? 4'(I_NOP) : f_icode), ifun: f_ifun,
              rA: f_rA, rB: f_rB, valC: f_valC, valP: f_valP};
  end

  pc_update u_pc (
    .clk, .rst, .stall(F_stall), .f_icode, .f_ifun, .f_ok(f_stat == S_AOK || f_icode == I_HALT),
    .f_valC, .f_valP,
    .M_icode(M.icode), .M_ifun(M.ifun), .M_cnd(M.cnd), .M_valE(M.valE), .M_valA(M.valA),
    .W_icode(W.icode), .W_valM(W.valM), .f_pc, .predPC()
  );

  pipe_reg #(.W($bits(fd_t)), .DEFAULT(FD_BUBBLE)) u_fD (
    .clk, .rst, .stall(D_stall), .bubble(D_bubble), .d(f_out), .q(D)
  );

  // ---------------- decode
  logic [3:0]  d_srcA, d_srcB, d_dstE, d_dstM;
  logic [63:0] rvalA, rvalB;

  always_comb begin
    unique case (D.icode)
      I_RRMOVQ, I_RMMOVQ, I_OPQ, I_PUSHQ: d_srcA = D.rA;
      I_POPQ, I_RET:                      d_srcA = REG_RSP;
      default:                            d_srcA = REG_NONE;
    endcase
    unique case (D.icode)
      I_OPQ, I_RMMOVQ, I_MRMOVQ:           d_srcB = D.rB;
      I_PUSHQ, I_POPQ, I_CALL, I_RET:      d_srcB = REG_RSP;
      default:                             d_srcB = REG_NONE;
    endcase
    unique case (D.icode)
      I_RRMOVQ, I_IRMOVQ, I_OPQ:           d_dstE = D.rB;
      I_PUSHQ, I_POPQ, I_CALL, I_RET:      d_dstE = REG_RSP;
      default:                             d_dstE = REG_NONE;
    endcase
    d_dstM = (D.icode == I_MRMOVQ || D.icode == I_POPQ) ? D.rA : REG_NONE;
  end

  regfile u_rf (
    .clk, .srcA(d_srcA), .srcB(d_srcB), .valA(rvalA), .valB(rvalB),
    .dstE(W.stat == S_AOK ? W.dstE : REG_NONE), .valE(W.valE),
    .dstM(W.stat == S_AOK ? W.dstM : REG_NONE), .valM(W.valM),
    .ld_we(rf_ld_we), .ld_idx(rf_ld_idx), .ld_data(rf_ld_data)
  );

  always_comb
    d_out = '{stat: D.stat, icode: D.icode, ifun: D.ifun, valC: D.valC,
              valA: ((D.icode == I_CALL || D.icode == I_JXX) ? D.valP : rvalA),
              valB: rvalB, dstE: d_dstE, dstM: d_dstM};

  pipe_reg #(.W($bits(de_t)), .DEFAULT(DE_BUBBLE)) u_dE (
    .clk, .rst, .stall(1'b0), .bubble(E_bubble), .d(d_out), .q(E)
  );

  // ---------------- execute
  logic [63:0] aluA, aluB, e_valE;
  alufun_t     alufun;
  cc_t         cc, cc_new;
  logic        e_cnd;
  logic [3:0]  e_dstE;

  always_comb begin
    unique case (E.icode)
      I_RRMOVQ, I_OPQ:                   aluA = E.valA;
      I_IRMOVQ, I_RMMOVQ, I_MRMOVQ, I_JXX: aluA = E.valC;
      I_CALL, I_PUSHQ:                   aluA = -64'sd8;
      I_RET, I_POPQ:                     aluA = 64'd8;
      default:                           aluA = 64'd0;
    endcase
    unique case (E.icode)
      I_RMMOVQ, I_MRMOVQ, I_OPQ, I_CALL, I_PUSHQ, I_RET, I_POPQ: aluB = E.valB;
      default:                                                aluB = 64'd0;
    endcase
    alufun = (E.icode == I_OPQ) ? alufun_t'(E.ifun) : ALU_ADD;
  end

  alu u_alu (.aluA, .aluB, .alufun, .valE(e_valE), .cc_new);

  // condition codes: written by OPq in execute, read by jXX/cmovXX in execute
  always_ff @(posedge clk) begin
    if (rst)                                 cc <= '{zf: 1'b1, sf: 1'b0, of: 1'b0};
    else if (E.icode == I_OPQ && cc_enable) cc <= cc_new;
  end

  cond_eval u_cond (.ifun(E.ifun), .cc, .cnd(e_cnd));

  always_comb begin
    e_dstE = (E.icode == I_RRMOVQ && !e_cnd) ? REG_NONE : E.dstE;
    e_out  = '{stat: E.stat, icode: E.icode, ifun: E.ifun, cnd: e_cnd, valE: e_valE,
               valA: E.valA, dstE: e_dstE, dstM: E.dstM};
  end

  pipe_reg #(.W($bits(em_t)), .DEFAULT(EM_BUBBLE)) u_eM (
    .clk, .rst, .stall(1'b0), .bubble(M_bubble), .d(e_out), .q(M)
  );

  // ---------------- memory
  logic        mem_read, mem_write, dmem_error;
  logic [63:0] mem_addr, m_valM;
  stat_t       m_stat;

  mem_rw_ctrl u_mctl (
    .icode(M.icode), .valE(M.valE), .valA(M.valA),
    .mem_read, .mem_write, .mem_addr
  );

  data_mem #(.BYTES(DMEM_BYTES)) u_dmem (
    .clk, .addr(mem_addr), .read(mem_read), .write(mem_write && M.stat == S_AOK),
    .wdata(M.valA), .rdata(m_valM), .dmem_error
  );

  always_comb begin
    m_stat = dmem_error ? S_ADR : M.stat;
    m_out  = '{stat: m_stat, icode: M.icode, valE: M.valE, valM: m_valM,
               dstE: M.dstE, dstM: M.dstM};
  end

  pipe_reg #(.W($bits(mw_t)), .DEFAULT(MW_BUBBLE)) u_mW (
    .clk, .rst, .stall(W_stall), .bubble(1'b0), .d(m_out), .q(W)
  );

  // ---------------- writeback: register file (above) and Stat
  assign stat = W.stat;
  assign pc   = f_pc;

  pipe_control u_ctl (
    .D_icode(D.icode), .D_ifun(D.ifun), .D_stat(D.stat), .d_srcA, .d_srcB,
    .E_icode(E.icode), .E_ifun(E.ifun), .E_stat(E.stat), .E_dstE(E.dstE), .E_dstM(E.dstM),
    .M_icode(M.icode), .M_dstE(M.dstE), .M_dstM(M.dstM), .m_stat,
    .W_dstE(W.dstE), .W_dstM(W.dstM), .W_stat(W.stat),
    .F_stall, .D_stall, .D_bubble, .E_bubble, .M_bubble, .W_stall, .cc_enable,
    .ev_data_hazard, .ev_jcc_wait, .ev_ret_wait, .ev_exc_stop
  );

endmodule

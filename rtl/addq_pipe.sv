// addq_pipe: four-stage pipeline that executes only "addq rA, rB".
// Stages fetch, decode, execute, writeback, separated by the pipeline
// registers pP {pc}, fD {rA, rB}, dE {valA, valB, dstE}, eW {valE, dstE}.
// Fetch reads two bytes at the PC (rA = bits 15:12, rB = bits 11:8 of the
// fetched bytes) and advances the PC by 2. Decode reads R[rA], R[rB] and sets
// dstE = rB. Execute adds. Writeback writes R[dstE] (dstM is tied to 0xF).
// Bubbles load rA = rB = dstE = 0xF, valA = valB = valE = 0, i.e. a no-op.
// A byte pair with rA = rB = 0xF is also a no-op and is used to fill memory.
// Hazards are handled by addq_stall (parameter STALL_IN_DECODE picks where).
// The opcode byte is ignored: every instruction is treated as addq.
// Interface: imem_* loads the instruction memory and rf_ld_* the registers
// while rst is held; the pipeline register contents are outputs so the
// cycle-by-cycle timing can be observed.
module addq_pipe #(
  parameter int unsigned IMEM_BYTES      = 4096,
  parameter bit          STALL_IN_DECODE = 1'b0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        imem_we,
  input  logic [63:0] imem_addr,
  input  logic [7:0]  imem_data,
  input  logic        rf_ld_we,
  input  logic [3:0]  rf_ld_idx,
  input  logic [63:0] rf_ld_data,
  output logic [63:0] P_pc,
  output logic [3:0]  D_rA,
  output logic [3:0]  D_rB,
  output logic [63:0] E_valA,
  output logic [63:0] E_valB,
  output logic [3:0]  E_dstE,
  output logic [63:0] W_valE,
  output logic [3:0]  W_dstE,
  output logic        stall_P,
  output logic        bubble_D,
  output logic        stall_D,
  output logic        bubble_E
);
  import y86_pkg::*;

  typedef struct packed { logic [3:0] rA; logic [3:0] rB; } fd_addq_t;
  typedef struct packed { logic [63:0] valA; logic [63:0] valB; logic [3:0] dstE; } de_addq_t;
  typedef struct packed { logic [63:0] valE; logic [3:0] dstE; } ew_addq_t;

  localparam fd_addq_t FD_NOP = '{rA: REG_NONE, rB: REG_NONE};
  localparam de_addq_t DE_NOP = '{valA: 64'd0, valB: 64'd0, dstE: REG_NONE};
  localparam ew_addq_t EW_NOP = '{valE: 64'd0, dstE: REG_NONE};

  // fetch
  logic [79:0] i10bytes;
  logic        imem_error;
  logic [3:0]  f_rA, f_rB;
  logic [63:0] p_pc;

  instr_mem #(.BYTES(IMEM_BYTES)) u_imem (
    .clk, .pc(P_pc), .i10bytes, .imem_error,
    .prog_we(imem_we), .prog_addr(imem_addr), .prog_data(imem_data)
  );

  assign f_rA = i10bytes[15:12];
  assign f_rB = i10bytes[11:8];
  assign p_pc = P_pc + 64'd2;

  pipe_reg #(.W(64), .DEFAULT(64'd0)) u_pP (
    .clk, .rst, .stall(stall_P), .bubble(1'b0), .d(p_pc), .q(P_pc)
  );

  fd_addq_t D;
  pipe_reg #(.W($bits(fd_addq_t)), .DEFAULT(FD_NOP)) u_fD (
    .clk, .rst, .stall(stall_D), .bubble(bubble_D), .d(fd_addq_t'{rA: f_rA, rB: f_rB}), .q(D)
  );
  assign D_rA = D.rA;
  assign D_rB = D.rB;

  // decode
  logic [63:0] reg_outA, reg_outB;
  de_addq_t    E;
  ew_addq_t    W;

  regfile u_rf (
    .clk, .srcA(D.rA), .srcB(D.rB), .valA(reg_outA), .valB(reg_outB),
    .dstE(W.dstE), .valE(W.valE), .dstM(REG_NONE), .valM(64'd0),
    .ld_we(rf_ld_we), .ld_idx(rf_ld_idx), .ld_data(rf_ld_data)
  );

  pipe_reg #(.W($bits(de_addq_t)), .DEFAULT(DE_NOP)) u_dE (
    .clk, .rst, .stall(1'b0), .bubble(bubble_E),
    .d(de_addq_t'{valA: reg_outA, valB: reg_outB, dstE: D.rB}), .q(E)
  );
  assign E_valA = E.valA;
  assign E_valB = E.valB;
  assign E_dstE = E.dstE;

  // execute
  pipe_reg #(.W($bits(ew_addq_t)), .DEFAULT(EW_NOP)) u_eW (
    .clk, .rst, .stall(1'b0), .bubble(1'b0),
    .d(ew_addq_t'{valE: E.valA + E.valB, dstE: E.dstE}), .q(W)
  );
  assign W_valE = W.valE;
  assign W_dstE = W.dstE;

  // hazards
  addq_stall #(.STALL_IN_DECODE(STALL_IN_DECODE)) u_hz (
    .f_rA, .f_rB, .D_rA(D.rA), .D_rB(D.rB), .E_dstE(E.dstE), .W_dstE(W.dstE),
    .stall_P, .bubble_D, .stall_D, .bubble_E
  );

endmodule

// pc_update: fetch-stage PC logic, arranged around a predicted-PC register.
// The predicted-PC register (replacing a plain PC register) holds the address
// fetch will use next unless a later stage overrides it. Each cycle:
//   f_pc = taken conditional jump in memory stage   -> its target (M_valE)
//        = not-taken conditional jump in memory stage -> its fall-through (M_valA)
//        = ret in writeback stage                    -> loaded return address (W_valM)
//        = otherwise                                 -> predicted PC
// and the next predicted PC is computed from the fetched icode:
//   jmp (unconditional) and call -> valC; ret, halt and an invalid or
//   unreadable instruction -> f_pc (fetch waits there); everything else ->
//   valP (also for a conditional jump, whose outcome is not known yet).
// stall keeps the predicted PC; reset loads 0.
// The register sits after the next-PC mux, so f_pc is available at the start
// of the cycle; the redirect inputs come from pipeline registers.
module pc_update (
  input  logic        clk,
  input  logic        rst,
  input  logic        stall,
  input  logic [3:0]  f_icode,
  input  logic [3:0]  f_ifun,
  input  logic        f_ok,
  input  logic [63:0] f_valC,
  input  logic [63:0] f_valP,
  input  logic [3:0]  M_icode,
  input  logic [3:0]  M_ifun,
  input  logic        M_cnd,
  input  logic [63:0] M_valE,
  input  logic [63:0] M_valA,
  input  logic [3:0]  W_icode,
  input  logic [63:0] W_valM,
  output logic [63:0] f_pc,
  output logic [63:0] predPC
);
  import y86_pkg::*;

  logic [63:0] f_predPC;

  always_comb begin
    if (M_icode == I_JXX && M_ifun != C_ALWAYS) f_pc = M_cnd ? M_valE : M_valA;
    else if (W_icode == I_RET)                   f_pc = W_valM;
    else                                         f_pc = predPC;

    if (!f_ok || f_icode == I_RET || f_icode == I_HALT)       f_predPC = f_pc;
    else if ((f_icode == I_JXX && f_ifun == C_ALWAYS) || f_icode == I_CALL) f_predPC = f_valC;
    else                                                      f_predPC = f_valP;
  end

  pipe_reg #(.W(64), .DEFAULT(64'd0)) u_pP (
    .clk, .rst, .stall, .bubble(1'b0), .d(f_predPC), .q(predPC)
  );

endmodule

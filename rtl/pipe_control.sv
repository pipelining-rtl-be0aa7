// pipe_control: stall/bubble control of the five-stage pipeline.
// Every hazard is resolved by waiting; nothing is forwarded.
//  * Data hazard: the instruction in decode reads a register (srcA/srcB) that
//    an instruction in execute, memory or writeback will still write (its dstE
//    or dstM). The register file is written at the end of writeback, so
//    decode must wait until the writer has left writeback. Action: stall the
//    predicted PC and fD, bubble dE.
//  * Conditional jump in decode or execute: its direction is known only when
//    it reaches the memory-stage register. Action: stall the PC, bubble fD.
//  * ret in decode, execute or memory: the return address is known only once
//    ret has read memory. Action: stall the PC, bubble fD.
//  * An instruction with a non-AOK status (halt, bad address, bad icode) in
//    decode or later: fetch stops. In memory or writeback: the following
//    instruction is turned into a bubble in eM and may not set the condition
//    codes; in writeback: mW stalls, so the pipeline freezes with the status
//    visible.
// Outputs are combinational; the event outputs flag which rule acted.
module pipe_control (
  input  logic [3:0]      D_icode,
  input  logic [3:0]      D_ifun,
  input  y86_pkg::stat_t  D_stat,
  input  logic [3:0]      d_srcA,
  input  logic [3:0]      d_srcB,
  input  logic [3:0]      E_icode,
  input  logic [3:0]      E_ifun,
  input  y86_pkg::stat_t  E_stat,
  input  logic [3:0]      E_dstE,
  input  logic [3:0]      E_dstM,
  input  logic [3:0]      M_icode,
  input  logic [3:0]      M_dstE,
  input  logic [3:0]      M_dstM,
  input  y86_pkg::stat_t  m_stat,
  input  logic [3:0]      W_dstE,
  input  logic [3:0]      W_dstM,
  input  y86_pkg::stat_t  W_stat,
  output logic            F_stall,
  output logic            D_stall,
  output logic            D_bubble,
  output logic            E_bubble,
  output logic            M_bubble,
  output logic            W_stall,
  output logic            cc_enable,
  output logic            ev_data_hazard,
  output logic            ev_jcc_wait,
  output logic            ev_ret_wait,
  output logic            ev_exc_stop
);
  import y86_pkg::*;

  function automatic logic pending(input logic [3:0] src, input logic [3:0] e_e, input logic [3:0] e_m,
                                   input logic [3:0] m_e, input logic [3:0] m_m,
                                   input logic [3:0] w_e, input logic [3:0] w_m);
    return (src != REG_NONE) &&
           (src == e_e || src == e_m || src == m_e || src == m_m || src == w_e || src == w_m);
  endfunction

  logic m_exc, w_exc;

  always_comb begin
    ev_data_hazard = pending(d_srcA, E_dstE, E_dstM, M_dstE, M_dstM, W_dstE, W_dstM) ||
                     pending(d_srcB, E_dstE, E_dstM, M_dstE, M_dstM, W_dstE, W_dstM);
    ev_jcc_wait    = (D_icode == I_JXX && D_ifun != C_ALWAYS) ||
                     (E_icode == I_JXX && E_ifun != C_ALWAYS);
    ev_ret_wait    = (D_icode == I_RET) || (E_icode == I_RET) || (M_icode == I_RET);
    m_exc          = (m_stat != S_AOK);
    w_exc          = (W_stat != S_AOK);
    ev_exc_stop    = (D_stat != S_AOK) || (E_stat != S_AOK) || m_exc || w_exc;

    F_stall   = ev_data_hazard || ev_jcc_wait || ev_ret_wait || ev_exc_stop;
    D_stall   = ev_data_hazard;
    D_bubble  = !ev_data_hazard && (ev_jcc_wait || ev_ret_wait || ev_exc_stop);
    E_bubble  = ev_data_hazard;
    M_bubble  = m_exc || w_exc;
    W_stall   = w_exc;
    cc_enable = !m_exc && !w_exc;
  end

endmodule

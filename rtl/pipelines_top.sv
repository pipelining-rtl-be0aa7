// pipelines_top: the two processors of this design side by side.
//  * addq_pipe - the four-stage addq-only pipeline with stall-based data
//    hazard handling (ports prefixed a_).
//  * y86_pipe  - the five-stage Y86-64 pipeline with stall/bubble pipeline
//    registers, data hazard stalls and control hazard stalls for conditional
//    jumps and ret (ports prefixed y_).
// The two share no signals except clock and reset. Each has a program-load
// port for its instruction memory and a register-load port, used while reset
// is held.
module pipelines_top (
  input  logic           clk,
  input  logic           rst,
  // addq pipeline
  input  logic           a_imem_we,
  input  logic [63:0]    a_imem_addr,
  input  logic [7:0]     a_imem_data,
  input  logic           a_rf_ld_we,
  input  logic [3:0]     a_rf_ld_idx,
  input  logic [63:0]    a_rf_ld_data,
  output logic [63:0]    a_pc,
  output logic [3:0]     a_D_rA,
  output logic [3:0]     a_D_rB,
  output logic [63:0]    a_E_valA,
  output logic [63:0]    a_E_valB,
  output logic [3:0]     a_E_dstE,
  output logic [63:0]    a_W_valE,
  output logic [3:0]     a_W_dstE,
  output logic           a_stall,
  output logic           a_bubble_D,
  output logic           a_stall_D,
  output logic           a_bubble_E,
  // Y86-64 pipeline
  input  logic           y_imem_we,
  input  logic [63:0]    y_imem_addr,
  input  logic [7:0]     y_imem_data,
  input  logic           y_rf_ld_we,
  input  logic [3:0]     y_rf_ld_idx,
  input  logic [63:0]    y_rf_ld_data,
  output y86_pkg::stat_t y_stat,
  output logic [63:0]    y_pc,
  output logic           y_ev_data_hazard,
  output logic           y_ev_jcc_wait,
  output logic           y_ev_ret_wait,
  output logic           y_ev_exc_stop
);

  addq_pipe u_addq (
    .clk, .rst,
    .imem_we(a_imem_we), .imem_addr(a_imem_addr), .imem_data(a_imem_data),
    .rf_ld_we(a_rf_ld_we), .rf_ld_idx(a_rf_ld_idx), .rf_ld_data(a_rf_ld_data),
    .P_pc(a_pc), .D_rA(a_D_rA), .D_rB(a_D_rB), .E_valA(a_E_valA), .E_valB(a_E_valB),
    .E_dstE(a_E_dstE), .W_valE(a_W_valE), .W_dstE(a_W_dstE),
    .stall_P(a_stall), .bubble_D(a_bubble_D), .stall_D(a_stall_D), .bubble_E(a_bubble_E)
  );

  y86_pipe u_y86 (
    .clk, .rst,
    .imem_we(y_imem_we), .imem_addr(y_imem_addr), .imem_data(y_imem_data),
    .rf_ld_we(y_rf_ld_we), .rf_ld_idx(y_rf_ld_idx), .rf_ld_data(y_rf_ld_data),
    .stat(y_stat), .pc(y_pc),
    .ev_data_hazard(y_ev_data_hazard), .ev_jcc_wait(y_ev_jcc_wait),
    .ev_ret_wait(y_ev_ret_wait), .ev_exc_stop(y_ev_exc_stop)
  );

endmodule

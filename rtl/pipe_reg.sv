// pipe_reg: one pipeline register bank with built-in stall and bubble muxes.
// Every cycle the bank loads its input, except:
//   stall  = 1 : it keeps its old value (register output fed back),
//   bubble = 1 : it loads DEFAULT, the no-op value of this bank.
// Reset also loads DEFAULT, as the declared initial value of each field.
// Asserting both in one cycle is a control error (checked by an assertion);
// bubble then wins, a choice of this design.
// Interface: W-bit input d, output q, loaded on the rising clock edge.
module pipe_reg #(
  parameter int unsigned    W       = 8,
  parameter logic [W-1:0]   DEFAULT = '1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         stall,
  input  logic         bubble,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst || bubble) q <= DEFAULT;
    else if (!stall)   q <= d;
  end

  a_not_both: assert property (@(posedge clk) disable iff (rst) !(stall && bubble))
    else $error("pipe_reg: stall and bubble asserted together");

endmodule

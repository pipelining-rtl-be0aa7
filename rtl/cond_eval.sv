// cond_eval: decides whether a jXX or cmovXX condition holds.
// Inputs are the function code (ifun: always, le, l, e, ne, ge, g) and the
// condition codes held in the execute stage; output cnd is 1 when the jump
// is taken / the move happens. Purely combinational.
module cond_eval (
  input  logic [3:0]    ifun,
  input  y86_pkg::cc_t  cc,
  output logic          cnd
);
  import y86_pkg::*;

  logic lt;
  assign lt = cc.sf ^ cc.of;

  always_comb begin
    unique case (ifun)
      C_ALWAYS: cnd = 1'b1;
      C_LE:     cnd = lt | cc.zf;
      C_L:      cnd = lt;
      C_E:      cnd = cc.zf;
      C_NE:     cnd = !cc.zf;
      C_GE:     cnd = !lt;
      C_G:      cnd = !lt & !cc.zf;
      default:  cnd = 1'b0;
    endcase
  end

endmodule

// alu: the execute-stage arithmetic unit.
// valE = aluB OP aluA with OP one of add, sub (aluB - aluA), and, xor, chosen
// by alufun (the ifun of an OPq instruction; other instructions use add).
// It also computes the condition codes the result would set: ZF (zero),
// SF (negative) and OF (signed overflow of add/sub). Purely combinational.
module alu (
  input  logic [63:0]       aluA,
  input  logic [63:0]       aluB,
  input  y86_pkg::alufun_t  alufun,
  output logic [63:0]       valE,
  output y86_pkg::cc_t      cc_new
);
  import y86_pkg::*;

  always_comb begin
    unique case (alufun)
      ALU_ADD: valE = aluB + aluA;
      ALU_SUB: valE = aluB - aluA;
      ALU_AND: valE = aluB & aluA;
      ALU_XOR: valE = aluB ^ aluA;
      default: valE = aluB + aluA;
    endcase
    cc_new.zf = (valE == 64'd0);
    cc_new.sf = valE[63];
    unique case (alufun)
      ALU_ADD: cc_new.of = (aluA[63] == aluB[63]) && (valE[63] != aluB[63]);
      ALU_SUB: cc_new.of = (aluA[63] != aluB[63]) && (valE[63] != aluB[63]);
      default: cc_new.of = 1'b0;
    endcase
  end

endmodule

// fetch_split: splits the ten bytes read from instruction memory into the
// fields of one Y86-64 instruction and computes its length.
// Byte 0 = icode:ifun (icode = i10bytes[7:4], ifun = i10bytes[3:0]);
// byte 1 = rA:rB for instructions that name registers (rA = i10bytes[15:12],
// rB = i10bytes[11:8]); the 8-byte constant valC follows, little-endian.
// Lengths: halt, nop, ret 1; rrmovq/cmovXX, OPq, pushq, popq 2; jXX, call 9;
// irmovq, rmmovq, mrmovq 10. valP = pc + length. Fields an instruction does
// not have read as 0xF (registers) or 0 (valC). instr_valid is 0 for an icode
// above popq. Purely combinational.
module fetch_split (
  input  logic [63:0] pc,
  input  logic [79:0] i10bytes,
  output logic [3:0]  icode,
  output logic [3:0]  ifun,
  output logic [3:0]  rA,
  output logic [3:0]  rB,
  output logic [63:0] valC,
  output logic [63:0] valP,
  output logic        instr_valid
);
  import y86_pkg::*;

  logic need_regids, need_valC;
  logic [3:0] len;

  always_comb begin
    icode = i10bytes[7:4];
    ifun  = i10bytes[3:0];
    instr_valid = (icode <= I_POPQ);
    need_regids = (icode == I_RRMOVQ) || (icode == I_IRMOVQ) || (icode == I_RMMOVQ) ||
                  (icode == I_MRMOVQ) || (icode == I_OPQ)    || (icode == I_PUSHQ)  ||
                  (icode == I_POPQ);
    need_valC   = (icode == I_IRMOVQ) || (icode == I_RMMOVQ) || (icode == I_MRMOVQ) ||
                  (icode == I_JXX)    || (icode == I_CALL);
    rA   = need_regids ? i10bytes[15:12] : REG_NONE;
    rB   = need_regids ? i10bytes[11:8]  : REG_NONE;
    valC = !need_valC ? 64'd0 : (need_regids ? i10bytes[79:16] : i10bytes[71:8]);
    len  = 4'd1 + (need_regids ? 4'd1 : 4'd0) + (need_valC ? 4'd8 : 4'd0);
    valP = pc + 64'(len);
  end

endmodule

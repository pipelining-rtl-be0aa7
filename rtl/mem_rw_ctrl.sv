// mem_rw_ctrl: memory-stage control ("is read?", "is write?").
// Decodes the icode carried down the pipeline to the memory stage (M_icode):
//   read  for mrmovq, popq, ret
//   write for rmmovq, pushq, call
// and picks the address: valE (computed address / decremented %rsp) for
// rmmovq, mrmovq, pushq, call; valA (the old %rsp) for popq and ret.
// Purely combinational.
module mem_rw_ctrl (
  input  logic [3:0]  icode,
  input  logic [63:0] valE,
  input  logic [63:0] valA,
  output logic        mem_read,
  output logic        mem_write,
  output logic [63:0] mem_addr
);
  import y86_pkg::*;

  always_comb begin
    mem_read  = (icode == I_MRMOVQ) || (icode == I_POPQ) || (icode == I_RET);
    mem_write = (icode == I_RMMOVQ) || (icode == I_PUSHQ) || (icode == I_CALL);
    mem_addr  = ((icode == I_POPQ) || (icode == I_RET)) ? valA : valE;
  end

endmodule

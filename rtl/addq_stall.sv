// addq_stall: data-hazard detection for the four-stage addq pipeline.
// The register file is written at the end of writeback and read in decode,
// so a reader must not reach decode before its writer has left writeback.
// Two placements of the check, selected by STALL_IN_DECODE:
//   0 (default) - check in fetch: the instruction being fetched reads
//     (f_rA/f_rB) a register named as dstE in decode (D_rB) or execute
//     (E_dstE). Then keep the PC (stall_P) and send a bubble into fD.
//   1 - check in decode: the instruction in decode reads (D_rA/D_rB) a
//     register that execute (E_dstE) or writeback (W_dstE) will write. Then
//     keep the PC and fD (stall_P, stall_D) and send a bubble into dE.
// Both give two stall cycles for back-to-back dependent addqs. Register 0xF
// names no register and never causes a stall. Purely combinational.
module addq_stall #(
  parameter bit STALL_IN_DECODE = 1'b0
) (
  input  logic [3:0] f_rA,
  input  logic [3:0] f_rB,
  input  logic [3:0] D_rA,
  input  logic [3:0] D_rB,
  input  logic [3:0] E_dstE,
  input  logic [3:0] W_dstE,
  output logic       stall_P,
  output logic       bubble_D,
  output logic       stall_D,
  output logic       bubble_E
);
  import y86_pkg::*;

  function automatic logic hit(input logic [3:0] src, input logic [3:0] a, input logic [3:0] b);
    return (src != REG_NONE) && (src == a || src == b);
  endfunction

  logic hz;

  always_comb begin
    if (STALL_IN_DECODE) hz = hit(D_rA, E_dstE, W_dstE) || hit(D_rB, E_dstE, W_dstE);
    else                 hz = hit(f_rA, D_rB, E_dstE)   || hit(f_rB, D_rB, E_dstE);
    stall_P  = hz;
    bubble_D = hz && !STALL_IN_DECODE;
    stall_D  = hz &&  STALL_IN_DECODE;
    bubble_E = hz &&  STALL_IN_DECODE;
  end

endmodule

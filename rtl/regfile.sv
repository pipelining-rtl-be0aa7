// regfile: the fifteen 64-bit Y86-64 program registers (%rax..%r14).
// Two combinational read ports (srcA, srcB) and two write ports (dstE, dstM)
// written on the rising clock edge; register number 0xF means "no register":
// it reads as 0 and is never written. A write becomes visible to a read in
// the next cycle only (no write-through), so a value written by writeback in
// cycle n is read by decode in cycle n+1.
// If dstE and dstM name the same register, dstM wins (this design's choice).
// The ld_* port writes one register directly; it loads initial register
// contents while the pipeline is held in reset and has the lowest priority.
module regfile (
  input  logic        clk,
  input  logic [3:0]  srcA,
  input  logic [3:0]  srcB,
  output logic [63:0] valA,
  output logic [63:0] valB,
  input  logic [3:0]  dstE,
  input  logic [63:0] valE,
  input  logic [3:0]  dstM,
  input  logic [63:0] valM,
  input  logic        ld_we,
  input  logic [3:0]  ld_idx,
  input  logic [63:0] ld_data
);
  import y86_pkg::*;

  logic [63:0] regs [15];

  always_comb begin
    valA = (srcA == REG_NONE) ? 64'd0 : regs[srcA];
    valB = (srcB == REG_NONE) ? 64'd0 : regs[srcB];
  end

  always_ff @(posedge clk) begin
    if (ld_we && ld_idx != REG_NONE) regs[ld_idx] <= ld_data;
    if (dstE != REG_NONE)            regs[dstE]   <= valE;
    if (dstM != REG_NONE)            regs[dstM]   <= valM;
  end

endmodule

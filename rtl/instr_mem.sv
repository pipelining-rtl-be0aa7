// instr_mem: byte-addressed instruction memory.
// Reads are combinational: i10bytes holds the ten bytes starting at pc,
// little-endian (byte pc in bits 7:0, byte pc+1 in bits 15:8, ...), the
// longest Y86-64 instruction. Bytes past the end read as 0. imem_error is set
// when pc itself lies outside the memory.
// The prog_* port writes one byte per rising clock edge; it loads the program
// before the pipeline is released from reset.
// Size: BYTES is this design's choice.
module instr_mem #(
  parameter int unsigned BYTES = 4096
) (
  input  logic        clk,
  input  logic [63:0] pc,
  output logic [79:0] i10bytes,
  output logic        imem_error,
  input  logic        prog_we,
  input  logic [63:0] prog_addr,
  input  logic [7:0]  prog_data
);

  logic [7:0] mem [BYTES];

  always_ff @(posedge clk)
    if (prog_we && prog_addr < 64'(BYTES)) mem[prog_addr[$clog2(BYTES)-1:0]] <= prog_data;

  always_comb begin
    imem_error = (pc >= 64'(BYTES));
    for (int i = 0; i < 10; i++) begin
      logic [63:0] a;
      a = pc + 64'(i);
      i10bytes[8*i +: 8] = (a < 64'(BYTES)) ? mem[a[$clog2(BYTES)-1:0]] : 8'h00;
    end
  end

endmodule

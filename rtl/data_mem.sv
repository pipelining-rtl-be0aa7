// data_mem: byte-addressed data memory with 64-bit little-endian accesses.
// Read: when read is set, rdata holds the eight bytes at addr (combinational);
// otherwise rdata is 0. Write: when write is set, wdata is stored at addr on
// the rising clock edge. dmem_error is set when a read or write reaches past
// the end of the memory; such a write is dropped. Unaligned accesses are
// allowed. Size: BYTES is this design's choice.
module data_mem #(
  parameter int unsigned BYTES = 4096
) (
  input  logic        clk,
  input  logic [63:0] addr,
  input  logic        read,
  input  logic        write,
  input  logic [63:0] wdata,
  output logic [63:0] rdata,
  output logic        dmem_error
);
  localparam int unsigned AW = $clog2(BYTES);

  logic [7:0] mem [BYTES];
  logic       in_range;

  assign in_range   = (addr <= 64'(BYTES - 8));
  assign dmem_error = (read || write) && !in_range;

  always_comb begin
    rdata = 64'd0;
    if (read && in_range)
      for (int i = 0; i < 8; i++) rdata[8*i +: 8] = mem[AW'(addr + 64'(i))];
  end

  always_ff @(posedge clk)
    if (write && in_range)
      for (int i = 0; i < 8; i++) mem[AW'(addr + 64'(i))] <= wdata[8*i +: 8];

endmodule

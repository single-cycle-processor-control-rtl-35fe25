// mips_data_memory: data memory of the single-cycle MIPS processor.
// The ALU result is a byte address; word adr[AW+1:2] is read
// combinationally on data_out (for lw) and, when wr_en (MemWr) is high,
// data_in (busB) is written there at the rising clock edge (for sw).
// Contents are not reset. The size (256 words), word indexing and the
// clock edge are this design's own choices.
module mips_data_memory #(
  parameter int WORDS = 256,
  parameter int AW    = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic        wr_en,
  input  logic [31:0] adr,
  input  logic [31:0] data_in,
  output logic [31:0] data_out
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk)
    if (wr_en) mem[adr[AW+1:2]] <= data_in;

  assign data_out = mem[adr[AW+1:2]];
endmodule

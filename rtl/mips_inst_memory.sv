// mips_inst_memory: instruction memory of the single-cycle MIPS processor.
// The PC is a byte address; the word at adr[AW+1:2] is read
// combinationally so fetch, decode and execute fit in one cycle. The memory
// is filled through a load port (load_we, load_addr word index, load_data)
// written on the rising clock edge, normally while the processor is held in
// reset. The load port and the size (256 words) are this design's own.
module mips_inst_memory #(
  parameter int WORDS = 256,
  parameter int AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,
  input  logic [31:0]   load_data,
  input  logic [31:0]   adr,
  output logic [31:0]   instr
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk)
    if (load_we) mem[load_addr] <= load_data;

  assign instr = mem[adr[AW+1:2]];
endmodule

// instruction_memory: 16 x 16-bit instruction store of the 16-bit core.
// While reset is high it is (re)loaded with the built-in demonstration
// program and insn_out is cleared to a noop. On each rising clock edge the
// word at addr_in is registered onto insn_out, so an instruction appears one
// edge after its address. Program, in assembly order
// (load/store: data register, base, offset;
// add: destination, first source, second source):
//   0 load  $1, $0, 0    DM[0] -> $1
//   1 load  $2, $0, 1    DM[1] -> $2
//   2 add   $3, $0, $1   $3 <- $0 + $1
//   3 add   $4, $1, $2   $4 <- $1 + $2
//   4 store $3, $0, 2    $3 -> DM[2]
//   5 store $4, $0, 3    $4 -> DM[3]
//   6..15 noop
// The program, size and read timing are the document's; the bit encoding
// (see sc_core_pkg) is this design's.
module instruction_memory
  import sc_core_pkg::*;
#(
  parameter int WORDS  = 16,
  parameter int DATA_W = 16,
  parameter int AW     = $clog2(WORDS)
) (
  input  logic              reset,
  input  logic              clk,
  input  logic [AW-1:0]     addr_in,
  output logic [DATA_W-1:0] insn_out
);
  logic [DATA_W-1:0] mem [WORDS];

  function automatic logic [DATA_W-1:0] program_word(int i);
    case (i)
      0:       return DATA_W'(insn(OPC_LOAD,  4'd0, 4'd1, 4'd0));
      1:       return DATA_W'(insn(OPC_LOAD,  4'd0, 4'd2, 4'd1));
      2:       return DATA_W'(insn(OPC_ADD,   4'd0, 4'd1, 4'd3));
      3:       return DATA_W'(insn(OPC_ADD,   4'd1, 4'd2, 4'd4));
      4:       return DATA_W'(insn(OPC_STORE, 4'd0, 4'd3, 4'd2));
      5:       return DATA_W'(insn(OPC_STORE, 4'd0, 4'd4, 4'd3));
      default: return DATA_W'(insn(OPC_NOOP,  4'd0, 4'd0, 4'd0));
    endcase
  endfunction

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      for (int i = 0; i < WORDS; i++) mem[i] <= program_word(i);
      insn_out <= '0;
    end else begin
      insn_out <= mem[addr_in];
    end
  end
endmodule

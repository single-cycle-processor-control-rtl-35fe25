// alu: the datapath ALU of the single-cycle MIPS subset processor.
// ALUctr selects and (000), or (001), add (010), subtract (110) or
// set-on-less-than (111); the unused codes give 0. zero is high when the
// result is 0: after a subtract it tells beq that the operands are equal.
// Combinational. The operation codes are the document's; slt comparing
// signed numbers and the result for unused codes are this design's choice.
module alu
  import mips_pkg::*;
#(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [2:0]       alu_ctr,
  output logic [WIDTH-1:0] result,
  output logic             zero
);
  always_comb begin
    unique case (alu_ctr)
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_SLT: result = WIDTH'($signed(a) < $signed(b));
      default: result = '0;
    endcase
    zero = (result == '0);
  end
endmodule

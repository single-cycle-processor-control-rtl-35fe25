// adder: unsigned WIDTH-bit adder with carry out. The 16-bit core uses it at
// 4 bits to form PC + 1 and at 16 bits as its ALU (the core's only
// arithmetic is addition). Combinational.
module adder #(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] src_a,
  input  logic [WIDTH-1:0] src_b,
  output logic [WIDTH-1:0] sum,
  output logic             carry_out
);
  always_comb {carry_out, sum} = {1'b0, src_a} + {1'b0, src_b};
endmodule

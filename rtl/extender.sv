// extender: widens the 16-bit immediate of an I-type instruction to 32 bits.
// ExtOp = 1 sign-extends (lw, sw address offsets), ExtOp = 0 zero-extends
// (ori). Combinational; the polarity is the document's control table.
module extender #(
  parameter int IN_W  = 16,
  parameter int OUT_W = 32
) (
  input  logic [IN_W-1:0]  imm16,
  input  logic             ext_op,
  output logic [OUT_W-1:0] imm32
);
  always_comb
    imm32 = {{(OUT_W-IN_W){ext_op & imm16[IN_W-1]}}, imm16};
endmodule

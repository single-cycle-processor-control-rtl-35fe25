// alu_control: local ALU decoder. The main control passes a 3-bit ALUop
// ("R-type", or, add, subtract); for R-type the low four bits of the
// function field choose the operation. ALUctr is formed by three
// sum-of-products equations, one per bit, taken from the document's truth
// table (func<5:4> are not looked at). Purely combinational.
// ALUctr codes: 000 and, 001 or, 010 add, 110 subtract, 111 set-on-less-than.
module alu_control (
  input  logic [2:0] alu_op,
  input  logic [5:0] func,
  output logic [2:0] alu_ctr
);
  always_comb begin
    alu_ctr[2] = (~alu_op[2] & alu_op[0])
               | ( alu_op[2] & ~func[2] & func[1] & ~func[0]);
    alu_ctr[1] = (~alu_op[2] & ~alu_op[1])
               | ( alu_op[2] & ~func[2] & ~func[0]);
    alu_ctr[0] = (~alu_op[2] & alu_op[1])
               | ( alu_op[2] & ~func[3] &  func[2] & ~func[1] &  func[0])
               | ( alu_op[2] &  func[3] & ~func[2] &  func[1] & ~func[0]);
  end
endmodule

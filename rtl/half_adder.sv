// half_adder: adds two bits. carry = x AND y, result = x XOR y.
// Combinational; the teaching example's propagation delays are left to
// the technology.
module half_adder (
  input  logic x,
  input  logic y,
  output logic carry,
  output logic result
);
  always_comb begin
    carry  = x & y;
    result = x ^ y;
  end
endmodule

// full_adder: one-bit full adder described structurally. The first half
// adder adds in1 and in2 (partial sum s1, carry s3); the second adds s1 and
// c_in (giving sum, carry s2); the OR gate merges the two carries into
// c_out. Combinational. The structure is the document's example.
module full_adder (
  input  logic in1,
  input  logic in2,
  input  logic c_in,
  output logic sum,
  output logic c_out
);
  logic s1, s2, s3;

  half_adder u_h1 (.x(in1), .y(in2),  .carry(s3), .result(s1));
  half_adder u_h2 (.x(s1),  .y(c_in), .carry(s2), .result(sum));
  or_2       u_o1 (.a(s2),  .b(s3),   .c(c_out));
endmodule

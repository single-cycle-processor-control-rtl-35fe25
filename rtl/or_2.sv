// or_2: two-input OR gate, c = a OR b; the carry merge of the full adder.
module or_2 (
  input  logic a,
  input  logic b,
  output logic c
);
  always_comb c = a | b;
endmodule

// mux_2to1_1b: one-bit two-input multiplexer, out = sel ? in1 : in0.
// The bit slice from which the wider multiplexers are built. Combinational.
module mux_2to1_1b (
  input  logic sel,
  input  logic in0,
  input  logic in1,
  output logic out
);
  always_comb out = sel ? in1 : in0;
endmodule

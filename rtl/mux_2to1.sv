// mux_2to1: two-input multiplexer of WIDTH bits, built structurally as a row
// of one-bit mux_2to1_1b slices sharing one select (the 4-bit and 16-bit
// multiplexers of the 16-bit core are made this way). sel = 0 passes in0,
// sel = 1 passes in1. Combinational. The default width of 16 is the core's
// data width; the MIPS datapath uses it at 5 and 32 bits.
module mux_2to1 #(
  parameter int WIDTH = 16
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] in0,
  input  logic [WIDTH-1:0] in1,
  output logic [WIDTH-1:0] out
);
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    mux_2to1_1b u_bit (.sel(sel), .in0(in0[i]), .in1(in1[i]), .out(out[i]));
  end
endmodule

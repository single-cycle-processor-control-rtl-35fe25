// square_sum: result = 1^2 + 2^2 + ... + x^2 for a signed WIDTH-bit x, and 0
// when x < 1 (the empty sum). A loop over i = 1..x has no fixed bound in
// hardware, so the sum is formed in closed form, x(x+1)(2x+1)/6, with one
// 3-operand product in 3*WIDTH bits and a division by the constant 6; the
// result is taken modulo 2^WIDTH. Combinational. The function is the
// document's example; the closed form is this design's way of building it.
module square_sum #(
  parameter int WIDTH = 32
) (
  input  logic signed [WIDTH-1:0] x,
  output logic        [WIDTH-1:0] result
);
  localparam int PW = 3 * WIDTH + 2;
  logic [PW-1:0] xe, prod;

  always_comb begin
    xe   = PW'(x);
    prod = xe * (xe + PW'(1)) * ((xe << 1) + PW'(1));
    if (x < 1) result = '0;
    else       result = WIDTH'(prod / PW'(6));
  end
endmodule

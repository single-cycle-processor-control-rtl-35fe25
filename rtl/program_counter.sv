// program_counter: PC register of the 16-bit single-cycle core. addr_out
// takes addr_in (the next-PC adder output) on every rising clock edge and
// is cleared to 0 while reset is high (asynchronous, active high). The reset
// style is this design's choice, matching the core's memories.
module program_counter #(
  parameter int ADDR_W = 4
) (
  input  logic              reset,
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr_in,
  output logic [ADDR_W-1:0] addr_out
);
  always_ff @(posedge clk or posedge reset) begin
    if (reset) addr_out <= '0;
    else       addr_out <= addr_in;
  end
endmodule

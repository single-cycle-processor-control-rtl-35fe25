// data_memory: 16 x 16-bit data memory of the 16-bit core. Reset
// (asynchronous, active high) loads 0x0005 into word 0, 0x0008 into word 1
// and 0 everywhere else, the operands of the demonstration program. With
// write_enable high, write_data is written to word addr_in on the falling
// clock edge; data_out shows word addr_in combinationally. All of this is the
// document's behaviour.
module data_memory #(
  parameter int WORDS  = 16,
  parameter int DATA_W = 16,
  parameter int AW     = $clog2(WORDS)
) (
  input  logic              reset,
  input  logic              clk,
  input  logic              write_enable,
  input  logic [DATA_W-1:0] write_data,
  input  logic [AW-1:0]     addr_in,
  output logic [DATA_W-1:0] data_out
);
  logic [DATA_W-1:0] mem [WORDS];

  always_ff @(negedge clk or posedge reset) begin
    if (reset) begin
      for (int i = 0; i < WORDS; i++) mem[i] <= '0;
      mem[0] <= DATA_W'(16'h0005);
      mem[1] <= DATA_W'(16'h0008);
    end else if (write_enable) begin
      mem[addr_in] <= write_data;
    end
  end

  assign data_out = mem[addr_in];
endmodule

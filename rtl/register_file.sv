// register_file: 16 x 16-bit register file of the 16-bit core. Two read
// ports are combinational. When write_enable is high, write_data is written
// to write_register on the falling clock edge, half a cycle after the
// instruction arrives, so the result is in place before the next rising
// edge. Register 0 always reads 0. reset (asynchronous, active high) clears
// all registers. All of this is the document's behaviour.
module register_file #(
  parameter int NREGS  = 16,
  parameter int DATA_W = 16,
  parameter int AW     = $clog2(NREGS)
) (
  input  logic              reset,
  input  logic              clk,
  input  logic [AW-1:0]     read_register_a,
  input  logic [AW-1:0]     read_register_b,
  input  logic              write_enable,
  input  logic [AW-1:0]     write_register,
  input  logic [DATA_W-1:0] write_data,
  output logic [DATA_W-1:0] read_data_a,
  output logic [DATA_W-1:0] read_data_b
);
  logic [DATA_W-1:0] regs [NREGS];

  always_ff @(negedge clk or posedge reset) begin
    if (reset) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (write_enable && write_register != '0) begin
      regs[write_register] <= write_data;
    end
  end

  always_comb begin
    read_data_a = (read_register_a == '0) ? '0 : regs[read_register_a];
    read_data_b = (read_register_b == '0) ? '0 : regs[read_register_b];
  end
endmodule

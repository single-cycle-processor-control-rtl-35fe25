// sign_extend_4to16: sign-extends the 4-bit address offset insn[3:0] of the
// 16-bit core to 16 bits by copying bit 3 into the upper bits. Combinational.
module sign_extend_4to16 #(
  parameter int IN_W  = 4,
  parameter int OUT_W = 16
) (
  input  logic [IN_W-1:0]  data_in,
  output logic [OUT_W-1:0] data_out
);
  always_comb data_out = {{(OUT_W-IN_W){data_in[IN_W-1]}}, data_in};
endmodule

// control_unit: decoder of the 16-bit core. From the opcode insn[15:12] it
// drives the five datapath controls:
//            reg_dst reg_write alu_src mem_write mem_to_reg
//   load        0        1        1        0         1
//   store       0        0        1        1         0
//   add         1        1        0        0         0
//   noop/other  0        0        0        0         0
// Combinational. The controls and their meaning are the document's; the
// opcode values (sc_core_pkg) are this design's.
module control_unit
  import sc_core_pkg::*;
(
  input  logic [3:0] opcode,
  output logic       reg_dst,
  output logic       reg_write,
  output logic       alu_src,
  output logic       mem_write,
  output logic       mem_to_reg
);
  always_comb begin
    {reg_dst, reg_write, alu_src, mem_write, mem_to_reg} = 5'b00000;
    case (opcode)
      OPC_LOAD:  {reg_dst, reg_write, alu_src, mem_write, mem_to_reg} = 5'b01101;
      OPC_STORE: {reg_dst, reg_write, alu_src, mem_write, mem_to_reg} = 5'b00110;
      OPC_ADD:   {reg_dst, reg_write, alu_src, mem_write, mem_to_reg} = 5'b11000;
      default:   ;
    endcase
  end
endmodule

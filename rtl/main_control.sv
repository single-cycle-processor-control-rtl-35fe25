// main_control: opcode decoder of the single-cycle MIPS subset processor.
// It is a two-level programmable-logic-array: an AND plane with one product
// term per opcode (R-type, ori, lw, sw, beq, j) and an OR plane that builds
// each control output from the product terms that need it. Purely
// combinational; the outputs are valid one decoder delay after op changes.
// The term-to-output map is the document's. That an undecoded opcode fires
// no term, and so gives all-zero controls, follows from the PLA structure.
module main_control
  import mips_pkg::*;
(
  input  logic [5:0] op,
  output ctrl_t      ctrl
);
  // AND plane
  logic is_r, is_ori, is_lw, is_sw, is_beq, is_j;
  always_comb begin
    is_r   = (op == OP_RTYPE);
    is_ori = (op == OP_ORI);
    is_lw  = (op == OP_LW);
    is_sw  = (op == OP_SW);
    is_beq = (op == OP_BEQ);
    is_j   = (op == OP_J);
  end

  // OR plane
  always_comb begin
    ctrl.reg_write  = is_r | is_ori | is_lw;
    ctrl.alu_src    = is_ori | is_lw | is_sw;
    ctrl.reg_dst    = is_r;
    ctrl.mem_to_reg = is_lw;
    ctrl.mem_write  = is_sw;
    ctrl.branch     = is_beq;
    ctrl.jump       = is_j;
    ctrl.ext_op     = is_lw | is_sw;
    ctrl.alu_op     = {is_r, is_ori, is_beq};
  end
endmodule

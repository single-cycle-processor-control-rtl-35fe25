// sc_core_pkg: instruction encoding of the 16-bit single-cycle core.
// An instruction is op[15:12] rs[11:8] rt[7:4] rd_or_offset[3:0].
//   load  rt, rs, off : rt <- DM[rs + sext(off)]
//   store rt, rs, off : DM[rs + sext(off)] <- rt
//   add   rd, rs, rt  : rd <- rs + rt
//   noop              : nothing
// The field positions follow the core's block diagram; the opcode values
// are this design's choice.
package sc_core_pkg;
  localparam logic [3:0] OPC_NOOP  = 4'h0;
  localparam logic [3:0] OPC_LOAD  = 4'h1;
  localparam logic [3:0] OPC_STORE = 4'h3;
  localparam logic [3:0] OPC_ADD   = 4'h8;

  // Build one instruction word
  function automatic logic [15:0] insn(logic [3:0] op, logic [3:0] f1,
                                       logic [3:0] f2, logic [3:0] f3);
    return {op, f1, f2, f3};
  endfunction
endpackage

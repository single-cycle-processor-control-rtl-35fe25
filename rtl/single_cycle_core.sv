// single_cycle_core: a small 16-bit single-cycle processor with load,
// store, add and noop. A 4-bit PC steps through a 16-word instruction
// memory; registers are 16 x 16 bits and the data memory 16 x 16 bits.
// Timing within one clock period:
//   rising edge  - the PC takes PC + 1 and the instruction memory registers
//                  the word at the old PC onto insn, so insn holds the
//                  instruction whose address the PC had before the edge;
//   high phase   - the instruction is decoded, registers are read, the
//                  16-bit adder forms rs + rt (add) or rs + sext(offset)
//                  (load/store), the memory is read;
//   falling edge - the register file and the data memory write.
// Datapath: opcode insn[15:12] to the control unit; insn[11:8] and insn[7:4]
// address the two read ports; RegDst picks insn[7:4] (load) or insn[3:0]
// (add) as the register written; ALUSrc picks read data 2 or the extended
// offset; the low four result bits address the data memory; MemToReg picks
// the adder result or the loaded word. The structure and timing are the
// document's. The observation outputs (this cycle's register and memory
// write) are this design's own, as are the opcode values.
module single_cycle_core #(
  parameter int DATA_W = 16,
  parameter int ADDR_W = 4
) (
  input  logic              reset,
  input  logic              clk,
  output logic [ADDR_W-1:0] pc,
  output logic [15:0]       insn,
  output logic              reg_write,
  output logic [3:0]        write_register,
  output logic [DATA_W-1:0] write_data,
  output logic              mem_write,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata
);
  logic [ADDR_W-1:0] next_pc;
  logic              pc_carry_out, alu_carry_out;
  logic [DATA_W-1:0] sign_extended_offset, read_data_a, read_data_b;
  logic [DATA_W-1:0] alu_src_b, alu_result, data_mem_out;
  logic              reg_dst, alu_src, mem_to_reg;

  program_counter #(.ADDR_W(ADDR_W)) u_pc (
    .reset, .clk, .addr_in(next_pc), .addr_out(pc)
  );

  adder #(.WIDTH(ADDR_W)) u_next_pc (
    .src_a(pc), .src_b(ADDR_W'(1)), .sum(next_pc), .carry_out(pc_carry_out)
  );

  instruction_memory #(.WORDS(2**ADDR_W), .DATA_W(16)) u_insn_mem (
    .reset, .clk, .addr_in(pc), .insn_out(insn)
  );

  sign_extend_4to16 #(.IN_W(4), .OUT_W(DATA_W)) u_sign_extend (
    .data_in(insn[3:0]), .data_out(sign_extended_offset)
  );

  control_unit u_ctrl_unit (
    .opcode(insn[15:12]), .reg_dst, .reg_write, .alu_src, .mem_write, .mem_to_reg
  );

  mux_2to1 #(.WIDTH(4)) u_mux_reg_dst (
    .sel(reg_dst), .in0(insn[7:4]), .in1(insn[3:0]), .out(write_register)
  );

  register_file #(.NREGS(16), .DATA_W(DATA_W)) u_reg_file (
    .reset, .clk,
    .read_register_a(insn[11:8]), .read_register_b(insn[7:4]),
    .write_enable(reg_write), .write_register, .write_data,
    .read_data_a, .read_data_b
  );

  mux_2to1 #(.WIDTH(DATA_W)) u_mux_alu_src (
    .sel(alu_src), .in0(read_data_b), .in1(sign_extended_offset), .out(alu_src_b)
  );

  adder #(.WIDTH(DATA_W)) u_alu (
    .src_a(read_data_a), .src_b(alu_src_b), .sum(alu_result), .carry_out(alu_carry_out)
  );

  data_memory #(.WORDS(2**ADDR_W), .DATA_W(DATA_W)) u_data_mem (
    .reset, .clk, .write_enable(mem_write), .write_data(read_data_b),
    .addr_in(alu_result[ADDR_W-1:0]), .data_out(data_mem_out)
  );

  mux_2to1 #(.WIDTH(DATA_W)) u_mux_mem_to_reg (
    .sel(mem_to_reg), .in0(alu_result), .in1(data_mem_out), .out(write_data)
  );

  assign mem_addr  = alu_result[ADDR_W-1:0];
  assign mem_wdata = read_data_b;
endmodule

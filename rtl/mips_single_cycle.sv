// mips_single_cycle: single-cycle processor for a MIPS subset: add, sub,
// and, or, slt (R-type), ori, lw, sw, beq and j. Every instruction is
// fetched, decoded, executed and written back in one clock cycle; the PC,
// the register file and the data memory all update on the rising edge that
// ends the cycle.
//   * The main control decodes op = Instr<31:26> into the datapath controls
//     and a 3-bit ALUop; the local ALU control turns ALUop and
//     func = Instr<5:0> into the 3-bit ALUctr.
//   * RegDst picks Rd or Rt as the register written, ALUSrc picks busB or
//     the extended immediate as the second ALU operand, MemtoReg picks the
//     ALU result or the loaded word for busW, busB feeds the memory's
//     Data In.
//   * nPC_sel = Branch & Zero steers the fetch unit to the branch target.
// The block structure and controls are the document's. The load port for
// the program, the memory sizes and the observation outputs (the register
// write, memory write and ALU result of the current cycle) are this design's
// own. rst is synchronous and active high; load the program while it is high.
module mips_single_cycle
  import mips_pkg::*;
#(
  parameter int IMEM_WORDS = 256,
  parameter int DMEM_WORDS = 256,
  parameter int IAW        = $clog2(IMEM_WORDS)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           imem_we,
  input  logic [IAW-1:0] imem_addr,
  input  logic [31:0]    imem_wdata,
  output logic [31:0]    pc,
  output logic [31:0]    instr,
  output logic           reg_we,
  output logic [4:0]     reg_waddr,
  output logic [31:0]    reg_wdata,
  output logic           mem_we,
  output logic [31:0]    mem_addr,
  output logic [31:0]    mem_wdata,
  output logic [31:0]    alu_result
);
  ctrl_t       ctrl;
  logic [2:0]  alu_ctr;
  logic [4:0]  rs, rt, rd, rw;
  logic [31:0] bus_a, bus_b, bus_w, imm32, alu_b, mem_rdata;
  logic        zero, npc_sel;

  assign rs = instr[25:21];
  assign rt = instr[20:16];
  assign rd = instr[15:11];

  instruction_fetch_unit #(.IMEM_WORDS(IMEM_WORDS)) u_ifu (
    .clk, .rst, .npc_sel, .jump(ctrl.jump),
    .load_we(imem_we), .load_addr(imem_addr), .load_data(imem_wdata),
    .pc, .instr
  );

  main_control u_main_ctrl (.op(instr[31:26]), .ctrl);

  alu_control u_alu_ctrl (.alu_op(ctrl.alu_op), .func(instr[5:0]), .alu_ctr);

  mux_2to1 #(.WIDTH(5)) u_regdst_mux (.sel(ctrl.reg_dst), .in0(rt), .in1(rd), .out(rw));

  mips_regfile u_rf (
    .clk, .rst, .we(ctrl.reg_write), .rw, .ra(rs), .rb(rt),
    .bus_w, .bus_a, .bus_b
  );

  extender u_ext (.imm16(instr[15:0]), .ext_op(ctrl.ext_op), .imm32);

  mux_2to1 #(.WIDTH(32)) u_alusrc_mux (.sel(ctrl.alu_src), .in0(bus_b), .in1(imm32), .out(alu_b));

  alu #(.WIDTH(32)) u_alu (.a(bus_a), .b(alu_b), .alu_ctr, .result(alu_result), .zero);

  mips_data_memory #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .wr_en(mem_we), .adr(alu_result), .data_in(bus_b), .data_out(mem_rdata)
  );

  mux_2to1 #(.WIDTH(32)) u_memtoreg_mux (.sel(ctrl.mem_to_reg), .in0(alu_result), .in1(mem_rdata), .out(bus_w));

  assign npc_sel = ctrl.branch & zero;

  // Observation of this cycle's architectural updates
  assign reg_we    = ctrl.reg_write & ~rst;
  assign reg_waddr = rw;
  assign reg_wdata = bus_w;
  assign mem_we    = ctrl.mem_write & ~rst;
  assign mem_addr  = alu_result;
  assign mem_wdata = bus_b;
endmodule

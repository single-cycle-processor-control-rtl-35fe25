// design_top: the three designs side by side, each with its own ports; they
// share nothing.
//   mips_*  single-cycle MIPS subset processor (32-bit, rising-edge state,
//           synchronous reset, program load port)
//   core_*  16-bit single-cycle core with its built-in program
//           (asynchronous reset, registers and memory written on the
//           falling edge)
//   fa_*    one-bit full adder built from two half adders and an OR gate
//   sq_*    combinational sum of squares 1^2 + ... + x^2
module design_top #(
  parameter int MIPS_IMEM_WORDS = 256,
  parameter int MIPS_DMEM_WORDS = 256,
  parameter int MIPS_IAW        = $clog2(MIPS_IMEM_WORDS)
) (
  input  logic                mips_clk,
  input  logic                mips_rst,
  input  logic                mips_imem_we,
  input  logic [MIPS_IAW-1:0] mips_imem_addr,
  input  logic [31:0]         mips_imem_wdata,
  output logic [31:0]         mips_pc,
  output logic [31:0]         mips_instr,
  output logic                mips_reg_we,
  output logic [4:0]          mips_reg_waddr,
  output logic [31:0]         mips_reg_wdata,
  output logic                mips_mem_we,
  output logic [31:0]         mips_mem_addr,
  output logic [31:0]         mips_mem_wdata,
  output logic [31:0]         mips_alu_result,

  input  logic                core_clk,
  input  logic                core_reset,
  output logic [3:0]          core_pc,
  output logic [15:0]         core_insn,
  output logic                core_reg_write,
  output logic [3:0]          core_write_register,
  output logic [15:0]         core_write_data,
  output logic                core_mem_write,
  output logic [3:0]          core_mem_addr,
  output logic [15:0]         core_mem_wdata,

  input  logic                fa_in1,
  input  logic                fa_in2,
  input  logic                fa_c_in,
  output logic                fa_sum,
  output logic                fa_c_out,

  input  logic signed [31:0]  sq_x,
  output logic [31:0]         sq_result
);
  mips_single_cycle #(.IMEM_WORDS(MIPS_IMEM_WORDS), .DMEM_WORDS(MIPS_DMEM_WORDS)) u_mips (
    .clk(mips_clk), .rst(mips_rst),
    .imem_we(mips_imem_we), .imem_addr(mips_imem_addr), .imem_wdata(mips_imem_wdata),
    .pc(mips_pc), .instr(mips_instr),
    .reg_we(mips_reg_we), .reg_waddr(mips_reg_waddr), .reg_wdata(mips_reg_wdata),
    .mem_we(mips_mem_we), .mem_addr(mips_mem_addr), .mem_wdata(mips_mem_wdata),
    .alu_result(mips_alu_result)
  );

  single_cycle_core u_core (
    .reset(core_reset), .clk(core_clk),
    .pc(core_pc), .insn(core_insn),
    .reg_write(core_reg_write), .write_register(core_write_register),
    .write_data(core_write_data),
    .mem_write(core_mem_write), .mem_addr(core_mem_addr), .mem_wdata(core_mem_wdata)
  );

  full_adder u_fa (.in1(fa_in1), .in2(fa_in2), .c_in(fa_c_in), .sum(fa_sum), .c_out(fa_c_out));

  square_sum #(.WIDTH(32)) u_sq (.x(sq_x), .result(sq_result));
endmodule

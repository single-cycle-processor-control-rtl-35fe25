// instruction_fetch_unit: PC, next-PC logic and instruction memory of the
// single-cycle MIPS processor. Each rising clock edge loads the PC with
//   PC + 4                                  normally,
//   PC + 4 + (sign_ext(imm16) << 2)         when npc_sel (beq and Zero),
//   {PC+4 [31:28], target, 2'b00}           when jump.
// The branch path is two adders in series, as in the document's datapath:
// the first forms PC + 4, the second adds the PC-extended immediate to it.
// The jump target rule and the reset value 0 are this design's choices (the
// first is the MIPS rule). instr is read combinationally from the current PC.
module instruction_fetch_unit #(
  parameter int          IMEM_WORDS = 256,
  parameter logic [31:0] PC_RESET   = 32'h0,
  parameter int          AW         = $clog2(IMEM_WORDS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          npc_sel,
  input  logic          jump,
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,
  input  logic [31:0]   load_data,
  output logic [31:0]   pc,
  output logic [31:0]   instr
);
  logic [31:0] pc_plus4, br_offset, br_target, seq_or_br, next_pc;

  mips_inst_memory #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .load_we, .load_addr, .load_data, .adr(pc), .instr
  );

  always_comb begin
    pc_plus4  = pc + 32'd4;
    br_offset = {{14{instr[15]}}, instr[15:0], 2'b00};  // PC Ext
    br_target = pc_plus4 + br_offset;
  end

  mux_2to1 #(.WIDTH(32)) u_br_mux (
    .sel(npc_sel), .in0(pc_plus4), .in1(br_target), .out(seq_or_br)
  );

  always_comb
    next_pc = jump ? {pc_plus4[31:28], instr[25:0], 2'b00} : seq_or_br;

  always_ff @(posedge clk) begin
    if (rst) pc <= PC_RESET;
    else     pc <= next_pc;
  end
endmodule

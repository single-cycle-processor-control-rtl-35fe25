// mips_pkg: shared types and constants of the single-cycle MIPS subset
// processor. It holds the opcode and function-field encodings of the seven
// instructions the datapath runs, the 3-bit ALUop and ALUctr codes, and the
// bundle of control signals that the main control drives into the datapath.
// The numeric encodings are the MIPS ones; the struct grouping is this
// design's own.
package mips_pkg;

  // Opcodes, Instr<31:26>
  localparam logic [5:0] OP_RTYPE = 6'b00_0000;
  localparam logic [5:0] OP_ORI   = 6'b00_1101;
  localparam logic [5:0] OP_LW    = 6'b10_0011;
  localparam logic [5:0] OP_SW    = 6'b10_1011;
  localparam logic [5:0] OP_BEQ   = 6'b00_0100;
  localparam logic [5:0] OP_J     = 6'b00_0010;

  // R-type function codes, Instr<5:0>
  localparam logic [5:0] FN_ADD = 6'b10_0000;
  localparam logic [5:0] FN_SUB = 6'b10_0010;
  localparam logic [5:0] FN_AND = 6'b10_0100;
  localparam logic [5:0] FN_OR  = 6'b10_0101;
  localparam logic [5:0] FN_SLT = 6'b10_1010;

  // ALUop: what the main control asks of the local ALU decoder
  localparam logic [2:0] ALUOP_ADD   = 3'b000;
  localparam logic [2:0] ALUOP_SUB   = 3'b001;
  localparam logic [2:0] ALUOP_OR    = 3'b010;
  localparam logic [2:0] ALUOP_RTYPE = 3'b100;

  // ALUctr: the operation the ALU performs
  typedef enum logic [2:0] {
    ALU_AND = 3'b000,
    ALU_OR  = 3'b001,
    ALU_ADD = 3'b010,
    ALU_SUB = 3'b110,
    ALU_SLT = 3'b111
  } alu_ctr_e;

  // Control bundle from the main control
  typedef struct packed {
    logic       reg_dst;    // 1: write Rd, 0: write Rt
    logic       alu_src;    // 1: ALU B = extended imm16, 0: busB
    logic       mem_to_reg; // 1: busW = memory data, 0: ALU result
    logic       reg_write;
    logic       mem_write;
    logic       branch;     // beq: take branch when ALU Zero
    logic       jump;
    logic       ext_op;     // 1: sign extend, 0: zero extend
    logic [2:0] alu_op;
  } ctrl_t;

endpackage

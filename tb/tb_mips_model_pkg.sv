// tb_mips_model_pkg: instruction-level reference model and program
// generator for the single-cycle MIPS processor testbenches.
//   gen_program - a preamble that clears the whole data memory with a
//                 store loop (sw / add / beq / j), followed by random
//                 add, sub, and, or, slt, ori, lw, sw, beq, j and
//                 undefined-opcode instructions. Branches and jumps go
//                 forward so execution keeps moving through the body; past
//                 the last word the PC wraps onto the preamble again.
//   mips_model  - executes one instruction per call of step() and returns
//                 what the processor must show during that cycle: PC,
//                 instruction, register write and memory write. It counts
//                 every kind of instruction and every branch outcome.
package tb_mips_model_pkg;

  typedef struct {
    logic [31:0] pc, instr;
    logic        reg_we;
    logic [4:0]  reg_waddr;
    logic [31:0] reg_wdata;
    logic        mem_we;
    logic [31:0] mem_addr, mem_wdata;
  } obs_t;

  typedef enum int {
    K_ADD, K_SUB, K_AND, K_OR, K_SLT, K_ORI, K_LW, K_SW,
    K_BEQ_TAKEN, K_BEQ_NOT, K_J, K_UNDEF, K_WRITE_R0, K_COUNT
  } kind_e;

  function automatic string kind_name(int k);
    case (k)
      K_ADD: return "add";   K_SUB: return "sub";   K_AND: return "and";
      K_OR:  return "or";    K_SLT: return "slt";   K_ORI: return "ori";
      K_LW:  return "lw";    K_SW:  return "sw";    K_BEQ_TAKEN: return "beq taken";
      K_BEQ_NOT: return "beq not taken"; K_J: return "jump";
      K_UNDEF: return "undefined opcode (no-op)"; K_WRITE_R0: return "write to $0 ignored";
      default: return "?";
    endcase
  endfunction

  function automatic logic [31:0] r_type(int rs, int rt, int rd, logic [5:0] fn);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'h0, fn};
  endfunction
  function automatic logic [31:0] i_type(logic [5:0] op, int rs, int rt, logic [15:0] imm);
    return {op, 5'(rs), 5'(rt), imm};
  endfunction

  // Fill prog[0:words-1]; data memory has dwords words.
  function automatic void gen_program(ref logic [31:0] prog[], input int words, input int dwords);
    int idx;
    prog = new[words];
    prog[0] = i_type(6'h0D, 0, 1, 16'd0);              // ori $1,$0,0
    prog[1] = i_type(6'h0D, 0, 2, 16'd4);              // ori $2,$0,4
    prog[2] = i_type(6'h0D, 0, 3, 16'(dwords * 4));    // ori $3,$0,limit
    prog[3] = i_type(6'h2B, 1, 0, 16'd0);              // loop: sw $0,0($1)
    prog[4] = r_type(1, 2, 1, 6'h20);                  // add $1,$1,$2
    prog[5] = i_type(6'h04, 1, 3, 16'd1);              // beq $1,$3,+1
    prog[6] = {6'h02, 26'd3};                          // j loop
    for (idx = 7; idx < words; idx++) begin
      int rs = $urandom % 8, rt = $urandom % 8, rd = $urandom % 8;
      case ($urandom % 11)
        0: prog[idx] = r_type(rs, rt, rd, 6'h20);
        1: prog[idx] = r_type(rs, rt, rd, 6'h22);
        2: prog[idx] = r_type(rs, rt, rd, 6'h24);
        3: prog[idx] = r_type(rs, rt, rd, 6'h25);
        4: prog[idx] = r_type(rs, rt, rd, 6'h2A);
        5: prog[idx] = i_type(6'h0D, rs, rt, 16'($urandom));
        6: prog[idx] = i_type(6'h23, rs, rt, 16'($urandom));
        7: prog[idx] = i_type(6'h2B, rs, rt, 16'($urandom));
        8: prog[idx] = i_type(6'h04, rs, ($urandom % 2) ? rs : rt, 16'($urandom % 6));
        9: prog[idx] = {6'h02, 26'(idx + 1 + ($urandom % 5))};
        default: prog[idx] = {6'h3F, 26'($urandom)};   // not in the subset
      endcase
    end
  endfunction

  class mips_model;
    logic [31:0] imem[];
    logic [31:0] dmem[];
    logic [31:0] regs[32];
    logic [31:0] pc;
    int iw, dw;
    int count[K_COUNT];

    function new(logic [31:0] prog[], int dwords);
      imem = prog;
      iw = prog.size();
      dw = dwords;
      dmem = new[dwords];
      foreach (count[k]) count[k] = 0;
      reset();
    endfunction

    function void reset();
      pc = 0;
      foreach (regs[i]) regs[i] = 0;
    endfunction

    function int dindex(logic [31:0] a);
      logic [31:0] w;
      w = (a >> 2) % 32'(dw);
      return w;
    endfunction

    // Expected observation of the current instruction, then advance state.
    function obs_t step();
      obs_t o;
      logic [31:0] ins, a, b, sx, zx, p4;
      logic [5:0]  op, fn;
      int rs, rt, rd;
      logic [31:0] wi;
      wi = (pc >> 2) % 32'(iw);
      ins = imem[wi];
      op = ins[31:26]; fn = ins[5:0];
      rs = ins[25:21]; rt = ins[20:16]; rd = ins[15:11];
      a = regs[rs]; b = regs[rt];
      sx = {{16{ins[15]}}, ins[15:0]};
      zx = {16'h0, ins[15:0]};
      p4 = pc + 4;
      o.pc = pc; o.instr = ins;
      o.reg_we = 0; o.reg_waddr = 0; o.reg_wdata = 0;
      o.mem_we = 0; o.mem_addr = 0; o.mem_wdata = 0;
      pc = p4;
      case (op)
        6'h00: begin
          o.reg_we = 1; o.reg_waddr = 5'(rd);
          case (fn)
            6'h20: begin o.reg_wdata = a + b; count[K_ADD]++; end
            6'h22: begin o.reg_wdata = a - b; count[K_SUB]++; end
            6'h24: begin o.reg_wdata = a & b; count[K_AND]++; end
            6'h25: begin o.reg_wdata = a | b; count[K_OR]++;  end
            6'h2A: begin o.reg_wdata = ($signed(a) < $signed(b)) ? 1 : 0; count[K_SLT]++; end
            default: $fatal(1, "model: unsupported func");
          endcase
        end
        6'h0D: begin o.reg_we = 1; o.reg_waddr = 5'(rt); o.reg_wdata = a | zx; count[K_ORI]++; end
        6'h23: begin
          o.reg_we = 1; o.reg_waddr = 5'(rt);
          o.reg_wdata = dmem[dindex(a + sx)]; count[K_LW]++;
        end
        6'h2B: begin
          o.mem_we = 1; o.mem_addr = a + sx; o.mem_wdata = b; count[K_SW]++;
          dmem[dindex(a + sx)] = b;
        end
        6'h04: begin
          if (a == b) begin pc = p4 + (sx << 2); count[K_BEQ_TAKEN]++; end
          else count[K_BEQ_NOT]++;
        end
        6'h02: begin pc = {p4[31:28], ins[25:0], 2'b00}; count[K_J]++; end
        default: count[K_UNDEF]++;
      endcase
      if (o.reg_we) begin
        if (o.reg_waddr != 0) regs[o.reg_waddr] = o.reg_wdata;
        else count[K_WRITE_R0]++;
      end
      return o;
    endfunction
  endclass

  // Compare one cycle; returns the number of mismatches.
  function automatic int compare(obs_t got, obs_t exp, bit verbose);
    int bad = 0;
    if (got.pc !== exp.pc || got.instr !== exp.instr) bad++;
    if (got.reg_we !== exp.reg_we) bad++;
    else if (exp.reg_we && (got.reg_waddr !== exp.reg_waddr || got.reg_wdata !== exp.reg_wdata)) bad++;
    if (got.mem_we !== exp.mem_we) bad++;
    else if (exp.mem_we && (got.mem_addr !== exp.mem_addr || got.mem_wdata !== exp.mem_wdata)) bad++;
    if (bad != 0 && verbose)
      $display("MISMATCH pc %h/%h instr %h/%h rw %b %0d %h / %b %0d %h mw %b %h %h / %b %h %h",
               got.pc, exp.pc, got.instr, exp.instr,
               got.reg_we, got.reg_waddr, got.reg_wdata, exp.reg_we, exp.reg_waddr, exp.reg_wdata,
               got.mem_we, got.mem_addr, got.mem_wdata, exp.mem_we, exp.mem_addr, exp.mem_wdata);
    return bad;
  endfunction
endpackage

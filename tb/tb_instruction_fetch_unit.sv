// tb_instruction_fetch_unit: loads random instruction words, releases reset
// and drives random npc_sel/jump each cycle; the PC sequence is predicted
// from the instruction's immediate/target fields (sequential, branch and
// jump) and the fetched word from the loaded contents.
module tb_instruction_fetch_unit;
  localparam int WORDS = 256;
  logic clk = 0, rst, npc_sel, jump, load_we;
  logic [7:0]  load_addr;
  logic [31:0] load_data, pc, instr;
  logic [31:0] model [WORDS];
  logic [31:0] exp_pc;
  int checks = 0, failures = 0;
  int n_seq = 0, n_br = 0, n_j = 0;

  instruction_fetch_unit #(.IMEM_WORDS(WORDS)) dut (
    .clk, .rst, .npc_sel, .jump, .load_we, .load_addr, .load_data, .pc, .instr
  );

  always #5 clk = ~clk;

  initial begin
    rst = 1; npc_sel = 0; jump = 0; load_we = 0; load_addr = 0; load_data = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = 8'(i); load_data = $urandom; model[i] = load_data;
    end
    @(negedge clk); load_we = 0;
    @(posedge clk); #1 rst = 0;
    exp_pc = 0;
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] p4, w;
      @(negedge clk);
      checks += 2;
      if (pc !== exp_pc) begin
        failures++; if (failures < 10) $display("FAIL pc got %h exp %h", pc, exp_pc);
      end
      w = model[exp_pc[9:2]];
      if (instr !== w) begin
        failures++; if (failures < 10) $display("FAIL instr got %h exp %h", instr, w);
      end
      case ($urandom % 4)
        0, 1: begin npc_sel = 0; jump = 0; end
        2:    begin npc_sel = 1; jump = 0; end
        3:    begin npc_sel = 0; jump = 1; end
      endcase
      p4 = exp_pc + 4;
      if (jump)         begin exp_pc = {p4[31:28], w[25:0], 2'b00}; n_j++; end
      else if (npc_sel) begin exp_pc = p4 + {{14{w[15]}}, w[15:0], 2'b00}; n_br++; end
      else              begin exp_pc = p4; n_seq++; end
      @(posedge clk);
    end
    checks++;
    if (n_seq == 0 || n_br == 0 || n_j == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

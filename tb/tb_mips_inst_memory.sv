// tb_mips_inst_memory: fills the memory through the load port with random
// words, then reads every word back by byte address (low two address bits
// and bits above the memory size must be ignored).
module tb_mips_inst_memory;
  localparam int WORDS = 256;
  logic clk = 0, load_we;
  logic [7:0]  load_addr;
  logic [31:0] load_data, adr, instr;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  mips_inst_memory #(.WORDS(WORDS)) dut (.clk, .load_we, .load_addr, .load_data, .adr, .instr);

  always #5 clk = ~clk;

  initial begin
    load_we = 0; load_addr = 0; load_data = 0; adr = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = 8'(i); load_data = $urandom; model[i] = load_data;
    end
    @(negedge clk); load_we = 0;
    for (int i = 0; i < 2000; i++) begin
      int w = $urandom % WORDS;
      adr = {($urandom % 4 == 0) ? 22'($urandom) : 22'd0, 8'(w), 2'($urandom)};
      #1;
      checks++;
      if (instr !== model[w]) begin
        failures++; if (failures < 10) $display("FAIL adr=%h got %h exp %h", adr, instr, model[w]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

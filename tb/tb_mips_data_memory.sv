// tb_mips_data_memory: random stores and loads against a model; a store
// takes effect at the rising edge and is readable right after it.
module tb_mips_data_memory;
  localparam int WORDS = 256;
  logic clk = 0, wr_en;
  logic [31:0] adr, data_in, data_out;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  mips_data_memory #(.WORDS(WORDS)) dut (.clk, .wr_en, .adr, .data_in, .data_out);

  always #5 clk = ~clk;

  initial begin
    wr_en = 0; adr = 0; data_in = 0;
    for (int i = 0; i < WORDS; i++) begin   // fill
      @(negedge clk);
      wr_en = 1; adr = 32'(i) << 2; data_in = $urandom; model[i] = data_in;
    end
    for (int i = 0; i < 3000; i++) begin
      int w;
      @(negedge clk);
      w = $urandom % WORDS;
      wr_en = ($urandom % 2) == 1;
      adr = {22'($urandom), 8'(w), 2'($urandom)};
      data_in = $urandom;
      #1;
      checks++;
      if (data_out !== model[w]) begin
        failures++; if (failures < 10) $display("FAIL rd w=%0d got %h exp %h", w, data_out, model[w]);
      end
      @(posedge clk);
      if (wr_en) model[w] = data_in;
      #1;
      checks++;
      if (data_out !== model[w]) begin
        failures++; if (failures < 10) $display("FAIL after wr w=%0d got %h exp %h", w, data_out, model[w]);
      end
    end
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

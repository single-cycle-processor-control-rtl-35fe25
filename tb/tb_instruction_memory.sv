// tb_instruction_memory: after reset insn_out is a noop; each rising edge
// then registers the word at the address presented before the edge. The
// expected words are the demonstration program, encoded here by hand.
module tb_instruction_memory;
  logic reset, clk = 0;
  logic [3:0]  addr_in;
  logic [15:0] insn_out;
  int checks = 0, failures = 0;
  logic [15:0] prev = 16'h0;
  logic [15:0] prog [16] = '{16'h1010, 16'h1021, 16'h8013, 16'h8124, 16'h3032, 16'h3043,
                             16'h0, 16'h0, 16'h0, 16'h0, 16'h0, 16'h0, 16'h0, 16'h0, 16'h0, 16'h0};

  instruction_memory dut (.reset, .clk, .addr_in, .insn_out);

  always #5 clk = ~clk;

  initial begin
    reset = 1; addr_in = 4'd3;
    @(posedge clk); #1;
    checks++;
    if (insn_out !== 16'h0) begin failures++; $display("FAIL reset output %h", insn_out); end
    @(negedge clk); reset = 0;
    prev = prog[3];                  // registered at the next rising edge
    for (int i = 0; i < 100; i++) begin
      logic [3:0] a;
      @(negedge clk);
      a = (i < 16) ? 4'(i) : 4'($urandom);
      addr_in = a;
      #2;
      checks++;            // output changes only at the edge
      if (insn_out !== prev) begin failures++; $display("FAIL changed before edge"); end
      @(posedge clk); #1;
      checks++;
      if (insn_out !== prog[a]) begin
        failures++; $display("FAIL addr %0d got %h exp %h", a, insn_out, prog[a]);
      end
      prev = prog[a];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

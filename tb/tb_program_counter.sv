// tb_program_counter: asynchronous reset to 0, then random next addresses
// loaded on each rising edge.
module tb_program_counter;
  logic reset, clk = 0;
  logic [3:0] addr_in, addr_out, exp_q;
  int checks = 0, failures = 0;

  program_counter dut (.reset, .clk, .addr_in, .addr_out);

  always #5 clk = ~clk;

  initial begin
    reset = 0; addr_in = 4'hA;
    @(posedge clk); #1;
    #2 reset = 1; #1;           // asynchronous: takes effect without an edge
    checks++;
    if (addr_out !== 4'h0) begin failures++; $display("FAIL async reset"); end
    @(negedge clk); reset = 0;
    exp_q = addr_in;                 // loaded at the next rising edge
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      checks++;
      if (addr_out !== exp_q) begin failures++; $display("FAIL got %h exp %h", addr_out, exp_q); end
      addr_in = 4'($urandom);
      exp_q = addr_in;
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

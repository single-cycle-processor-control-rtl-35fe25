// tb_or_2: exhaustive check of the two-input OR.
module tb_or_2;
  logic a, b, c;
  int checks = 0, failures = 0;

  or_2 dut (.a, .b, .c);

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (c !== (i != 0)) begin
        failures++; $display("FAIL a=%b b=%b", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

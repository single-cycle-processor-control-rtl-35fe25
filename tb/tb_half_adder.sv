// tb_half_adder: exhaustive check, {carry, result} = x + y.
module tb_half_adder;
  logic x, y, carry, result;
  int checks = 0, failures = 0;

  half_adder dut (.x, .y, .carry, .result);

  initial begin
    for (int i = 0; i < 4; i++) begin
      {x, y} = 2'(i);
      #1;
      checks++;
      if ({carry, result} !== 2'(x + y)) begin
        failures++; $display("FAIL x=%b y=%b", x, y);
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

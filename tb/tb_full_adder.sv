// tb_full_adder: exhaustive check, {c_out, sum} = in1 + in2 + c_in.
module tb_full_adder;
  logic in1, in2, c_in, sum, c_out;
  int checks = 0, failures = 0;

  full_adder dut (.in1, .in2, .c_in, .sum, .c_out);

  initial begin
    for (int i = 0; i < 8; i++) begin
      {in1, in2, c_in} = 3'(i);
      #1;
      checks++;
      if ({c_out, sum} !== 2'(in1 + in2 + c_in)) begin
        failures++; $display("FAIL %b%b%b -> %b%b", in1, in2, c_in, c_out, sum);
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

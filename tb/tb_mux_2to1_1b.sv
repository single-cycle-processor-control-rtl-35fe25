// tb_mux_2to1_1b: exhaustive check of the one-bit multiplexer.
module tb_mux_2to1_1b;
  logic sel, in0, in1, out;
  int checks = 0, failures = 0;

  mux_2to1_1b dut (.sel, .in0, .in1, .out);

  initial begin
    for (int i = 0; i < 8; i++) begin
      {sel, in1, in0} = 3'(i);
      #1;
      checks++;
      if (out !== (sel ? in1 : in0)) begin
        failures++;
        $display("FAIL sel=%b in0=%b in1=%b out=%b", sel, in0, in1, out);
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

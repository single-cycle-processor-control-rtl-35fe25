// tb_adder: the 16-bit (ALU) and 4-bit (next PC) adders, exhaustive at 4
// bits and random at 16 bits, sum and carry out.
module tb_adder;
  logic [15:0] a16, b16, s16;
  logic [3:0]  a4, b4, s4;
  logic        c16, c4;
  int checks = 0, failures = 0;

  adder              dut16 (.src_a(a16), .src_b(b16), .sum(s16), .carry_out(c16));
  adder #(.WIDTH(4)) dut4  (.src_a(a4),  .src_b(b4),  .sum(s4),  .carry_out(c4));

  initial begin
    for (int i = 0; i < 256; i++) begin
      {a4, b4} = 8'(i);
      a16 = (i < 4) ? 16'hFFFF : 16'($urandom);
      b16 = 16'($urandom);
      #1;
      checks += 2;
      if ({c4, s4} !== 5'(a4 + b4)) begin failures++; $display("FAIL 4b %h+%h", a4, b4); end
      if ({c16, s16} !== 17'(a16 + b16)) begin failures++; $display("FAIL 16b %h+%h", a16, b16); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

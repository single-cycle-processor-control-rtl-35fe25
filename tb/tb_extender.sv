// tb_extender: zero and sign extension of random and corner immediates.
module tb_extender;
  logic [15:0] imm16;
  logic        ext_op;
  logic [31:0] imm32;
  int checks = 0, failures = 0;

  extender dut (.imm16, .ext_op, .imm32);

  initial begin
    for (int i = 0; i < 1000; i++) begin
      logic [31:0] e;
      imm16  = (i < 4) ? 16'(i * 16'h5555) : 16'($urandom);
      if (i == 1) imm16 = 16'h8000;
      ext_op = i[0] ^ i[3];
      #1;
      e = ext_op ? 32'(signed'(imm16)) : {16'h0, imm16};
      checks++;
      if (imm32 !== e) begin
        failures++;
        $display("FAIL imm=%h ext=%b got %h exp %h", imm16, ext_op, imm32, e);
      end
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

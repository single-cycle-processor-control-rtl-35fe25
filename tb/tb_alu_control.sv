// tb_alu_control: checks the ALU decoder against the ALU operation table:
// the four ALUop values of the I-type/branch instructions for every func,
// and ALUop = R-type with the five function codes (and func<5:4> varied,
// which must not matter).
module tb_alu_control;
  logic [2:0] alu_op, alu_ctr;
  logic [5:0] func;
  int checks = 0, failures = 0;

  alu_control dut (.alu_op, .func, .alu_ctr);

  task automatic check(logic [2:0] exp);
    #1;
    checks++;
    if (alu_ctr !== exp) begin
      failures++;
      $display("FAIL aluop=%b func=%b got %b exp %b", alu_op, func, alu_ctr, exp);
    end
  endtask

  initial begin
    for (int f = 0; f < 64; f++) begin
      func = 6'(f);
      alu_op = 3'b000; check(3'b010); // lw/sw: add
      alu_op = 3'b001; check(3'b110); // beq: subtract
      alu_op = 3'b010; check(3'b001); // ori: or
    end
    alu_op = 3'b100;
    for (int hi = 0; hi < 4; hi++) begin
      func = {2'(hi), 4'b0000}; check(3'b010); // add
      func = {2'(hi), 4'b0010}; check(3'b110); // sub
      func = {2'(hi), 4'b0100}; check(3'b000); // and
      func = {2'(hi), 4'b0101}; check(3'b001); // or
      func = {2'(hi), 4'b1010}; check(3'b111); // slt
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

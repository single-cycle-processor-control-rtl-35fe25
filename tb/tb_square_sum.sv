// tb_square_sum: the published simulation (x = 1..5 gives 1, 5, 14, 30, 55),
// x <= 0, and a sweep whose expected value is accumulated by a loop here.
module tb_square_sum;
  logic signed [31:0] x;
  logic [31:0] result;
  int checks = 0, failures = 0;

  square_sum #(.WIDTH(32)) dut (.x, .result);

  task automatic check(int xv, logic [31:0] exp);
    x = xv;
    #1;
    checks++;
    if (result !== exp) begin
      failures++; $display("FAIL x=%0d got %0d exp %0d", xv, result, exp);
    end
  endtask

  initial begin
    logic [31:0] acc;
    int pub[5] = '{1, 5, 14, 30, 55};
    for (int i = 1; i <= 5; i++) check(i, pub[i-1]);
    check(0, 0);
    check(-7, 0);
    check(32'sh8000_0000, 0);
    acc = 0;
    for (int i = 1; i <= 3000; i++) begin
      acc += 32'(i * i);
      check(i, acc);
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

// tb_sign_extend_4to16: all 16 offsets.
module tb_sign_extend_4to16;
  logic [3:0]  data_in;
  logic [15:0] data_out;
  int checks = 0, failures = 0;

  sign_extend_4to16 dut (.data_in, .data_out);

  initial begin
    for (int i = 0; i < 16; i++) begin
      int v;
      data_in = 4'(i);
      #1;
      v = (i >= 8) ? i - 16 : i;
      checks++;
      if (data_out !== 16'(v)) begin failures++; $display("FAIL %h -> %h", data_in, data_out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

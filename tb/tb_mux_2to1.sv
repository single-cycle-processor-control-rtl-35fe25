// tb_mux_2to1: random data through the 16-bit and 4-bit multiplexers.
module tb_mux_2to1;
  logic        sel;
  logic [15:0] a16, b16, o16;
  logic [3:0]  a4, b4, o4;
  int checks = 0, failures = 0;

  mux_2to1              dut16 (.sel, .in0(a16), .in1(b16), .out(o16));
  mux_2to1 #(.WIDTH(4)) dut4  (.sel, .in0(a4),  .in1(b4),  .out(o4));

  initial begin
    for (int i = 0; i < 500; i++) begin
      sel = i[0];
      a16 = 16'($urandom); b16 = 16'($urandom);
      a4 = 4'($urandom);   b4 = 4'($urandom);
      #1;
      checks += 2;
      if (o16 !== (sel ? b16 : a16)) begin
        failures++; $display("FAIL 16b sel=%b out=%h", sel, o16);
      end
      if (o4 !== (sel ? b4 : a4)) begin
        failures++; $display("FAIL 4b sel=%b out=%h", sel, o4);
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

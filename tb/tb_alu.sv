// tb_alu: random and corner operands through all five ALU operations;
// results and the zero flag are compared with a reference computed here.
module tb_alu;
  logic [31:0] a, b, result;
  logic [2:0]  alu_ctr;
  logic        zero;
  int checks = 0, failures = 0;
  int n_zero = 0;

  alu #(.WIDTH(32)) dut (.a, .b, .alu_ctr, .result, .zero);

  function automatic logic [31:0] ref_alu(logic [2:0] c, logic [31:0] x, logic [31:0] y);
    case (c)
      3'b000: return x & y;
      3'b001: return x | y;
      3'b010: return x + y;
      3'b110: return x - y;
      3'b111: return (signed'(x) < signed'(y)) ? 32'd1 : 32'd0;
      default: return 32'd0;
    endcase
  endfunction

  initial begin
    logic [2:0] ops[5] = '{3'b000, 3'b001, 3'b010, 3'b110, 3'b111};
    logic [31:0] corners[6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h1234_5678};
    for (int i = 0; i < 2000; i++) begin
      if (i < 36) begin a = corners[i % 6]; b = corners[i / 6]; end
      else begin
        a = $urandom; b = (i % 7 == 0) ? a : $urandom;
      end
      foreach (ops[k]) begin
        logic [31:0] e;
        alu_ctr = ops[k];
        #1;
        e = ref_alu(alu_ctr, a, b);
        checks++;
        if (result !== e || zero !== (e == 0)) begin
          failures++;
          if (failures < 10) $display("FAIL ctr=%b a=%h b=%h got %h/%b exp %h", alu_ctr, a, b, result, zero, e);
        end
        if (e == 0) n_zero++;
      end
    end
    checks++;
    if (n_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

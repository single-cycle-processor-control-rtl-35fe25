// tb_control_unit: all 16 opcodes against the control table.
module tb_control_unit;
  logic [3:0] opcode;
  logic reg_dst, reg_write, alu_src, mem_write, mem_to_reg;
  int checks = 0, failures = 0;

  control_unit dut (.opcode, .reg_dst, .reg_write, .alu_src, .mem_write, .mem_to_reg);

  initial begin
    for (int i = 0; i < 16; i++) begin
      logic [4:0] e;
      opcode = 4'(i);
      #1;
      case (i)       // reg_dst reg_write alu_src mem_write mem_to_reg
        1:       e = 5'b0_1_1_0_1;  // load
        3:       e = 5'b0_0_1_1_0;  // store
        8:       e = 5'b1_1_0_0_0;  // add
        default: e = 5'b0_0_0_0_0;  // noop
      endcase
      checks++;
      if ({reg_dst, reg_write, alu_src, mem_write, mem_to_reg} !== e) begin
        failures++; $display("FAIL op=%h", opcode);
      end
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

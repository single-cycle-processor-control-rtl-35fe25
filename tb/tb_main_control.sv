// tb_main_control: applies all 64 opcodes to the main control and compares
// every output against the control truth table (don't-care entries are not
// checked); opcodes outside the subset must give all-zero controls.
module tb_main_control;
  import mips_pkg::*;
  logic [5:0] op;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  main_control dut (.op, .ctrl);

  // expected value per column: 0/1, or 2 for don't care
  typedef int row_t[11];
  function automatic row_t expect_of(logic [5:0] o);
    //           RegDst ALUSrc MemtoReg RegWr MemWr Branch Jump ExtOp op2 op1 op0
    case (o)
      6'b000000: return '{1, 0, 0, 1, 0, 0, 0, 2, 1, 0, 0};
      6'b001101: return '{0, 1, 0, 1, 0, 0, 0, 0, 0, 1, 0};
      6'b100011: return '{0, 1, 1, 1, 0, 0, 0, 1, 0, 0, 0};
      6'b101011: return '{2, 1, 2, 0, 1, 0, 0, 1, 0, 0, 0};
      6'b000100: return '{2, 0, 2, 0, 0, 1, 0, 2, 0, 0, 1};
      6'b000010: return '{2, 2, 2, 0, 0, 0, 1, 2, 2, 2, 2};
      default:   return '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 64; i++) begin
      row_t e;
      logic [10:0] got;
      op = 6'(i);
      #1;
      e = expect_of(op);
      got = {ctrl.reg_dst, ctrl.alu_src, ctrl.mem_to_reg, ctrl.reg_write, ctrl.mem_write,
             ctrl.branch, ctrl.jump, ctrl.ext_op, ctrl.alu_op};
      for (int k = 0; k < 11; k++) begin
        if (e[k] != 2) begin
          checks++;
          if (got[10-k] != e[k][0]) begin
            failures++;
            $display("FAIL op=%b signal %0d got %b exp %0d", op, k, got[10-k], e[k]);
          end
        end
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

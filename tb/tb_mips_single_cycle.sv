// tb_mips_single_cycle: loads a generated program (data-memory clearing
// loop, then random instructions), runs it and compares, every cycle, the
// PC, instruction, register write and memory write with the reference
// model. Each instruction must complete in exactly one cycle: the model
// advances one instruction per clock. Every instruction kind and both
// branch outcomes must occur.
module tb_mips_single_cycle;
  import tb_mips_model_pkg::*;
  localparam int IW = 256, DW = 256, CYCLES = 6000;
  logic clk = 0, rst, imem_we;
  logic [7:0]  imem_addr;
  logic [31:0] imem_wdata;
  obs_t got;
  logic [31:0] alu_result;
  logic [31:0] prog[];
  mips_model m;
  int checks = 0, failures = 0;

  mips_single_cycle #(.IMEM_WORDS(IW), .DMEM_WORDS(DW)) dut (
    .clk, .rst, .imem_we, .imem_addr, .imem_wdata,
    .pc(got.pc), .instr(got.instr),
    .reg_we(got.reg_we), .reg_waddr(got.reg_waddr), .reg_wdata(got.reg_wdata),
    .mem_we(got.mem_we), .mem_addr(got.mem_addr), .mem_wdata(got.mem_wdata),
    .alu_result
  );

  always #5 clk = ~clk;

  initial begin
    rst = 1; imem_we = 0; imem_addr = 0; imem_wdata = 0;
    gen_program(prog, IW, DW);
    m = new(prog, DW);
    for (int i = 0; i < IW; i++) begin
      @(negedge clk);
      imem_we = 1; imem_addr = 8'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 0;
    @(posedge clk); #1 rst = 0;
    for (int c = 0; c < CYCLES; c++) begin
      obs_t exp;
      @(negedge clk);
      exp = m.step();
      checks++;
      if (compare(got, exp, failures < 10) != 0) failures++;
    end
    for (int k = 0; k < K_COUNT; k++) begin
      $display("  %-26s %0d", kind_name(k), m.count[k]);
      checks++;
      if (m.count[k] == 0) begin failures++; $display("FAIL never happened: %s", kind_name(k)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + IW + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

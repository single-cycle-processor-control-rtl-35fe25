// tb_design_top: end-to-end test of the whole design at its default sizes.
//   MIPS processor: loads a generated 256-word program (data-memory clearing
//     loop, then random add/sub/and/or/slt/ori/lw/sw/beq/j and undefined
//     opcodes) and checks every cycle against the reference model; counts
//     each instruction kind, taken and untaken branches, jumps and ignored
//     writes to $0, and fails if any never happened.
//   16-bit core: runs the built-in program and checks every cycle against
//     its model; counts loads, adds, stores, noops and PC wrap-arounds.
//   Full adder: all eight input combinations.
//   Sum of squares: x = 1..5 (1, 5, 14, 30, 55), x <= 0 and a sweep.
// The two processors run concurrently on their own clocks.
module tb_design_top;
  import tb_mips_model_pkg::*;
  import tb_sc_core_model_pkg::*;
  localparam int IW = 256, DW = 256, CYCLES = 8000;

  logic mips_clk = 0, mips_rst, mips_imem_we;
  logic [7:0]  mips_imem_addr;
  logic [31:0] mips_imem_wdata, mips_alu_result;
  obs_t got;
  logic core_clk = 0, core_reset;
  logic [3:0]  core_pc;
  logic [15:0] core_insn;
  core_obs_t   cgot;
  logic fa_in1, fa_in2, fa_c_in, fa_sum, fa_c_out;
  logic signed [31:0] sq_x;
  logic [31:0] sq_result;

  int checks = 0, failures = 0;
  bit mips_done = 0, core_done = 0, comb_done = 0;

  design_top dut (
    .mips_clk, .mips_rst, .mips_imem_we, .mips_imem_addr, .mips_imem_wdata,
    .mips_pc(got.pc), .mips_instr(got.instr),
    .mips_reg_we(got.reg_we), .mips_reg_waddr(got.reg_waddr), .mips_reg_wdata(got.reg_wdata),
    .mips_mem_we(got.mem_we), .mips_mem_addr(got.mem_addr), .mips_mem_wdata(got.mem_wdata),
    .mips_alu_result,
    .core_clk, .core_reset, .core_pc, .core_insn,
    .core_reg_write(cgot.reg_write), .core_write_register(cgot.write_register),
    .core_write_data(cgot.write_data), .core_mem_write(cgot.mem_write),
    .core_mem_addr(cgot.mem_addr), .core_mem_wdata(cgot.mem_wdata),
    .fa_in1, .fa_in2, .fa_c_in, .fa_sum, .fa_c_out,
    .sq_x, .sq_result
  );

  always #5   mips_clk = ~mips_clk;
  always #100 core_clk = ~core_clk;

  // ---------------- MIPS processor ----------------
  initial begin
    logic [31:0] prog[];
    mips_model m;
    mips_rst = 1; mips_imem_we = 0; mips_imem_addr = 0; mips_imem_wdata = 0;
    gen_program(prog, IW, DW);
    m = new(prog, DW);
    for (int i = 0; i < IW; i++) begin
      @(negedge mips_clk);
      mips_imem_we = 1; mips_imem_addr = 8'(i); mips_imem_wdata = prog[i];
    end
    @(negedge mips_clk); mips_imem_we = 0;
    @(posedge mips_clk); #1 mips_rst = 0;
    for (int c = 0; c < CYCLES; c++) begin
      obs_t exp;
      @(negedge mips_clk);
      exp = m.step();
      checks++;
      if (compare(got, exp, failures < 10) != 0) failures++;
    end
    for (int k = 0; k < K_COUNT; k++) begin
      $display("  mips %-26s %0d", kind_name(k), m.count[k]);
      checks++;
      if (m.count[k] == 0) begin failures++; $display("FAIL never happened: %s", kind_name(k)); end
    end
    mips_done = 1;
  end

  // ---------------- 16-bit core ----------------
  initial begin
    core_model cm;
    logic [3:0] exp_pc;
    logic [15:0] exp_insn;
    int n_wrap = 0;
    cm = new();
    core_reset = 1;
    #285 core_reset = 0;
    @(posedge core_clk);
    exp_pc = 1; exp_insn = cm.prog[0];
    for (int c = 0; c < 40; c++) begin
      core_obs_t e;
      #50;
      e = cm.exec(exp_insn);
      checks += 2;
      if (core_pc !== exp_pc || core_insn !== exp_insn) begin
        failures++; $display("FAIL core cycle %0d pc %0d/%0d insn %h/%h", c, core_pc, exp_pc, core_insn, exp_insn);
      end
      if (core_compare(cgot, e, failures < 10) != 0) failures++;
      @(posedge core_clk);
      exp_insn = cm.prog[exp_pc];
      if (exp_pc == 4'hF) n_wrap++;
      exp_pc = exp_pc + 1;
    end
    $display("  core load %0d add %0d store %0d noop %0d pc wrap %0d",
             cm.n_load, cm.n_add, cm.n_store, cm.n_noop, n_wrap);
    checks++;
    if (cm.n_load == 0 || cm.n_add == 0 || cm.n_store == 0 || cm.n_noop == 0 || n_wrap == 0) failures++;
    core_done = 1;
  end

  // ---------------- combinational examples ----------------
  initial begin
    int pub[5] = '{1, 5, 14, 30, 55};
    logic [31:0] acc;
    for (int i = 0; i < 8; i++) begin
      {fa_in1, fa_in2, fa_c_in} = 3'(i);
      #1;
      checks++;
      if ({fa_c_out, fa_sum} !== 2'(fa_in1 + fa_in2 + fa_c_in)) begin
        failures++; $display("FAIL full adder %b", 3'(i));
      end
    end
    for (int i = 1; i <= 5; i++) begin
      sq_x = i; #1;
      checks++;
      if (sq_result !== 32'(pub[i-1])) begin failures++; $display("FAIL square_sum(%0d)=%0d", i, sq_result); end
    end
    sq_x = -3; #1;
    checks++;
    if (sq_result !== 0) begin failures++; $display("FAIL square_sum(-3)"); end
    acc = 0;
    for (int i = 1; i <= 1000; i++) begin
      acc += 32'(i * i);
      sq_x = i; #1;
      checks++;
      if (sq_result !== acc) begin failures++; $display("FAIL square_sum(%0d)", i); end
    end
    comb_done = 1;
  end

  initial begin
    wait (mips_done && core_done && comb_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + IW + 1000) @(posedge mips_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

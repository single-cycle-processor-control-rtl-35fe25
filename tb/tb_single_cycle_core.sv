// tb_single_cycle_core: resets the 16-bit core, runs its built-in program
// twice round the 16-word instruction memory (200 ns clock, as in the
// original test setup) and checks every cycle: the PC steps by one per
// cycle, the instruction fetched at PC k executes in the cycle after, and
// its register or memory write matches the reference model. At the end
// the last values stored to words 2 and 3 must be 5 and 13.
module tb_single_cycle_core;
  import tb_sc_core_model_pkg::*;
  logic reset, clk = 0;
  logic [3:0]  pc;
  logic [15:0] insn;
  core_obs_t   got;
  core_model   m;
  int checks = 0, failures = 0, n_wrap = 0;
  logic [15:0] seen [16] = '{default: 16'h0};  // last value stored per word

  single_cycle_core dut (
    .reset, .clk, .pc, .insn,
    .reg_write(got.reg_write), .write_register(got.write_register), .write_data(got.write_data),
    .mem_write(got.mem_write), .mem_addr(got.mem_addr), .mem_wdata(got.mem_wdata)
  );

  always #100 clk = ~clk;

  initial begin
    logic [3:0] exp_pc;
    logic [15:0] exp_insn;
    m = new();
    reset = 1;
    #285 reset = 0;
    @(posedge clk);
    exp_pc = 1; exp_insn = m.prog[0];
    for (int c = 0; c < 40; c++) begin
      core_obs_t e;
      #50;                                  // high phase, before the falling edge
      e = m.exec(exp_insn);
      checks += 2;
      if (pc !== exp_pc || insn !== exp_insn) begin
        failures++; $display("FAIL cycle %0d pc %0d/%0d insn %h/%h", c, pc, exp_pc, insn, exp_insn);
      end
      if (core_compare(got, e, failures < 10) != 0) failures++;
      if (got.mem_write) seen[got.mem_addr] = got.mem_wdata;
      @(posedge clk);
      exp_insn = m.prog[exp_pc];
      if (exp_pc == 4'hF) n_wrap++;
      exp_pc = exp_pc + 1;
    end
    checks += 2;
    if (seen[2] !== 16'd5)  begin failures++; $display("FAIL DM[2]=%0d", seen[2]); end
    if (seen[3] !== 16'd13) begin failures++; $display("FAIL DM[3]=%0d", seen[3]); end
    $display("  load %0d add %0d store %0d noop %0d pc wrap %0d", m.n_load, m.n_add, m.n_store, m.n_noop, n_wrap);
    checks++;
    if (m.n_load == 0 || m.n_add == 0 || m.n_store == 0 || m.n_noop == 0 || n_wrap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

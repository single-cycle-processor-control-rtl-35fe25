// tb_mips_regfile: random writes and reads against a model array; checks
// reset clearing, the write landing at the rising edge, register 0 staying
// 0 and both read ports.
module tb_mips_regfile;
  logic clk = 0, rst, we;
  logic [4:0] rw, ra, rb;
  logic [31:0] bus_w, bus_a, bus_b;
  logic [31:0] model [32];
  int checks = 0, failures = 0;
  int n_zero_writes = 0;

  mips_regfile dut (.clk, .rst, .we, .rw, .ra, .rb, .bus_w, .bus_a, .bus_b);

  always #5 clk = ~clk;

  task automatic check_reads();
    checks += 2;
    if (bus_a !== model[ra]) begin
      failures++; if (failures < 10) $display("FAIL A r%0d got %h exp %h", ra, bus_a, model[ra]);
    end
    if (bus_b !== model[rb]) begin
      failures++; if (failures < 10) $display("FAIL B r%0d got %h exp %h", rb, bus_b, model[rb]);
    end
  endtask

  initial begin
    rst = 1; we = 0; rw = 0; ra = 0; rb = 0; bus_w = 0;
    foreach (model[i]) model[i] = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 32; i++) begin
      ra = 5'(i); rb = 5'(31 - i); #1 check_reads();
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = ($urandom % 3) != 0;
      rw = 5'($urandom); ra = 5'($urandom); rb = (i % 5 == 0) ? rw : 5'($urandom);
      bus_w = $urandom;
      #1 check_reads();            // before the edge: old contents
      @(posedge clk);
      if (we && rw != 0) model[rw] = bus_w;
      if (we && rw == 0) n_zero_writes++;
      #1 check_reads();            // after the edge: new contents
    end
    // reset clears everything
    @(negedge clk); we = 0; rst = 1;
    @(posedge clk); #1 rst = 0;
    foreach (model[i]) model[i] = 0;
    for (int i = 0; i < 32; i++) begin
      ra = 5'(i); rb = 5'(i); #1 check_reads();
    end
    checks++;
    if (n_zero_writes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

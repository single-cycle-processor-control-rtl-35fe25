// tb_register_file: writes land on the falling edge (not before), register
// 0 stays 0, reset clears asynchronously; random traffic against a model.
module tb_register_file;
  logic reset, clk = 0, write_enable;
  logic [3:0] ra, rb, wr;
  logic [15:0] wd, da, db;
  logic [15:0] model [16];
  int checks = 0, failures = 0;

  register_file dut (.reset, .clk, .read_register_a(ra), .read_register_b(rb),
                     .write_enable, .write_register(wr), .write_data(wd),
                     .read_data_a(da), .read_data_b(db));

  always #5 clk = ~clk;

  task automatic check_reads();
    checks += 2;
    if (da !== model[ra]) begin failures++; if (failures < 10) $display("FAIL A r%0d %h/%h", ra, da, model[ra]); end
    if (db !== model[rb]) begin failures++; if (failures < 10) $display("FAIL B r%0d %h/%h", rb, db, model[rb]); end
  endtask

  initial begin
    reset = 1; write_enable = 0; ra = 0; rb = 0; wr = 0; wd = 0;
    foreach (model[i]) model[i] = 0;
    #12 reset = 0;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk); #1;
      write_enable = ($urandom % 3) != 0;
      wr = 4'($urandom); wd = 16'($urandom);
      ra = wr; rb = 4'($urandom);
      #1 check_reads();              // high phase: old value still read
      @(negedge clk);
      if (write_enable && wr != 0) model[wr] = wd;
      #1 check_reads();              // after the falling edge: new value
    end
    // asynchronous reset, between edges
    @(posedge clk); #2 write_enable = 0; reset = 1; #1;
    foreach (model[i]) model[i] = 0;
    for (int i = 0; i < 16; i++) begin ra = 4'(i); rb = 4'(15 - i); #1 check_reads(); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

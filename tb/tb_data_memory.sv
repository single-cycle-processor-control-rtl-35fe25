// tb_data_memory: reset contents (5, 8, then zeros), writes on the falling
// edge only, combinational read; random traffic against a model.
module tb_data_memory;
  logic reset, clk = 0, write_enable;
  logic [3:0]  addr_in;
  logic [15:0] write_data, data_out;
  logic [15:0] model [16];
  int checks = 0, failures = 0;

  data_memory dut (.reset, .clk, .write_enable, .write_data, .addr_in, .data_out);

  always #5 clk = ~clk;

  task automatic check_rd();
    checks++;
    if (data_out !== model[addr_in]) begin
      failures++; if (failures < 10) $display("FAIL [%0d] got %h exp %h", addr_in, data_out, model[addr_in]);
    end
  endtask

  initial begin
    reset = 0; write_enable = 0; addr_in = 0; write_data = 0;
    #1 reset = 1;
    foreach (model[i]) model[i] = 0;
    model[0] = 16'h5; model[1] = 16'h8;
    #2;
    for (int i = 0; i < 16; i++) begin addr_in = 4'(i); #1 check_rd(); end
    #10 reset = 0;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk); #1;
      write_enable = ($urandom % 2) == 1;
      addr_in = 4'($urandom); write_data = 16'($urandom);
      #1 check_rd();
      @(negedge clk);
      if (write_enable) model[addr_in] = write_data;
      #1 check_rd();
    end
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

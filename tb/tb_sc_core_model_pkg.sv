// tb_sc_core_model_pkg: instruction-level reference model of the 16-bit
// single-cycle core running its built-in program. The program words are
// written out here by hand (opcode, rs, rt, rd-or-offset nibbles).
package tb_sc_core_model_pkg;
  typedef struct {
    logic        reg_write;
    logic [3:0]  write_register;
    logic [15:0] write_data;
    logic        mem_write;
    logic [3:0]  mem_addr;
    logic [15:0] mem_wdata;
  } core_obs_t;

  class core_model;
    logic [15:0] prog[16] = '{16'h1010, 16'h1021, 16'h8013, 16'h8124, 16'h3032, 16'h3043,
                              16'h0, 16'h0, 16'h0, 16'h0, 16'h0, 16'h0, 16'h0, 16'h0, 16'h0, 16'h0};
    logic [15:0] regs[16];
    logic [15:0] dmem[16];
    int n_load, n_add, n_store, n_noop;

    function new();
      foreach (regs[i]) regs[i] = 0;
      foreach (dmem[i]) dmem[i] = 0;
      dmem[0] = 16'h5; dmem[1] = 16'h8;
      n_load = 0; n_add = 0; n_store = 0; n_noop = 0;
    endfunction

    // Execute instruction word ins; return what the core shows meanwhile.
    function core_obs_t exec(logic [15:0] ins);
      core_obs_t o;
      logic [15:0] a, b, off, sum;
      a = regs[ins[11:8]]; b = regs[ins[7:4]];
      off = {{12{ins[3]}}, ins[3:0]};
      o = '{default: '0};
      case (ins[15:12])
        4'h1: begin
          sum = a + off;
          o.reg_write = 1; o.write_register = ins[7:4]; o.write_data = dmem[sum[3:0]];
          n_load++;
        end
        4'h3: begin
          sum = a + off;
          o.mem_write = 1; o.mem_addr = sum[3:0]; o.mem_wdata = b;
          dmem[sum[3:0]] = b;
          n_store++;
        end
        4'h8: begin
          o.reg_write = 1; o.write_register = ins[3:0]; o.write_data = a + b;
          n_add++;
        end
        default: n_noop++;
      endcase
      if (o.reg_write && o.write_register != 0) regs[o.write_register] = o.write_data;
      return o;
    endfunction
  endclass

  function automatic int core_compare(core_obs_t g, core_obs_t e, bit verbose);
    int bad = 0;
    if (g.reg_write !== e.reg_write) bad++;
    else if (e.reg_write && (g.write_register !== e.write_register || g.write_data !== e.write_data)) bad++;
    if (g.mem_write !== e.mem_write) bad++;
    else if (e.mem_write && (g.mem_addr !== e.mem_addr || g.mem_wdata !== e.mem_wdata)) bad++;
    if (bad != 0 && verbose)
      $display("MISMATCH core rw %b %0d %h / %b %0d %h  mw %b %0d %h / %b %0d %h",
               g.reg_write, g.write_register, g.write_data, e.reg_write, e.write_register, e.write_data,
               g.mem_write, g.mem_addr, g.mem_wdata, e.mem_write, e.mem_addr, e.mem_wdata);
    return bad;
  endfunction
endpackage

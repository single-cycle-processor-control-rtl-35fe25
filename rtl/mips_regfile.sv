// mips_regfile: the "32 32-bit registers" of the single-cycle MIPS datapath.
// Ports Ra and Rb read busA and busB combinationally; when RegWr is high the
// word on busW is written to register Rw at the rising clock edge, so the
// write of one instruction lands at the end of its cycle. Register 0 always
// reads 0 and ignores writes. rst (synchronous, active high) clears every
// register. Register count and width are the document's; the clock edge,
// reset and the hard-wired zero register are this design's choices (the
// zero register is the MIPS rule).
module mips_regfile #(
  parameter int WIDTH = 32,
  parameter int NREGS = 32,
  parameter int AW    = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             we,
  input  logic [AW-1:0]    rw,
  input  logic [AW-1:0]    ra,
  input  logic [AW-1:0]    rb,
  input  logic [WIDTH-1:0] bus_w,
  output logic [WIDTH-1:0] bus_a,
  output logic [WIDTH-1:0] bus_b
);
  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && rw != '0) begin
      regs[rw] <= bus_w;
    end
  end

  always_comb begin
    bus_a = (ra == '0) ? '0 : regs[ra];
    bus_b = (rb == '0) ? '0 : regs[rb];
  end
endmodule

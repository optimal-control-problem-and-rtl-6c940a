// rot_regfile: rotating register file (RR) attached to one PLA function unit.
//
// Each FU writes only into its own RR; any FU within ring reach reads it.
// Registers are addressed logically: physical = (logical + rrb) mod DEPTH,
// where rrb, the rotating register base, is shared by the whole PLA and is
// decremented by the loop controller at the end of every kernel pass of the
// modulo schedule. A value written as register r is therefore read as r+1
// in the next kernel pass, r+2 in the one after, and so on, which gives each
// loop iteration its own copy of a variable without explicit moves. This is
// what replaces the fixed-lifetime shift register files of the
// single-function loop accelerator.
//
// Interface: one write port, NRD combinational read ports. A write is seen
// by reads from the next cycle on. The depth, the read-port count and the
// reset to zero are choices of this implementation. DEPTH must be a power
// of two so the modulo is a truncation.
module rot_regfile #(
  parameter int W     = 32,
  parameter int DEPTH = 8,
  parameter int NRD   = 10,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [AW-1:0]        rrb,
  input  logic                 we,
  input  logic [AW-1:0]        waddr,
  input  logic [W-1:0]         wdata,
  input  logic [NRD-1:0][AW-1:0] raddr,
  output logic [NRD-1:0][W-1:0]  rdata
);
  logic [W-1:0] regs [DEPTH];

  initial assert (DEPTH == (1 << AW)) else $error("rot_regfile: DEPTH must be a power of two");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) regs[i] <= '0;
    end else if (we) begin
      regs[AW'(waddr + rrb)] <= wdata;
    end
  end

  always_comb begin
    for (int p = 0; p < NRD; p++) rdata[p] = regs[AW'(raddr[p] + rrb)];
  end
endmodule

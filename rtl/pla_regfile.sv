// pla_regfile: small programmable register file of the PLA, used twice:
// as the central register file (CRF), which holds the static live-in values
// of a loop, and as the literal file, which holds the numerical constants
// that a single-function accelerator would have hard-wired.
//
// Both are loaded from outside the accelerator (Data In) before a loop runs
// and are read-only to the function units while it runs. One synchronous
// write port for loading, NRD combinational read ports for the FU operand
// muxes. Reset clears every entry. Depth and port count are this
// implementation's choice.
module pla_regfile #(
  parameter int W     = 32,
  parameter int DEPTH = 16,
  parameter int NRD   = 16,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   we,
  input  logic [AW-1:0]          waddr,
  input  logic [W-1:0]           wdata,
  input  logic [NRD-1:0][AW-1:0] raddr,
  output logic [NRD-1:0][W-1:0]  rdata
);
  logic [W-1:0] regs [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  always_comb begin
    for (int p = 0; p < NRD; p++) rdata[p] = regs[raddr[p]];
  end
endmodule

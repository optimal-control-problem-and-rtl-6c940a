// local_mem: data memory of one PUMA tile.
//
// Port A belongs to the tile's load/store (MEM) function unit; port B is the
// tile's Data In / Data Out side, used by the network interface to load
// input data before a loop and to read results after it. Both ports read
// combinationally and write on the clock edge; if both write the same word
// in one cycle, port A wins. The size (LMEM_DEPTH words of 32 bits), the
// two-port organisation and the asynchronous read (which keeps the load
// latency at one cycle, like every other FU) are this implementation's
// choices. The contents are not reset.
module local_mem
  import puma_pkg::*;
#(
  parameter int W     = DATA_W,
  parameter int DEPTH = LMEM_DEPTH,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [W-1:0]  a_wdata,
  output logic [W-1:0]  a_rdata,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [W-1:0]  b_wdata,
  output logic [W-1:0]  b_rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (b_we && !(a_we && a_addr == b_addr)) mem[b_addr] <= b_wdata;
    if (a_we) mem[a_addr] <= a_wdata;
  end

  assign a_rdata = mem[a_addr];
  assign b_rdata = mem[b_addr];
endmodule

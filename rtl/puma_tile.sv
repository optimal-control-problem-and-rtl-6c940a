// puma_tile: one PUMA tile, a programmable loop accelerator together with
// the memories it needs (its control memory, CRF and literal file sit
// inside the PLA; the local data memory is here) and the network interface
// that connects it to its mesh router.
//
// Everything reaches the tile as packets on the router's local port:
// program and constants, input data, start; results are read back and the
// end of a loop is reported the same way (see tile_ni). X and Y are the
// tile's mesh coordinates, used as the source of its answers.
module puma_tile
  import puma_pkg::*;
#(
  parameter int       X = 0,
  parameter int       Y = 0,
  parameter int       NUM_FU = NUM_FU_DEFAULT,
  parameter fu_type_e FU_TYPE [NUM_FU] = DEFAULT_FU_TYPE,
  parameter int       LMEM_DEPTH_P = LMEM_DEPTH,
  localparam int      AW = $clog2(LMEM_DEPTH_P)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  flit_t in_flit,
  output logic  out_valid,
  input  logic  out_ready,
  output flit_t out_flit,
  output logic  busy
);
  logic              cfg_we, start, done;
  cmd_e              cfg_sel;
  logic [ADDR_W-1:0] cfg_addr;
  logic [DATA_W-1:0] cfg_data;
  logic              a_we, b_we;
  logic [AW-1:0]     a_addr, b_addr;
  logic [DATA_W-1:0] a_wdata, a_rdata, b_wdata, b_rdata;

  tile_ni #(.X(X), .Y(Y), .LMEM_AW_P(AW)) u_ni (
    .clk, .rst_n, .in_valid, .in_ready, .in_flit, .out_valid, .out_ready, .out_flit,
    .cfg_we, .cfg_sel, .cfg_addr, .cfg_data, .start, .busy, .done,
    .b_we, .b_addr, .b_wdata, .b_rdata);

  pla #(.NUM_FU(NUM_FU), .FU_TYPE(FU_TYPE), .LMEM_AW_P(AW)) u_pla (
    .clk, .rst_n, .cfg_we, .cfg_sel, .cfg_addr, .cfg_data, .start, .busy, .done,
    .mem_we(a_we), .mem_addr(a_addr), .mem_wdata(a_wdata), .mem_rdata(a_rdata));

  local_mem #(.W(DATA_W), .DEPTH(LMEM_DEPTH_P)) u_lmem (
    .clk, .a_we, .a_addr, .a_wdata, .a_rdata, .b_we, .b_addr, .b_wdata, .b_rdata);
endmodule

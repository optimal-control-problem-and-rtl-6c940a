// puma_top: PUMA, a tiled accelerator for medical imaging loops.
//
// ROWS x COLS tiles, each a programmable loop accelerator with its memories
// (puma_tile), sit on a mesh of five-port routers (mesh_router): every
// router links to its four neighbours and to its tile. The external
// interface (ext_if) hangs below the router of column 0 in the bottom row,
// at mesh coordinate (0, ROWS); through it the host loads programs and
// data into any tile, starts loops, reads results and learns, from
// done_mask, which tiles have finished. All tiles of one system are the
// same PLA (FU mix FU_TYPE).
//
// The default is 3 x 3 = 9 tiles, the size of the MRI.FH system, whose tile
// count is set so that the tiles together just use the assumed 142 GB/s
// of memory bandwidth. The mesh arrangement of the nine tiles, the flit
// format and the host port are this implementation's choices. Router
// outputs at the edge of the mesh (other than the one to the external
// interface) are never chosen for in-range destinations; a packet with an
// out-of-range destination is dropped there.
module puma_top
  import puma_pkg::*;
#(
  parameter int       ROWS = 3,
  parameter int       COLS = 3,
  parameter int       NUM_FU = NUM_FU_DEFAULT,
  parameter fu_type_e FU_TYPE [NUM_FU] = DEFAULT_FU_TYPE,
  parameter int       LMEM_DEPTH_P = LMEM_DEPTH
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // host request port: destination tile, command, address, data
  input  logic                 h_req_valid,
  output logic                 h_req_ready,
  input  flit_t                h_req,
  // host response port: read data and loop-done reports
  output logic                 h_rsp_valid,
  input  logic                 h_rsp_ready,
  output flit_t                h_rsp,
  output logic [ROWS*COLS-1:0] done_mask,
  output logic [ROWS*COLS-1:0] tile_busy
);
  initial assert (ROWS < (1 << COORD_W) && COLS <= (1 << COORD_W))
    else $error("puma_top: mesh too large for COORD_W");

  logic  [ROWS-1:0][COLS-1:0][NPORTS-1:0] rin_valid, rin_ready, rout_valid, rout_ready;
  flit_t [ROWS-1:0][COLS-1:0][NPORTS-1:0] rin_flit, rout_flit;

  logic  ext_out_valid, ext_out_ready, ext_in_valid, ext_in_ready;
  flit_t ext_out, ext_in;

  for (genvar y = 0; y < ROWS; y++) begin : g_row
    for (genvar x = 0; x < COLS; x++) begin : g_col
      mesh_router #(.X(x), .Y(y)) u_router (
        .clk, .rst_n,
        .in_valid(rin_valid[y][x]), .in_ready(rin_ready[y][x]), .in_flit(rin_flit[y][x]),
        .out_valid(rout_valid[y][x]), .out_ready(rout_ready[y][x]), .out_flit(rout_flit[y][x]));

      puma_tile #(.X(x), .Y(y), .NUM_FU(NUM_FU), .FU_TYPE(FU_TYPE), .LMEM_DEPTH_P(LMEM_DEPTH_P)) u_tile (
        .clk, .rst_n,
        .in_valid(rout_valid[y][x][PORT_L]), .in_ready(rout_ready[y][x][PORT_L]),
        .in_flit(rout_flit[y][x][PORT_L]),
        .out_valid(rin_valid[y][x][PORT_L]), .out_ready(rin_ready[y][x][PORT_L]),
        .out_flit(rin_flit[y][x][PORT_L]),
        .busy(tile_busy[y * COLS + x]));

      // north side
      if (y > 0) begin : g_n
        assign rin_valid[y][x][PORT_N]  = rout_valid[y-1][x][PORT_S];
        assign rin_flit[y][x][PORT_N]   = rout_flit[y-1][x][PORT_S];
        assign rout_ready[y][x][PORT_N] = rin_ready[y-1][x][PORT_S];
      end else begin : g_n_edge
        assign rin_valid[y][x][PORT_N]  = 1'b0;
        assign rin_flit[y][x][PORT_N]   = '0;
        assign rout_ready[y][x][PORT_N] = 1'b1;
      end
      // south side
      if (y < ROWS - 1) begin : g_s
        assign rin_valid[y][x][PORT_S]  = rout_valid[y+1][x][PORT_N];
        assign rin_flit[y][x][PORT_S]   = rout_flit[y+1][x][PORT_N];
        assign rout_ready[y][x][PORT_S] = rin_ready[y+1][x][PORT_N];
      end else if (x == 0) begin : g_s_ext
        assign rin_valid[y][x][PORT_S]  = ext_out_valid;
        assign rin_flit[y][x][PORT_S]   = ext_out;
        assign ext_out_ready            = rin_ready[y][x][PORT_S];
        assign ext_in_valid             = rout_valid[y][x][PORT_S];
        assign ext_in                   = rout_flit[y][x][PORT_S];
        assign rout_ready[y][x][PORT_S] = ext_in_ready;
      end else begin : g_s_edge
        assign rin_valid[y][x][PORT_S]  = 1'b0;
        assign rin_flit[y][x][PORT_S]   = '0;
        assign rout_ready[y][x][PORT_S] = 1'b1;
      end
      // west side
      if (x > 0) begin : g_w
        assign rin_valid[y][x][PORT_W]  = rout_valid[y][x-1][PORT_E];
        assign rin_flit[y][x][PORT_W]   = rout_flit[y][x-1][PORT_E];
        assign rout_ready[y][x][PORT_W] = rin_ready[y][x-1][PORT_E];
      end else begin : g_w_edge
        assign rin_valid[y][x][PORT_W]  = 1'b0;
        assign rin_flit[y][x][PORT_W]   = '0;
        assign rout_ready[y][x][PORT_W] = 1'b1;
      end
      // east side
      if (x < COLS - 1) begin : g_e
        assign rin_valid[y][x][PORT_E]  = rout_valid[y][x+1][PORT_W];
        assign rin_flit[y][x][PORT_E]   = rout_flit[y][x+1][PORT_W];
        assign rout_ready[y][x][PORT_E] = rin_ready[y][x+1][PORT_W];
      end else begin : g_e_edge
        assign rin_valid[y][x][PORT_E]  = 1'b0;
        assign rin_flit[y][x][PORT_E]   = '0;
        assign rout_ready[y][x][PORT_E] = 1'b1;
      end
    end
  end

  ext_if #(.ROWS(ROWS), .COLS(COLS)) u_ext (
    .clk, .rst_n,
    .h_req_valid, .h_req_ready, .h_req, .h_rsp_valid, .h_rsp_ready, .h_rsp, .done_mask,
    .m_out_valid(ext_out_valid), .m_out_ready(ext_out_ready), .m_out(ext_out),
    .m_in_valid(ext_in_valid), .m_in_ready(ext_in_ready), .m_in(ext_in));
endmodule

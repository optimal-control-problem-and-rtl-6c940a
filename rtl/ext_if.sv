// ext_if: external interface of the PUMA mesh.
//
// Connects the host side (the chip's CPU, memory and disk live beyond it)
// to the mesh. It sits just south of the router in column 0 of the bottom
// row and has the mesh coordinate (0, ROWS), so dimension-order routing
// brings every packet addressed to it out of that router's south port.
//
// Host requests (a flit_t whose destination names a tile) are queued and
// sent into the mesh with the interface's own coordinate as source.
// Packets from the tiles (read data, loop done) are queued towards the host.
// done_mask keeps one bit per tile, index y*COLS + x: it is cleared when
// the host starts a loop on that tile and set when the tile reports the
// loop done, so the host can wait for a set of tiles without counting
// packets. Queue depths and the mask are this implementation's choices.
module ext_if
  import puma_pkg::*;
#(
  parameter int ROWS = 3,
  parameter int COLS = 3,
  parameter int QDEPTH = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // host side
  input  logic                 h_req_valid,
  output logic                 h_req_ready,
  input  flit_t                h_req,
  output logic                 h_rsp_valid,
  input  logic                 h_rsp_ready,
  output flit_t                h_rsp,
  output logic [ROWS*COLS-1:0] done_mask,
  // mesh side
  output logic                 m_out_valid,
  input  logic                 m_out_ready,
  output flit_t                m_out,
  input  logic                 m_in_valid,
  output logic                 m_in_ready,
  input  flit_t                m_in
);
  flit_t req_stamped;
  always_comb begin
    req_stamped       = h_req;
    req_stamped.src_x = '0;
    req_stamped.src_y = COORD_W'(ROWS);
  end

  flit_fifo #(.W(FLIT_W), .DEPTH(QDEPTH)) u_reqq (
    .clk, .rst_n, .in_valid(h_req_valid), .in_ready(h_req_ready), .in_data(req_stamped),
    .out_valid(m_out_valid), .out_ready(m_out_ready), .out_data(m_out));

  flit_fifo #(.W(FLIT_W), .DEPTH(QDEPTH)) u_rspq (
    .clk, .rst_n, .in_valid(m_in_valid), .in_ready(m_in_ready), .in_data(m_in),
    .out_valid(h_rsp_valid), .out_ready(h_rsp_ready), .out_data(h_rsp));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_mask <= '0;
    end else begin
      if (h_req_valid && h_req_ready && h_req.cmd == CMD_START
          && int'(h_req.dst_x) < COLS && int'(h_req.dst_y) < ROWS)
        done_mask[int'(h_req.dst_y) * COLS + int'(h_req.dst_x)] <= 1'b0;
      if (m_in_valid && m_in_ready && m_in.cmd == CMD_RSP_DONE
          && int'(m_in.src_x) < COLS && int'(m_in.src_y) < ROWS)
        done_mask[int'(m_in.src_y) * COLS + int'(m_in.src_x)] <= 1'b1;
    end
  end
endmodule

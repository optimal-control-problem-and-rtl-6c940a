// tile_ni: network interface of a PUMA tile.
//
// Turns the packets that reach the tile from its router into actions on the
// tile: control-memory, CRF, literal-file and loop-register writes go to the
// PLA's configuration port, local-memory writes and reads go to the data
// port of the local memory (Data In / Data Out), and CMD_START starts the
// loop. A read is answered with a CMD_RSP_DATA packet to its sender; when the
// loop finishes, a CMD_RSP_DONE packet carrying the number of cycles the
// loop ran goes to whoever sent the start.
//
// Flow control: the interface takes a packet only while it has no answer
// waiting to be sent and no loop running, so a program cannot be changed
// under a running loop; packets for the tile wait in the mesh meanwhile.
// The packet commands and this whole interface are this implementation's
// own; the architecture only says that the routers carry data between each
// tile and the external interface.
module tile_ni
  import puma_pkg::*;
#(
  parameter int X = 0,
  parameter int Y = 0,
  parameter int LMEM_AW_P = LMEM_AW
) (
  input  logic              clk,
  input  logic              rst_n,
  // from / to the router's local port
  input  logic              in_valid,
  output logic              in_ready,
  input  flit_t             in_flit,
  output logic              out_valid,
  input  logic              out_ready,
  output flit_t             out_flit,
  // PLA
  output logic              cfg_we,
  output cmd_e              cfg_sel,
  output logic [ADDR_W-1:0] cfg_addr,
  output logic [DATA_W-1:0] cfg_data,
  output logic              start,
  input  logic              busy,
  input  logic              done,
  // local memory, data side
  output logic              b_we,
  output logic [LMEM_AW_P-1:0] b_addr,
  output logic [DATA_W-1:0] b_wdata,
  input  logic [DATA_W-1:0] b_rdata
);
  logic               running;
  logic [COORD_W-1:0] req_x, req_y;
  logic [DATA_W-1:0]  cycles;
  logic               accept;

  assign in_ready = !running && !out_valid;
  assign accept   = in_valid && in_ready;

  always_comb begin
    cfg_sel  = in_flit.cmd;
    cfg_addr = in_flit.addr;
    cfg_data = in_flit.data;
    cfg_we   = accept && (in_flit.cmd inside {CMD_WR_CM, CMD_WR_CRF, CMD_WR_LIT, CMD_WR_CFG});
    b_we     = accept && (in_flit.cmd == CMD_WR_LMEM);
    b_addr   = LMEM_AW_P'(in_flit.addr);
    b_wdata  = in_flit.data;
    start    = accept && (in_flit.cmd == CMD_START);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running   <= 1'b0;
      out_valid <= 1'b0;
      out_flit  <= '0;
      req_x     <= '0;
      req_y     <= '0;
      cycles    <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (busy) cycles <= cycles + 1'b1;
      if (accept && in_flit.cmd == CMD_RD_LMEM) begin
        out_valid      <= 1'b1;
        out_flit.dst_x <= in_flit.src_x;
        out_flit.dst_y <= in_flit.src_y;
        out_flit.src_x <= COORD_W'(X);
        out_flit.src_y <= COORD_W'(Y);
        out_flit.cmd   <= CMD_RSP_DATA;
        out_flit.addr  <= in_flit.addr;
        out_flit.data  <= b_rdata;
      end
      if (start) begin
        running <= 1'b1;
        req_x   <= in_flit.src_x;
        req_y   <= in_flit.src_y;
        cycles  <= '0;
      end
      if (done) begin
        running        <= 1'b0;
        out_valid      <= 1'b1;
        out_flit.dst_x <= req_x;
        out_flit.dst_y <= req_y;
        out_flit.src_x <= COORD_W'(X);
        out_flit.src_y <= COORD_W'(Y);
        out_flit.cmd   <= CMD_RSP_DONE;
        out_flit.addr  <= '0;
        out_flit.data  <= cycles;
      end
    end
  end

  // a done can only come while a loop runs, so the answer register is free
  assert property (@(posedge clk) disable iff (!rst_n) done |-> running && !out_valid);
endmodule

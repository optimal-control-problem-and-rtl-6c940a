// mesh_router: on-chip router of the PUMA mesh.
//
// The tiles of a PUMA chip are connected to their neighbours and to the
// external interface by a mesh of routers. This router has five ports,
// north, east, south, west and local (the tile). Packets are single flits
// (puma_pkg::flit_t) carrying destination and source coordinates, a command,
// an address and one data word. Each input has a FIFO_DEPTH-entry FIFO;
// the head flit is routed dimension-order, X first then Y (east if dst_x is
// larger, west if smaller, else south if dst_y is larger, north if smaller,
// else local), which cannot deadlock on a mesh. Each output has a
// round-robin arbiter over the inputs that want it. A flit moves one router
// per cycle when nothing blocks it; valid/ready flow control backs up into
// the FIFOs when an output is not ready.
//
// The flit format, routing algorithm, buffering and arbitration are this
// implementation's choices: the architecture only names the routers and
// the mesh. Coordinates: x grows eastward, y grows southward.
module mesh_router
  import puma_pkg::*;
#(
  parameter int X = 0,
  parameter int Y = 0,
  parameter int FIFO_DEPTH = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic  [NPORTS-1:0]       in_valid,
  output logic  [NPORTS-1:0]       in_ready,
  input  flit_t [NPORTS-1:0]       in_flit,
  output logic  [NPORTS-1:0]       out_valid,
  input  logic  [NPORTS-1:0]       out_ready,
  output flit_t [NPORTS-1:0]       out_flit
);
  logic  [NPORTS-1:0] head_valid, head_pop;
  flit_t [NPORTS-1:0] head;
  logic  [NPORTS-1:0][NPORTS-1:0] req;     // req[in][out]
  logic  [NPORTS-1:0][NPORTS-1:0] gnt;     // gnt[out][in]
  logic  [NPORTS-1:0][2:0]        prio;    // round-robin pointer per output

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    flit_fifo #(.W(FLIT_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .in_valid(in_valid[p]), .in_ready(in_ready[p]), .in_data(in_flit[p]),
      .out_valid(head_valid[p]), .out_ready(head_pop[p]), .out_data(head[p]));
  end

  function automatic port_e route(input flit_t f);
    if (int'(f.dst_x) > X)      return PORT_E;
    else if (int'(f.dst_x) < X) return PORT_W;
    else if (int'(f.dst_y) > Y) return PORT_S;
    else if (int'(f.dst_y) < Y) return PORT_N;
    else                        return PORT_L;
  endfunction

  always_comb begin
    req = '0;
    for (int i = 0; i < NPORTS; i++)
      if (head_valid[i]) req[i][route(head[i])] = 1'b1;
  end

  // round-robin: search from the input after the last one granted
  always_comb begin
    int cand;
    gnt = '0;
    for (int o = 0; o < NPORTS; o++) begin
      for (int k = NPORTS; k >= 1; k--) begin
        cand = (int'(prio[o]) + k) % NPORTS;
        if (req[cand][o]) gnt[o] = NPORTS'(1) << cand;   // last assignment = nearest
      end
    end
  end

  always_comb begin
    head_pop = '0;
    for (int o = 0; o < NPORTS; o++) begin
      out_valid[o] = (gnt[o] != '0);
      out_flit[o]  = '0;
      for (int i = 0; i < NPORTS; i++) begin
        if (gnt[o][i]) begin
          out_flit[o] = head[i];
          if (out_ready[o]) head_pop[i] = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NPORTS; o++) prio[o] <= 3'(NPORTS - 1);
    end else begin
      for (int o = 0; o < NPORTS; o++)
        for (int i = 0; i < NPORTS; i++)
          if (gnt[o][i] && out_ready[o]) prio[o] <= 3'(i);
    end
  end

  // one input is granted at most one output
  for (genvar o = 0; o < NPORTS; o++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt[o]));
    // a flit offered on an output stays offered until taken
    assert property (@(posedge clk) disable iff (!rst_n)
                     out_valid[o] && !out_ready[o] |=> out_valid[o]);
  end
endmodule

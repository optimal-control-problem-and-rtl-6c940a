// tb_mesh_router: one router at (1,1) of a 3x3 mesh. Random single-flit
// packets with random destinations enter on all five ports while the
// outputs are randomly not ready. Every flit must leave on the port that
// X-then-Y routing names, exactly once, in order per (input, output) pair.
// Also checks the one-cycle hop latency of an unblocked flit and that
// output contention and input backpressure both occurred.
module tb_mesh_router;
  import puma_pkg::*;
  logic clk = 0, rst_n = 0;
  logic  [NPORTS-1:0] in_valid = '0, in_ready, out_valid, out_ready = '1;
  flit_t [NPORTS-1:0] in_flit, out_flit;
  int checks = 0, failures = 0, contention = 0, backpressure = 0;
  int exp_q [NPORTS][NPORTS][$];   // seq numbers expected, per input and output
  int seq [NPORTS];

  mesh_router #(.X(1), .Y(1)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_route(input flit_t f);
    if (f.dst_x > 1) return PORT_E;
    if (f.dst_x < 1) return PORT_W;
    if (f.dst_y > 1) return PORT_S;
    if (f.dst_y < 1) return PORT_N;
    return PORT_L;
  endfunction

  function automatic flit_t new_flit(input int p);
    flit_t f;
    f = '0;
    f.dst_x = COORD_W'($urandom_range(2, 0));
    f.dst_y = COORD_W'($urandom_range(2, 0));
    f.cmd   = CMD_WR_LMEM;
    f.data  = {8'(p), 24'(seq[p])};
    return f;
  endfunction

  // monitor outputs
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < NPORTS; o++) begin
      if (out_valid[o] && out_ready[o]) begin
        int ip, sq;
        ip = int'(out_flit[o].data[31:24]);
        sq = int'(out_flit[o].data[23:0]);
        checks++;
        if (ref_route(out_flit[o]) != o || exp_q[ip][o].size() == 0 || exp_q[ip][o][0] != sq) begin
          failures++;
          if (failures < 10) $display("FAIL out %0d: flit from %0d seq %0d", o, ip, sq);
        end else void'(exp_q[ip][o].pop_front());
      end
      if (dut.req[0][o] + dut.req[1][o] + dut.req[2][o] + dut.req[3][o] + dut.req[4][o] > 1) contention++;
    end
  end

  initial begin
    int lat;
    for (int p = 0; p < NPORTS; p++) begin seq[p] = 0; in_flit[p] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // latency of a lone flit: west input to east output
    @(negedge clk);
    in_flit[PORT_W] = new_flit(PORT_W); in_flit[PORT_W].dst_x = 2; in_flit[PORT_W].dst_y = 1;
    in_valid[PORT_W] = 1;
    exp_q[PORT_W][PORT_E].push_back(seq[PORT_W]); seq[PORT_W]++;
    @(negedge clk); in_valid[PORT_W] = 0;
    checks++;
    if (!out_valid[PORT_E]) begin failures++; $display("FAIL hop latency is not one cycle"); end
    @(negedge clk);
    // random traffic
    for (int t = 0; t < 20000; t++) begin
      @(posedge clk);
      // account for flits accepted at this edge
      for (int p = 0; p < NPORTS; p++)
        if (in_valid[p] && in_ready[p]) begin
          exp_q[p][ref_route(in_flit[p])].push_back(seq[p]);
          seq[p]++;
        end
      for (int p = 0; p < NPORTS; p++) if (in_valid[p] && !in_ready[p]) backpressure++;
      #1;
      for (int p = 0; p < NPORTS; p++) begin
        if (!in_valid[p] || in_ready[p]) begin      // hold a flit until it is taken
          in_valid[p] = ($urandom_range(3, 0) != 0);
          in_flit[p]  = new_flit(p);
        end
        out_ready[p] = ($urandom_range(2, 0) != 0);
      end
    end
    @(negedge clk);
    in_valid = '0;
    out_ready = '1;
    repeat (50) @(posedge clk);
    for (int i = 0; i < NPORTS; i++) for (int o = 0; o < NPORTS; o++) begin
      checks++;
      if (exp_q[i][o].size() != 0) begin failures++; $display("FAIL %0d flits lost %0d->%0d", exp_q[i][o].size(), i, o); end
    end
    checks++; if (contention == 0) begin failures++; $display("FAIL no contention"); end
    checks++; if (backpressure == 0) begin failures++; $display("FAIL no backpressure"); end
    $display("contention cycles %0d, backpressured inputs %0d", contention, backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

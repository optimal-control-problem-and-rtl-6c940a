// tb_puma_top: the whole PUMA system at its default size (3 x 3 tiles,
// eight FUs per PLA), driven only through the host port.
//
// Every tile gets a loop: even tiles the floating-point kernel
// y = a*x - c (II 2), odd tiles the integer kernel
// z = rotl(x, r1) + rotr(x, r2) (II 3), each with its own trip count,
// coefficients and input data. All programs and data travel through the
// mesh; all nine loops run at once; the host waits on done_mask, checks
// every done report's cycle count ((trip + stages - 1) * II) and reads every
// result back through the mesh. While the loops run the host also sends
// fourteen reads to a busy tile; they wait in the mesh, fill its buffers
// on that path and push back on the host port.
//
// The test counts how often each mechanism of the design happened and
// fails if one never did: ring transfers at distance 1 and 2, moves,
// operand swaps, stage-predicated (prologue/epilogue) slots, register
// rotation, FP and integer operations, loads and stores, router output
// contention, flow-control stalls in the mesh, host-port backpressure,
// done reports and read answers.
module tb_puma_top;
  import puma_pkg::*;
  import fp_ref_pkg::*;
  import puma_prog_pkg::*;
  localparam int ROWS = 3, COLS = 3, NT = ROWS * COLS;
  localparam int XB = 16, YB = 400;     // input and output bases in local memory

  logic clk = 0, rst_n = 0;
  logic h_req_valid = 0, h_req_ready, h_rsp_valid, h_rsp_ready = 1;
  flit_t h_req = '0, h_rsp;
  logic [NT-1:0] done_mask, tile_busy;

  puma_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int trip [NT];
  logic [31:0] xs [NT][64];
  logic [31:0] coef_a [NT], coef_c [NT];
  logic [31:0] rdata [NT][1024];
  int n_rd [NT];
  int done_cycles [NT];
  int n_done = 0, n_rsp_data = 0;

  typedef enum int {M_RING1, M_RING2, M_MOVE, M_SWAP, M_PRED_OFF, M_ROTATE, M_FP, M_INT_ROT,
                    M_LOAD, M_STORE, M_CONTENTION, M_MESH_STALL, M_HOST_BP, M_DONE, M_READ,
                    M_NUM} mech_e;
  int mech [M_NUM];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------------- host side
  always @(posedge clk) if (rst_n && h_rsp_valid && h_rsp_ready) begin
    int t;
    t = int'(h_rsp.src_y) * COLS + int'(h_rsp.src_x);
    if (h_rsp.cmd == CMD_RSP_DONE) begin done_cycles[t] = int'(h_rsp.data); n_done++; mech[M_DONE]++; end
    else if (h_rsp.cmd == CMD_RSP_DATA) begin rdata[t][h_rsp.addr[9:0]] = h_rsp.data; n_rd[t]++; mech[M_READ]++; end
  end
  always @(negedge clk) h_rsp_ready = ($urandom_range(7, 0) != 0);

  task automatic send(input int t, input cmd_e cmd, input int addr, input logic [31:0] data);
    @(negedge clk);
    h_req = '0;
    h_req.dst_x = COORD_W'(t % COLS); h_req.dst_y = COORD_W'(t / COLS);
    h_req.cmd = cmd; h_req.addr = ADDR_W'(addr); h_req.data = data;
    h_req_valid = 1;
    #1;
    while (!h_req_ready) begin mech[M_HOST_BP]++; @(negedge clk); #1; end
    @(negedge clk);
    h_req_valid = 0;
  endtask

  // ---------------------------------------------------------------- mechanism probes
  for (genvar y = 0; y < ROWS; y++) begin : g_py
    for (genvar x = 0; x < COLS; x++) begin : g_px
      logic [RR_IDX_W-1:0] last_rrb;
      always @(posedge clk) if (rst_n) begin
        automatic fu_ctrl_t w;
        if (dut.g_row[y].g_col[x].u_tile.u_pla.busy) begin
          for (int f = 0; f < NUM_FU_DEFAULT; f++) begin
            w = dut.g_row[y].g_col[x].u_tile.u_pla.word[f];
            if (dut.g_row[y].g_col[x].u_tile.u_pla.stage_en[f] && w.op != OP_NOP) begin
              if (w.a.sel inside {SRC_P1, SRC_M1} || w.b.sel inside {SRC_P1, SRC_M1}) mech[M_RING1]++;
              if (w.a.sel inside {SRC_P2, SRC_M2} || w.b.sel inside {SRC_P2, SRC_M2}) mech[M_RING2]++;
              if (w.op == OP_MOV)  mech[M_MOVE]++;
              if (w.swap)          mech[M_SWAP]++;
              if (w.op inside {OP_FADD, OP_FSUB, OP_FMUL}) mech[M_FP]++;
              if (w.op inside {OP_ROTL, OP_ROTR}) mech[M_INT_ROT]++;
              if (w.op == OP_LD)   mech[M_LOAD]++;
              if (w.op == OP_ST)   mech[M_STORE]++;
            end else if (w.op != OP_NOP) mech[M_PRED_OFF]++;
          end
        end
        if (dut.g_row[y].g_col[x].u_tile.u_pla.rrb != last_rrb) mech[M_ROTATE]++;
        last_rrb <= dut.g_row[y].g_col[x].u_tile.u_pla.rrb;
        for (int o = 0; o < NPORTS; o++) begin
          int nreq;
          nreq = 0;
          for (int i = 0; i < NPORTS; i++) nreq += int'(dut.g_row[y].g_col[x].u_router.req[i][o]);
          if (nreq > 1) mech[M_CONTENTION]++;
          if (dut.rout_valid[y][x][o] && !dut.rout_ready[y][x][o]) mech[M_MESH_STALL]++;
        end
      end
    end
  end

  // ---------------------------------------------------------------- reference
  function automatic logic [31:0] expected(input int t, input int i);
    logic [31:0] x;
    x = xs[t][i];
    if (t % 2 == 0)
      return from_real(to_real(from_real(to_real(coef_a[t]) * to_real(x))) - to_real(coef_c[t]));
    return ((x << coef_a[t][4:0]) | (x >> (32 - coef_a[t][4:0])))
         + ((x >> coef_c[t][4:0]) | (x << (32 - coef_c[t][4:0])));
  endfunction

  initial begin
    prog_op_t p;
    int cyc;
    for (int m = 0; m < M_NUM; m++) mech[m] = 0;
    for (int t = 0; t < NT; t++) begin n_rd[t] = 0; done_cycles[t] = -1; end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // load programs and data into every tile
    for (int t = 0; t < NT; t++) begin
      trip[t] = 6 + 5 * t;
      if (t % 2 == 0) begin
        coef_a[t] = rnd_fp(4);
        coef_c[t] = rnd_fp(4);
        for (int k = 0; k < AFFINE_LEN; k++) begin
          p = affine_op(k);
          send(t, CMD_WR_CM, (p.slot << 8) | p.fu, 32'(p.w));
        end
        send(t, CMD_WR_CRF, 2, coef_a[t]);
        send(t, CMD_WR_LIT, 0, coef_c[t]);
        send(t, CMD_WR_CFG, 0, AFFINE_II);
        send(t, CMD_WR_CFG, 2, AFFINE_STAGES);
        for (int i = 0; i < trip[t]; i++) xs[t][i] = rnd_fp(10);
      end else begin
        coef_a[t] = $urandom_range(31, 1);
        coef_c[t] = $urandom_range(31, 1);
        for (int k = 0; k < ROTMIX_LEN; k++) begin
          p = rotmix_op(k);
          send(t, CMD_WR_CM, (p.slot << 8) | p.fu, 32'(p.w));
        end
        send(t, CMD_WR_LIT, 1, coef_a[t]);
        send(t, CMD_WR_LIT, 2, coef_c[t]);
        send(t, CMD_WR_CFG, 0, ROTMIX_II);
        send(t, CMD_WR_CFG, 2, ROTMIX_STAGES);
        for (int i = 0; i < trip[t]; i++) xs[t][i] = $urandom;
      end
      send(t, CMD_WR_CRF, 0, XB);
      send(t, CMD_WR_CRF, 1, YB);
      send(t, CMD_WR_CFG, 1, trip[t]);
      for (int i = 0; i < trip[t]; i++) send(t, CMD_WR_LMEM, XB + i, xs[t][i]);
    end

    // start all loops, then ask the longest-running tile for data while it runs
    for (int t = 0; t < NT; t++) send(t, CMD_START, 0, 0);
    for (int i = 0; i < 14; i++) send(NT - 1, CMD_RD_LMEM, XB + i, 0);
    cyc = 0;
    while (done_mask != '1 && cyc < 100000) begin @(negedge clk); cyc++; end
    chk(done_mask == '1, "all tiles reported done");
    repeat (50) @(negedge clk);
    chk(n_done == NT, $sformatf("%0d done reports", n_done));
    for (int t = 0; t < NT; t++) begin
      int ii, ns;
      ii = (t % 2 == 0) ? AFFINE_II : ROTMIX_II;
      ns = (t % 2 == 0) ? AFFINE_STAGES : ROTMIX_STAGES;
      chk(done_cycles[t] == (trip[t] + ns - 1) * ii,
          $sformatf("tile %0d loop took %0d cycles, expected %0d", t, done_cycles[t], (trip[t] + ns - 1) * ii));
    end
    chk(n_rd[NT - 1] == 14, "reads to a busy tile answered after its loop");
    for (int i = 0; i < 14; i++) chk(rdata[NT - 1][XB + i] == xs[NT - 1][i], "early read data");

    // read every result back through the mesh
    for (int t = 0; t < NT; t++)
      for (int i = 0; i <= trip[t]; i++) send(t, CMD_RD_LMEM, YB + i, 0);
    repeat (200) @(negedge clk);
    for (int t = 0; t < NT; t++) begin
      for (int i = 0; i < trip[t]; i++)
        chk(rdata[t][YB + i] == expected(t, i),
            $sformatf("tile %0d result %0d: %h expected %h", t, i, rdata[t][YB + i], expected(t, i)));
    end

    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-14s happened %0d times", mech_e'(m), mech[m]);
      chk(mech[m] > 0, $sformatf("mechanism %s never happened", mech_e'(m)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

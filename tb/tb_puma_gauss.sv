// tb_puma_gauss: a Gaussian-smoothing workload on the whole PUMA system at
// its default size (3 x 3 tiles, eight FUs per PLA), driven only through the
// host port.
//
// Every tile smooths the rows of its own image with the 5-tap binomial
// kernel (1, 4, 6, 4, 1) / 16 using the "gauss" kernel of puma_prog_pkg
// (five loads, one store, three multiplies and four additions per pixel,
// II = 6, set by the single memory unit). The tap weights and the offsets
// -2, +2, -1, +1 are literals, so the same control words serve every image.
// The images differ in size from tile to tile. Each is stored row by row at
// XB; the loop runs over pixels 2 .. N-3 of the whole image as one long row,
// so pixels near a row end take neighbours across the row break, which the
// reference does too.
//
// The host loads programs and images through the mesh, starts all nine
// tiles, waits on done_mask, checks each loop's cycle count against
// (trip + stages - 1) * II and reads every output pixel back. Results are
// compared with reference single-precision arithmetic evaluated in the same
// order as the kernel.
module tb_puma_gauss;
  import puma_pkg::*;
  import fp_ref_pkg::*;
  import puma_prog_pkg::*;
  localparam int ROWS = 3, COLS = 3, NT = ROWS * COLS;
  localparam int XB = 16, YB = 512;     // image and output bases in local memory

  logic clk = 0, rst_n = 0;
  logic h_req_valid = 0, h_req_ready, h_rsp_valid, h_rsp_ready = 1;
  flit_t h_req = '0, h_rsp;
  logic [NT-1:0] done_mask, tile_busy;

  puma_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int wd [NT], ht [NT], trip [NT];
  localparam logic [31:0] W0 = 32'h3D80_0000, W1 = 32'h3E80_0000, W2 = 32'h3EC0_0000; // 1/16 4/16 6/16
  logic [31:0] img [NT][400];
  logic [31:0] rdata [NT][1024];
  int n_rd [NT];
  int done_cycles [NT];
  int n_done = 0;

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

  always @(posedge clk) if (rst_n && h_rsp_valid && h_rsp_ready) begin
    int t;
    t = int'(h_rsp.src_y) * COLS + int'(h_rsp.src_x);
    if (h_rsp.cmd == CMD_RSP_DONE) begin done_cycles[t] = int'(h_rsp.data); n_done++; end
    else if (h_rsp.cmd == CMD_RSP_DATA) begin rdata[t][h_rsp.addr[9:0]] = h_rsp.data; n_rd[t]++; end
  end

  task automatic send(input int t, input cmd_e cmd, input int addr, input logic [31:0] data);
    @(negedge clk);
    h_req = '0;
    h_req.dst_x = COORD_W'(t % COLS); h_req.dst_y = COORD_W'(t / COLS);
    h_req.cmd = cmd; h_req.addr = ADDR_W'(addr); h_req.data = data;
    h_req_valid = 1;
    #1;
    while (!h_req_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    h_req_valid = 0;
  endtask

  function automatic logic [31:0] fadd(input logic [31:0] a, input logic [31:0] b);
    return from_real(to_real(a) + to_real(b));
  endfunction

  function automatic logic [31:0] fmul(input logic [31:0] a, input logic [31:0] b);
    return from_real(to_real(a) * to_real(b));
  endfunction

  // y[i] in the kernel's order of operations; p is relative to the image
  function automatic logic [31:0] expected(input int t, input int i);
    int p;
    logic [31:0] m2, m1, m0;
    p = 2 + i;
    m2 = fmul(fadd(img[t][p - 2], img[t][p + 2]), W0);
    m1 = fmul(fadd(img[t][p - 1], img[t][p + 1]), W1);
    m0 = fmul(img[t][p], W2);
    return fadd(fadd(m1, m0), m2);
  endfunction

  initial begin
    prog_op_t p;
    int cyc;
    for (int t = 0; t < NT; t++) begin n_rd[t] = 0; done_cycles[t] = -1; end
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int t = 0; t < NT; t++) begin
      wd[t] = 4 + t;
      ht[t] = 3 + (t % 4);
      trip[t] = wd[t] * ht[t] - 4;
      for (int k = 0; k < GAUSS_LEN; k++) begin
        p = gauss_op(k);
        send(t, CMD_WR_CM, (p.slot << 8) | p.fu, 32'(p.w));
      end
      send(t, CMD_WR_CRF, 0, XB + 2);
      send(t, CMD_WR_CRF, 1, YB);
      send(t, CMD_WR_LIT, 0, -32'sd2);
      send(t, CMD_WR_LIT, 1, 32'd2);
      send(t, CMD_WR_LIT, 2, -32'sd1);
      send(t, CMD_WR_LIT, 3, 32'd1);
      send(t, CMD_WR_LIT, 4, W0);
      send(t, CMD_WR_LIT, 5, W1);
      send(t, CMD_WR_LIT, 6, W2);
      send(t, CMD_WR_CFG, 0, GAUSS_II);
      send(t, CMD_WR_CFG, 1, trip[t]);
      send(t, CMD_WR_CFG, 2, GAUSS_STAGES);
      for (int i = 0; i < wd[t] * ht[t]; i++) begin
        img[t][i] = rnd_fp(6);
        send(t, CMD_WR_LMEM, XB + i, img[t][i]);
      end
    end

    for (int t = 0; t < NT; t++) send(t, CMD_START, 0, 0);
    cyc = 0;
    while (done_mask != '1 && cyc < 100000) begin @(negedge clk); cyc++; end
    chk(done_mask == '1, "all tiles reported done");
    repeat (50) @(negedge clk);
    chk(n_done == NT, $sformatf("%0d done reports", n_done));
    for (int t = 0; t < NT; t++)
      chk(done_cycles[t] == (trip[t] + GAUSS_STAGES - 1) * GAUSS_II,
          $sformatf("tile %0d loop took %0d cycles, expected %0d", t, done_cycles[t],
                    (trip[t] + GAUSS_STAGES - 1) * GAUSS_II));

    for (int t = 0; t < NT; t++)
      for (int i = 0; i <= trip[t]; i++) send(t, CMD_RD_LMEM, YB + i, 0);
    repeat (200) @(negedge clk);
    for (int t = 0; t < NT; t++) begin
      chk(n_rd[t] == trip[t] + 1, $sformatf("tile %0d answered %0d reads", t, n_rd[t]));
      for (int i = 0; i < trip[t]; i++)
        chk(rdata[t][YB + i] == expected(t, i),
            $sformatf("tile %0d %0dx%0d pixel %0d: %h expected %h", t, wd[t], ht[t], i,
                      rdata[t][YB + i], expected(t, i)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

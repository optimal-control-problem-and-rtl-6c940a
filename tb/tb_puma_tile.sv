// tb_puma_tile: one tile driven through its network port as its router
// would: the FP kernel y = a*x - c is loaded by packets, input data is
// written, the loop is started, and the done report (with the loop's
// cycle count, (trip + stages - 1) * II) and the results read back by
// packets are checked against values computed here. The answer port is
// randomly not ready.
module tb_puma_tile;
  import puma_pkg::*;
  import fp_ref_pkg::*;
  import puma_prog_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, busy;
  flit_t in_flit = '0, out_flit;
  flit_t got [$];
  int checks = 0, failures = 0;

  puma_tile #(.X(1), .Y(1)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (out_valid && out_ready) got.push_back(out_flit);
  always @(negedge clk) out_ready = ($urandom_range(2, 0) != 0);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic send(input cmd_e cmd, input int addr, input logic [31:0] data);
    @(negedge clk);
    in_flit = '0; in_flit.dst_x = 1; in_flit.dst_y = 1; in_flit.src_x = 0; in_flit.src_y = 3;
    in_flit.cmd = cmd; in_flit.addr = ADDR_W'(addr); in_flit.data = data;
    in_valid = 1;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    prog_op_t p;
    logic [31:0] xs [32];
    logic [31:0] a_f, c_f, e;
    int n = 25;
    repeat (2) @(posedge clk);
    rst_n = 1;
    a_f = 32'hC000_0000;   // -2.0
    c_f = 32'h3E80_0000;   // 0.25
    for (int k = 0; k < AFFINE_LEN; k++) begin
      p = affine_op(k);
      send(CMD_WR_CM, (p.slot << 8) | p.fu, 32'(p.w));
    end
    send(CMD_WR_CRF, 0, 300);
    send(CMD_WR_CRF, 1, 500);
    send(CMD_WR_CRF, 2, a_f);
    send(CMD_WR_LIT, 0, c_f);
    send(CMD_WR_CFG, 0, AFFINE_II);
    send(CMD_WR_CFG, 1, n);
    send(CMD_WR_CFG, 2, AFFINE_STAGES);
    for (int i = 0; i < n; i++) begin xs[i] = rnd_fp(8); send(CMD_WR_LMEM, 300 + i, xs[i]); end
    send(CMD_START, 0, 0);
    wait (got.size() == 1);
    chk(got[0].cmd == CMD_RSP_DONE && got[0].dst_x == 0 && got[0].dst_y == 3 && got[0].src_x == 1
        && got[0].src_y == 1, "done report addressed to the starter");
    chk(got[0].data == (n + AFFINE_STAGES - 1) * AFFINE_II,
        $sformatf("loop cycles %0d, expected %0d", got[0].data, (n + AFFINE_STAGES - 1) * AFFINE_II));
    for (int i = 0; i < n; i++) send(CMD_RD_LMEM, 500 + i, 0);
    send(CMD_RD_LMEM, 500 + n, 0);
    repeat (20) @(negedge clk);
    chk(got.size() == n + 2, $sformatf("%0d answers", got.size()));
    for (int i = 0; i < n; i++) begin
      e = from_real(to_real(from_real(to_real(a_f) * to_real(xs[i]))) - to_real(c_f));
      chk(got[1 + i].cmd == CMD_RSP_DATA && got[1 + i].addr == 500 + i && got[1 + i].data == e,
          $sformatf("y[%0d] = %h expected %h", i, got[1 + i].data, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

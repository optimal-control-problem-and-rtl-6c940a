// tb_tile_ni: the tile network interface with a modelled PLA (busy for a
// set number of cycles after start, then done) and a modelled local
// memory. Checks that each command drives the right port with the packet's
// address and data, that a read is answered to its sender with the memory
// word, that no packet is taken while a loop runs or an answer waits, and
// that the done report goes to the starter with the loop's cycle count.
module tb_tile_ni;
  import puma_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  flit_t in_flit = '0, out_flit;
  logic cfg_we, start, busy, done;
  cmd_e cfg_sel;
  logic [ADDR_W-1:0] cfg_addr;
  logic [DATA_W-1:0] cfg_data;
  logic b_we;
  logic [LMEM_AW-1:0] b_addr;
  logic [DATA_W-1:0] b_wdata, b_rdata;
  logic [31:0] mem [LMEM_DEPTH];
  int busy_len = 0, busy_cnt = 0;
  int checks = 0, failures = 0, stalled = 0;

  tile_ni #(.X(2), .Y(1)) dut (.*);
  always #5 clk = ~clk;

  // PLA model
  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (start) begin busy <= 1'b1; busy_cnt <= busy_len; end
    else if (busy) begin
      if (busy_cnt == 1) begin busy <= 1'b0; done <= 1'b1; end
      busy_cnt <= busy_cnt - 1;
    end
  end
  assign b_rdata = mem[b_addr];
  always_ff @(posedge clk) if (b_we) mem[b_addr] <= b_wdata;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // send one packet, checking the port it drives in the accepting cycle
  task automatic send(input cmd_e cmd, input int addr, input logic [31:0] data,
                      input int sx = 0, input int sy = 3);
    @(negedge clk);
    in_flit = '0;
    in_flit.dst_x = 2; in_flit.dst_y = 1; in_flit.src_x = COORD_W'(sx); in_flit.src_y = COORD_W'(sy);
    in_flit.cmd = cmd; in_flit.addr = ADDR_W'(addr); in_flit.data = data;
    in_valid = 1;
    #1;
    while (!in_ready) begin stalled++; @(negedge clk); #1; end
    case (cmd)
      CMD_WR_CM, CMD_WR_CRF, CMD_WR_LIT, CMD_WR_CFG:
        chk(cfg_we && cfg_sel == cmd && cfg_addr == ADDR_W'(addr) && cfg_data == data && !b_we && !start, "config write");
      CMD_WR_LMEM: chk(b_we && b_addr == LMEM_AW'(addr) && b_wdata == data && !cfg_we, "memory write");
      CMD_START:   chk(start && !cfg_we && !b_we, "start");
      default:     chk(!cfg_we && !b_we && !start, "no side effect");
    endcase
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    flit_t r;
    busy = 0; done = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    send(CMD_WR_CM, 16'h0305, 32'h0123_4567);
    send(CMD_WR_CRF, 2, 32'hAAAA_0002);
    send(CMD_WR_LIT, 1, 32'h5555_0001);
    send(CMD_WR_CFG, 0, 3);
    for (int i = 0; i < 8; i++) send(CMD_WR_LMEM, 100 + i, 32'hBEEF_0000 + i);
    // read, answer held by a not-ready router
    out_ready = 0;
    send(CMD_RD_LMEM, 103, 0, 1, 2);
    chk(out_valid && out_flit.cmd == CMD_RSP_DATA && out_flit.dst_x == 1 && out_flit.dst_y == 2
        && out_flit.src_x == 2 && out_flit.src_y == 1 && out_flit.data == 32'hBEEF_0003
        && out_flit.addr == 103, "read answer");
    // the next packet must wait for the answer to leave
    fork
      send(CMD_RD_LMEM, 104, 0, 1, 2);
      begin repeat (5) @(negedge clk); out_ready = 1; end
    join
    chk(stalled >= 4, "stalled while answer pending");
    chk(out_valid && out_flit.data == 32'hBEEF_0004, "second read answer");
    @(negedge clk);
    // loop of 17 cycles started from (0,3)
    busy_len = 17;
    stalled = 0;
    send(CMD_START, 0, 0, 0, 3);
    fork
      send(CMD_WR_LMEM, 5, 32'h1);     // must wait for the loop
    join_none
    wait (out_valid);
    @(negedge clk);
    chk(out_flit.cmd == CMD_RSP_DONE && out_flit.dst_x == 0 && out_flit.dst_y == 3, "done report");
    chk(out_flit.data == 17, $sformatf("done carries cycle count %0d", out_flit.data));
    wait fork;
    chk(stalled >= 15, $sformatf("packet held during the loop (%0d)", stalled));
    @(negedge clk);
    chk(mem[5] == 32'h1, "write after the loop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

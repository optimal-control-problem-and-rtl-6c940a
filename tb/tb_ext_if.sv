// tb_ext_if: host requests must enter the mesh in order with the
// interface's coordinate (0, ROWS) as source; packets from the mesh must
// reach the host in order; done_mask bits must clear on a host start to a
// tile and set on that tile's done report; full queues must push back.
module tb_ext_if;
  import puma_pkg::*;
  localparam int ROWS = 3, COLS = 3;
  logic clk = 0, rst_n = 0;
  logic h_req_valid = 0, h_req_ready, h_rsp_valid, h_rsp_ready = 0;
  flit_t h_req = '0, h_rsp, m_out, m_in = '0;
  logic [ROWS*COLS-1:0] done_mask;
  logic m_out_valid, m_out_ready = 0, m_in_valid = 0, m_in_ready;
  int checks = 0, failures = 0;
  flit_t sent [$];
  flit_t got [$];

  always @(posedge clk) if (h_rsp_valid && h_rsp_ready) got.push_back(h_rsp);

  task automatic mesh_send(input flit_t f);
    m_in = f; m_in_valid = 1;
    #1;
    while (!m_in_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    m_in_valid = 0;
  endtask

  ext_if #(.ROWS(ROWS), .COLS(COLS)) dut (.*);
  always #5 clk = ~clk;

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

  initial begin
    flit_t f;
    int n;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill the request queue while the mesh is not ready
    n = 0;
    @(negedge clk);
    for (int i = 0; i < 6; i++) begin
      h_req = '0; h_req.dst_x = COORD_W'(i % 3); h_req.dst_y = COORD_W'(i / 3);
      h_req.src_x = 3'd5; h_req.cmd = CMD_WR_LMEM; h_req.data = 32'(i);
      h_req_valid = 1; #1;
      if (h_req_ready) begin n++; f = h_req; f.src_x = 0; f.src_y = ROWS; sent.push_back(f); end
      @(negedge clk);
    end
    h_req_valid = 0;
    chk(n == 4, $sformatf("queue takes 4 then pushes back (%0d)", n));
    m_out_ready = 1;
    for (int i = 0; i < 4; i++) begin
      #1; chk(m_out_valid && m_out == sent[i], "request into mesh, stamped, in order");
      @(negedge clk);
    end
    #1; chk(!m_out_valid, "request queue empty");
    // start tiles (1,0) and (2,2): mask bits 1 and 8 cleared
    @(negedge clk);
    // first report done for all nine so the mask is full
    h_rsp_ready = 1;
    for (int i = 0; i < 9; i++) begin
      f = '0; f.src_x = COORD_W'(i % 3); f.src_y = COORD_W'(i / 3); f.cmd = CMD_RSP_DONE;
      f.data = 32'(100 + i);
      mesh_send(f);
    end
    @(negedge clk);
    chk(done_mask == 9'h1FF, "all done");
    h_req = '0; h_req.dst_x = 1; h_req.dst_y = 0; h_req.cmd = CMD_START; h_req_valid = 1;
    @(negedge clk);
    h_req.dst_x = 2; h_req.dst_y = 2;
    @(negedge clk);
    h_req_valid = 0;
    @(negedge clk);
    chk(done_mask == 9'h0FD, $sformatf("starts clear bits 1 and 8: %h", done_mask));
    f = '0; f.src_x = 2; f.src_y = 2; f.cmd = CMD_RSP_DONE; f.data = 32'd200;
    mesh_send(f); @(negedge clk);
    chk(done_mask == 9'h1FD, "done of (2,2) sets bit 8");
    // a read answer does not touch the mask; a full response queue pushes back
    h_rsp_ready = 0;
    n = 0;
    for (int i = 0; i < 6; i++) begin
      m_in = '0; m_in.src_x = 1; m_in.cmd = CMD_RSP_DATA; m_in.data = 32'(i); m_in_valid = 1;
      #1; if (m_in_ready) n++;
      @(negedge clk);
    end
    m_in_valid = 0;
    chk(n == 4, $sformatf("response queue takes 4 then pushes back (%0d)", n));
    chk(done_mask == 9'h1FD, "read answer leaves the mask");
    h_rsp_ready = 1;
    repeat (10) @(negedge clk);
    chk(got.size() == 14, $sformatf("fourteen responses delivered (%0d)", got.size()));
    for (int i = 0; i < 9; i++) chk(got[i].cmd == CMD_RSP_DONE && got[i].data == 32'(100 + i), "done reports in order");
    chk(got[9].data == 200, "tenth");
    for (int i = 0; i < 4; i++) chk(got[10 + i].cmd == CMD_RSP_DATA && got[10 + i].data == 32'(i), "data in order");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

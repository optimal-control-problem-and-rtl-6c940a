// tb_pla: a PLA with its local memory runs two modulo-scheduled loops
// loaded through the configuration port: the floating-point kernel
// y[i] = a*x[i] - c (II 2, 3 stages) and the integer kernel
// z[i] = rotl(x[i], r1) + rotr(x[i], r2) (II 3, 3 stages). Results are
// compared with values computed here; the busy time must be exactly
// (trip + stages - 1) * II cycles, and memory outside the output arrays
// must be untouched (the prologue and epilogue must not store).
module tb_pla;
  import puma_pkg::*;
  import fp_ref_pkg::*;
  import puma_prog_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  cmd_e cfg_sel = CMD_WR_CFG;
  logic [ADDR_W-1:0] cfg_addr = '0;
  logic [DATA_W-1:0] cfg_data = '0;
  logic start = 0, busy, done;
  logic mem_we;
  logic [LMEM_AW-1:0] mem_addr;
  logic [DATA_W-1:0] mem_wdata, mem_rdata;
  logic b_we = 0;
  logic [LMEM_AW-1:0] b_addr = '0;
  logic [DATA_W-1:0] b_wdata = '0, b_rdata;
  int checks = 0, failures = 0;
  logic [31:0] xs [64];

  pla dut (.*);
  local_mem u_lmem (.clk, .a_we(mem_we), .a_addr(mem_addr), .a_wdata(mem_wdata), .a_rdata(mem_rdata),
                    .b_we, .b_addr, .b_wdata, .b_rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  task automatic cfg(input cmd_e sel, input int addr, input logic [31:0] data);
    @(negedge clk);
    cfg_we = 1; cfg_sel = sel; cfg_addr = ADDR_W'(addr); cfg_data = data;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic mem_wr(input int addr, input logic [31:0] data);
    @(negedge clk); b_we = 1; b_addr = LMEM_AW'(addr); b_wdata = data;
    @(negedge clk); b_we = 0;
  endtask

  function automatic logic [31:0] mem_rd(input int addr);
    return u_lmem.mem[addr];
  endfunction

  task automatic clear_cm;
    for (int s = 0; s < CM_DEPTH; s++)
      for (int f = 0; f < NUM_FU_DEFAULT; f++) cfg(CMD_WR_CM, (s << 8) | f, '0);
  endtask

  task automatic run_loop(input int trip, input int ii, input int ns);
    int cyc = 0;
    cfg(CMD_WR_CFG, 0, ii);
    cfg(CMD_WR_CFG, 1, trip);
    cfg(CMD_WR_CFG, 2, ns);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (busy) begin cyc++; @(negedge clk); end
    chk(cyc == (trip + ns - 1) * ii, $sformatf("loop took %0d cycles, expected %0d", cyc, (trip + ns - 1) * ii));
    chk(done, "done after the loop");
  endtask

  initial begin
    prog_op_t p;
    logic [31:0] a_f, c_f, e;
    int n;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) mem_wr(i, 32'hDEAD_0000 | i);

    // ---------------- affine FP kernel
    n = 20;
    a_f = 32'h3FC0_0000;   // 1.5
    c_f = 32'h4020_0000;   // 2.5
    for (int i = 0; i < n; i++) begin xs[i] = rnd_fp(10); mem_wr(16 + i, xs[i]); end
    for (int k = 0; k < AFFINE_LEN; k++) begin
      p = affine_op(k);
      cfg(CMD_WR_CM, (p.slot << 8) | p.fu, 32'(p.w));
    end
    cfg(CMD_WR_CRF, 0, 16);     // x base
    cfg(CMD_WR_CRF, 1, 100);    // y base
    cfg(CMD_WR_CRF, 2, a_f);
    cfg(CMD_WR_LIT, 0, c_f);
    run_loop(n, AFFINE_II, AFFINE_STAGES);
    for (int i = 0; i < n; i++) begin
      e = from_real(to_real(from_real(to_real(a_f) * to_real(xs[i]))) - to_real(c_f));
      chk(mem_rd(100 + i) == e, $sformatf("y[%0d] = %h, expected %h", i, mem_rd(100 + i), e));
    end
    chk(mem_rd(99) == 32'hDEAD_0063, "word before y untouched");
    for (int i = 0; i < 16; i++)
      chk(mem_rd(i) == (32'hDEAD_0000 | i), $sformatf("word %0d untouched by prologue", i));
    chk(mem_rd(100 + n) == (32'hDEAD_0000 | (100 + n)), "word after y untouched");

    // ---------------- rotmix integer kernel, reprogrammed
    clear_cm();
    n = 13;
    for (int i = 0; i < n; i++) begin xs[i] = $urandom; mem_wr(40 + i, xs[i]); end
    for (int k = 0; k < ROTMIX_LEN; k++) begin
      p = rotmix_op(k);
      cfg(CMD_WR_CM, (p.slot << 8) | p.fu, 32'(p.w));
    end
    cfg(CMD_WR_CRF, 0, 40);
    cfg(CMD_WR_CRF, 1, 200);
    cfg(CMD_WR_LIT, 1, 7);
    cfg(CMD_WR_LIT, 2, 3);
    run_loop(n, ROTMIX_II, ROTMIX_STAGES);
    for (int i = 0; i < n; i++) begin
      e = ((xs[i] << 7) | (xs[i] >> 25)) + ((xs[i] >> 3) | (xs[i] << 29));
      chk(mem_rd(200 + i) == e, $sformatf("z[%0d] = %h, expected %h", i, mem_rd(200 + i), e));
    end
    chk(mem_rd(200 + n) == (32'hDEAD_0000 | (200 + n)), "word after z untouched");
    chk(mem_rd(150) == (32'hDEAD_0000 | 150), "unused data untouched");
    for (int i = 0; i < 16; i++)
      chk(mem_rd(i) == (32'hDEAD_0000 | i), $sformatf("word %0d untouched by prologue", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fu_br: runs loops of several II, trip counts and stage counts and
// checks: the slot sequence (modulo counter over II), the number of busy
// cycles ((TRIP + NSTAGES - 1) * II), the stage predicates of each FU
// against the rule 0 <= pass - stage < TRIP, the rotation base decrement per
// pass, the iteration numbers written by OP_ITER, and the done pulse.
module tb_fu_br;
  import puma_pkg::*;
  localparam int NF = 4, SW = 4;
  logic clk = 0, rst_n = 0, start = 0;
  logic [SW:0] ii;
  logic [TRIP_W-1:0] trip;
  logic [STAGE_W:0] nstages;
  logic [NF-1:0][STAGE_W-1:0] stage;
  logic [NF-1:0] stage_en;
  logic [SW-1:0] slot;
  logic [RR_IDX_W-1:0] rrb;
  logic busy, done, we;
  op_e op;
  logic [31:0] a, y;
  logic [STAGE_W-1:0] own_stage;
  int checks = 0, failures = 0;

  fu_br #(.NUM_FU(NF), .SW(SW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run(input int ii_v, input int trip_v, input int ns_v);
    int cyc, pass, s_exp;
    logic [RR_IDX_W-1:0] rrb0;
    @(negedge clk);
    ii = (SW + 1)'(ii_v); trip = TRIP_W'(trip_v); nstages = (STAGE_W + 1)'(ns_v);
    for (int f = 0; f < NF; f++) stage[f] = STAGE_W'($urandom_range(ns_v - 1, 0));
    own_stage = STAGE_W'($urandom_range(ns_v - 1, 0));
    op = OP_ITER; a = '0;
    rrb0 = rrb;
    start = 1;
    @(negedge clk); start = 0;
    cyc = 0;
    while (busy) begin
      pass  = cyc / ii_v;
      s_exp = cyc % ii_v;
      chk(int'(slot) == s_exp, "slot");
      chk(rrb == RR_IDX_W'(int'(rrb0) - pass), "rrb");
      for (int f = 0; f < NF; f++)
        chk(stage_en[f] == (pass >= int'(stage[f]) && pass - int'(stage[f]) < trip_v), "stage_en");
      chk(we == (pass >= int'(own_stage) && pass - int'(own_stage) < trip_v), "iter we");
      if (we) chk(y == 32'(pass - int'(own_stage)), "iter value");
      chk(!done, "no done while busy");
      cyc++;
      @(negedge clk);
    end
    chk(cyc == (trip_v + ns_v - 1) * ii_v, $sformatf("cycle count %0d for ii %0d trip %0d stages %0d", cyc, ii_v, trip_v, ns_v));
    chk(done, "done pulse");
    @(negedge clk);
    chk(!done, "done is one cycle");
  endtask

  initial begin
    ii = 1; trip = 1; nstages = 1; stage = '0; own_stage = '0; op = OP_NOP; a = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(1, 5, 1);
    run(1, 10, 3);
    run(2, 7, 4);
    run(3, 1, 5);
    run(16, 4, 2);
    for (int r = 0; r < 20; r++) run($urandom_range(16, 1), $urandom_range(30, 1), $urandom_range(8, 1));
    // trip count 0 ends at once
    @(negedge clk); trip = 0; start = 1;
    @(negedge clk); start = 0; chk(done && !busy, "zero trip");
    // move operation
    @(negedge clk); op = OP_MOV; a = 32'hABCD; trip = 3; nstages = 1; own_stage = 0; start = 1;
    @(negedge clk); start = 0; chk(we && y == 32'hABCD, "move");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

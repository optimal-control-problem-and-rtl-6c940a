// tb_rot_regfile: writes values under changing rotation bases and checks
// that each is read back at logical index r+k after k decrements of the
// base, against a software model of the physical array. Also checks that
// reset clears the file and that a write becomes visible one cycle later.
module tb_rot_regfile;
  localparam int W = 32, DEPTH = 8, NRD = 3, AW = 3;
  logic clk = 0, rst_n = 0;
  logic [AW-1:0] rrb = '0, waddr = '0;
  logic we = 0;
  logic [W-1:0] wdata = '0;
  logic [NRD-1:0][AW-1:0] raddr;
  logic [NRD-1:0][W-1:0] rdata;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  rot_regfile #(.W(W), .DEPTH(DEPTH), .NRD(NRD)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    raddr = '0;
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < DEPTH; r++) begin
      raddr[0] = AW'(r); #1; chk(rdata[0], '0, "reset");
    end
    // a value written as r is read as r+1 after the base is decremented
    @(negedge clk); rrb = 3'd5; we = 1; waddr = 3'd2; wdata = 32'hCAFE_0001;
    raddr[0] = 3'd2; #1; chk(rdata[0], '0, "write not yet visible");
    @(negedge clk); we = 0; rrb = 3'd4;
    raddr[0] = 3'd3; raddr[1] = 3'd2; #1;
    chk(rdata[0], 32'hCAFE_0001, "rotated read r+1");
    @(negedge clk); rrb = 3'd3; raddr[0] = 3'd4; #1;
    chk(rdata[0], 32'hCAFE_0001, "rotated read r+2");
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    model[7] = 32'hCAFE_0001;    // (2+5) mod 8
    // random traffic against the model
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (we) model[AW'(waddr + rrb)] = wdata;
      if ($urandom_range(3, 0) == 0) rrb = rrb - 1'b1;
      we = 1'($urandom); waddr = AW'($urandom); wdata = $urandom;
      for (int p = 0; p < NRD; p++) raddr[p] = AW'($urandom);
      #1;
      for (int p = 0; p < NRD; p++) chk(rdata[p], model[AW'(raddr[p] + rrb)], "random read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

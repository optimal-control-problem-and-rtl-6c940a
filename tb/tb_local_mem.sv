// tb_local_mem: random reads and writes on both ports against a model,
// including same-address write collisions where the FU port must win.
module tb_local_mem;
  localparam int W = 32, DEPTH = 64, AW = 6;
  logic clk = 0;
  logic a_we = 0, b_we = 0;
  logic [AW-1:0] a_addr = '0, b_addr = '0;
  logic [W-1:0] a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0, collisions = 0;

  local_mem #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL got %h expected %h", got, exp);
    end
  endtask

  initial begin
    // initialise through port B
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); b_we = 1; b_addr = AW'(i); b_wdata = $urandom; model[i] = b_wdata;
    end
    @(negedge clk); b_we = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (b_we && !(a_we && a_addr == b_addr)) model[b_addr] = b_wdata;
      if (a_we) model[a_addr] = a_wdata;
      a_we = 1'($urandom); b_we = 1'($urandom);
      a_addr = AW'($urandom); b_addr = (t % 4 == 0) ? a_addr : AW'($urandom);
      if (a_we && b_we && a_addr == b_addr) collisions++;
      a_wdata = $urandom; b_wdata = $urandom;
      #1;
      chk(a_rdata, model[a_addr]);
      chk(b_rdata, model[b_addr]);
    end
    checks++;
    if (collisions == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

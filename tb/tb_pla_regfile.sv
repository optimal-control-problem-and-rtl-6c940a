// tb_pla_regfile: loads every entry of the register file (as used for the
// CRF and the literal file) and reads all of them back through every read
// port; checks the reset value and that unwritten entries keep their value.
module tb_pla_regfile;
  localparam int W = 32, DEPTH = 16, NRD = 4, AW = 4;
  logic clk = 0, rst_n = 0, we = 0;
  logic [AW-1:0] waddr = '0;
  logic [W-1:0] wdata = '0;
  logic [NRD-1:0][AW-1:0] raddr = '0;
  logic [NRD-1:0][W-1:0] rdata;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  pla_regfile #(.W(W), .DEPTH(DEPTH), .NRD(NRD)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      if (we) model[waddr] = wdata;
      we = (t > 20) && 1'($urandom); waddr = AW'($urandom); wdata = $urandom;
      for (int p = 0; p < NRD; p++) raddr[p] = AW'($urandom);
      #1;
      for (int p = 0; p < NRD; p++) begin
        checks++;
        if (rdata[p] !== model[raddr[p]]) begin
          failures++;
          if (failures < 10) $display("FAIL port %0d addr %0d: %h vs %h", p, raddr[p], rdata[p], model[raddr[p]]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

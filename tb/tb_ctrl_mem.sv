// tb_ctrl_mem: loads random FU control fields into every (slot, FU) cell,
// then steps the slot address as the loop controller does and checks that
// every FU sees its own field of the current slot; checks NOPs after reset.
module tb_ctrl_mem;
  import puma_pkg::*;
  localparam int NF = 4, DEPTH = 8, SW = 3, FW = 2;
  logic clk = 0, rst_n = 0, we = 0;
  logic [SW-1:0] wslot = '0, slot = '0;
  logic [FW-1:0] wfu = '0;
  fu_ctrl_t wdata = '0;
  fu_ctrl_t [NF-1:0] word;
  fu_ctrl_t model [DEPTH][NF];
  int checks = 0, failures = 0;

  ctrl_mem #(.NUM_FU(NF), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all;
    for (int s = 0; s < DEPTH; s++) begin
      slot = SW'(s); #1;
      for (int f = 0; f < NF; f++) begin
        checks++;
        if (word[f] !== model[s][f]) begin
          failures++;
          if (failures < 10) $display("FAIL slot %0d fu %0d: %h vs %h", s, f, word[f], model[s][f]);
        end
      end
    end
  endtask

  initial begin
    for (int s = 0; s < DEPTH; s++) for (int f = 0; f < NF; f++) model[s][f] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check_all();
    for (int round = 0; round < 3; round++) begin
      for (int s = 0; s < DEPTH; s++) for (int f = 0; f < NF; f++) begin
        if ($urandom_range(1, 0) == 1 || round == 0) begin
          @(negedge clk);
          we = 1; wslot = SW'(s); wfu = FW'(f); wdata = fu_ctrl_t'($urandom);
          model[s][f] = wdata;
          @(negedge clk); we = 0;
        end
      end
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

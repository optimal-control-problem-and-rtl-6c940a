// tb_fu_mem: the MEM FU connected to a local memory. Random stores and
// loads (base + index addressing) are checked against a memory model, and
// the add/sub/move operations against reference expressions.
module tb_fu_mem;
  import puma_pkg::*;
  localparam int AW = 6;
  logic clk = 0;
  logic en;
  op_e op;
  logic [31:0] a, b, y;
  logic we;
  logic mem_we;
  logic [AW-1:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata, b_rdata;
  logic [31:0] model [1 << AW];
  int checks = 0, failures = 0;

  fu_mem #(.AW(AW)) dut (.*);
  local_mem #(.DEPTH(1 << AW)) u_mem (
    .clk, .a_we(mem_we), .a_addr(mem_addr), .a_wdata(mem_wdata), .a_rdata(mem_rdata),
    .b_we(1'b0), .b_addr('0), .b_wdata('0), .b_rdata(b_rdata));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic exp_we, input logic [31:0] exp_y);
    #1;
    checks++;
    if (we !== exp_we || (exp_we && y !== exp_y)) begin
      failures++;
      if (failures < 10) $display("FAIL op %s a %h b %h: we %b y %h, expected %b %h", op.name(), a, b, we, y, exp_we, exp_y);
    end
  endtask

  initial begin
    en = 1;
    for (int i = 0; i < (1 << AW); i++) begin
      @(negedge clk); op = OP_ST; a = i; b = $urandom; model[i] = b;
      #1; checks++; if (!(mem_we && mem_addr == AW'(i) && !we)) failures++;
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      a = $urandom_range(40, 0); b = $urandom_range(20, 0);
      case ($urandom_range(4, 0))
        0: begin op = OP_LD;  chk(1, model[AW'(a + b)]); end
        1: begin op = OP_ST;  b = $urandom; model[AW'(a)] = b; chk(0, '0); end
        2: begin op = OP_ADD; a = $urandom; b = $urandom; chk(1, a + b); end
        3: begin op = OP_SUB; a = $urandom; b = $urandom; chk(1, a - b); end
        default: begin op = OP_MOV; a = $urandom; chk(1, a); end
      endcase
    end
    // a store with a low predicate must not reach the memory
    @(negedge clk); en = 0; op = OP_ST; a = 3; b = 32'h1234_5678;
    @(negedge clk); en = 1; op = OP_LD; a = 3; b = 0; chk(1, model[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

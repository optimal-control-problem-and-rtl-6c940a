// tb_fu_int: every opcode of the integer FU on random operands against
// reference expressions; unsupported opcodes and a low predicate must not
// write.
module tb_fu_int;
  import puma_pkg::*;
  logic en;
  op_e op;
  logic [31:0] a, b, y;
  logic we;
  int checks = 0, failures = 0;

  fu_int dut (.*);

  initial begin
    #1000000;
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
    logic [63:0] dbl;
    for (int t = 0; t < 5000; t++) begin
      a = $urandom; b = $urandom; en = 1;
      dbl = {a, a};
      op = OP_MOV;  chk(1, a);
      op = OP_ADD;  chk(1, 32'(64'(a) + 64'(b)));
      op = OP_SUB;  chk(1, 32'(64'(a) - 64'(b)));
      op = OP_ROTL; chk(1, dbl[63 - b[4:0] -: 32]);
      op = OP_ROTR; chk(1, dbl[31 + b[4:0] -: 32]);
      op = OP_FMUL; chk(0, '0);
      op = OP_NOP;  chk(0, '0);
      en = 0; op = OP_ADD; chk(0, '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

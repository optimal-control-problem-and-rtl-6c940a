// tb_fu_fp: FP multiply, add, subtract and move of the FP FU against the
// double-precision reference; integer opcodes must not write.
module tb_fu_fp;
  import puma_pkg::*;
  import fp_ref_pkg::*;
  logic en;
  op_e op;
  logic [31:0] a, b, y;
  logic we;
  int checks = 0, failures = 0;

  fu_fp dut (.*);

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
    for (int t = 0; t < 5000; t++) begin
      a = rnd_fp(20); b = rnd_fp(20); en = 1;
      op = OP_FMUL; chk(1, from_real(to_real(a) * to_real(b)));
      op = OP_FADD; chk(1, from_real(to_real(a) + to_real(b)));
      op = OP_FSUB; chk(1, from_real(to_real(a) - to_real(b)));
      op = OP_MOV;  chk(1, a);
      op = OP_ADD;  chk(0, '0);
      en = 0; op = OP_FMUL; chk(0, '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fp_mul: checks fp_mul against double-precision reference arithmetic on
// directed cases (exact products, rounding, zeros, infinities, overflow and
// underflow) and on random operands.
module tb_fp_mul;
  import fp_ref_pkg::*;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp_mul dut (.a, .b, .y);

  task automatic check(input logic [31:0] ea, input logic [31:0] eb, input logic [31:0] exp_y);
    a = ea; b = eb;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h: got %h expected %h", ea, eb, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] x, z;
    check(32'h4000_0000, 32'h4040_0000, 32'h40C0_0000);   // 2*3 = 6
    check(32'hBF80_0000, 32'h3F00_0000, 32'hBF00_0000);   // -1*0.5
    check(32'h0000_0000, 32'h4040_0000, 32'h0000_0000);   // 0*3
    check(32'h8000_0000, 32'h4040_0000, 32'h8000_0000);   // -0*3
    check(32'h7F80_0000, 32'h0000_0000, 32'h7FC0_0000);   // inf*0
    check(32'h7F80_0000, 32'hC000_0000, 32'hFF80_0000);   // inf*-2
    check(32'h7F00_0000, 32'h4000_0000, 32'h7F80_0000);   // overflow
    check(32'h0080_0000, 32'h3F00_0000, 32'h0000_0000);   // underflow flushed
    check(32'h3FFF_FFFF, 32'h3FFF_FFFF, 32'h407F_FFFE);   // rounding near 4
    for (int i = 0; i < 20000; i++) begin
      x = rnd_fp(30);
      z = rnd_fp(30);
      check(x, z, from_real(to_real(x) * to_real(z)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

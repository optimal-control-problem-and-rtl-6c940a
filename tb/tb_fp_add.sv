// tb_fp_add: checks fp_add against double-precision reference arithmetic
// on directed cases (cancellation, carry-out, ties, zeros, infinities) and on
// random operands of near and far exponents, for both add and subtract.
module tb_fp_add;
  import fp_ref_pkg::*;
  logic [31:0] a, b, y;
  logic        sub;
  int checks = 0, failures = 0;

  fp_add dut (.a, .b, .sub, .y);

  task automatic check(input logic [31:0] ea, input logic [31:0] eb, input logic es,
                       input logic [31:0] exp_y);
    a = ea; b = eb; sub = es;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h %s %h: got %h expected %h", ea, es ? "-" : "+", eb, y, exp_y);
    end
  endtask

  function automatic logic [31:0] ref_add(input logic [31:0] x, input logic [31:0] z, input logic s);
    return from_real(s ? to_real(x) - to_real(z) : to_real(x) + to_real(z));
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] x, z;
    logic s;
    check(32'h3F80_0000, 32'h3F80_0000, 0, 32'h4000_0000);   // 1+1 = 2
    check(32'h3F80_0000, 32'h3F80_0000, 1, 32'h0000_0000);   // 1-1 = +0
    check(32'h4040_0000, 32'h3F80_0000, 1, 32'h4000_0000);   // 3-1 = 2
    check(32'h3F80_0000, 32'h3380_0000, 0, 32'h3F80_0000);   // 1+2^-24: tie to even
    check(32'h3F80_0001, 32'h3380_0000, 0, 32'h3F80_0002);   // tie rounds up to even
    check(32'h0000_0000, 32'h8000_0000, 0, 32'h0000_0000);   // +0 + -0
    check(32'h8000_0000, 32'h8000_0000, 0, 32'h8000_0000);   // -0 + -0
    check(32'h7F80_0000, 32'h3F80_0000, 0, 32'h7F80_0000);   // inf + 1
    check(32'h7F80_0000, 32'h7F80_0000, 1, 32'h7FC0_0000);   // inf - inf
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF, 0, 32'h7F80_0000);   // overflow
    check(32'hC120_0000, 32'h4120_0000, 0, 32'h0000_0000);   // -10 + 10
    for (int i = 0; i < 20000; i++) begin
      x = rnd_fp((i % 3 == 0) ? 40 : 3);
      z = rnd_fp((i % 3 == 0) ? 40 : 3);
      if (i % 5 == 0) z = {z[31], x[30:23], z[22:0]};        // equal exponents
      s = 1'($urandom);
      check(x, z, s, ref_add(x, z, s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

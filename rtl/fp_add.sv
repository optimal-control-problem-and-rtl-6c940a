// fp_add: IEEE-754 single-precision adder/subtractor (combinational).
//
// The PLA's floating-point FU is generalised from an adder into an
// adder/subtractor; this is that datapath. y = a + b when sub = 0 and
// y = a - b when sub = 1. The operand of smaller magnitude is aligned to the
// larger one with three extra bits (guard, round, sticky), the mantissas are
// added or subtracted, the result is normalised and rounded to nearest,
// ties to even.
//
// Choices of this implementation (the architecture description gives no
// number format details): subnormal inputs are read as zero and results
// below the normal range are flushed to a signed zero; an infinite input
// gives infinity, inf - inf and any NaN input give the quiet NaN 0x7FC00000.
// The unit is purely combinational: the PLA gives every FU a latency of one
// cycle, the register being the destination rotating register file.
module fp_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        sub,
  output logic [31:0] y
);
  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  logic        sa, sb, sl, ss;
  logic [7:0]  ea, eb, el, es;
  logic [23:0] ml, ms;
  logic [7:0]  d;
  logic [26:0] ml_x, ms_x;        // mantissa with G, R, S bits
  logic [27:0] sum;
  logic [26:0] norm;
  logic [4:0]  lz;
  logic signed [9:0] e_res;
  logic [24:0] rnd;
  logic        round_up;
  logic        a_big;

  always_comb begin
    sa = a[31];
    sb = b[31] ^ sub;
    ea = a[30:23];
    eb = b[30:23];
    // order by magnitude
    a_big = (a[30:0] >= b[30:0]);
    sl = a_big ? sa : sb;
    ss = a_big ? sb : sa;
    el = a_big ? ea : eb;
    es = a_big ? eb : ea;
    ml = a_big ? {(ea != 8'd0), a[22:0]} : {(eb != 8'd0), b[22:0]};
    ms = a_big ? {(eb != 8'd0), b[22:0]} : {(ea != 8'd0), a[22:0]};
    if (es == 8'd0) ms = '0;      // flush subnormal operand
    if (el == 8'd0) ml = '0;
    d    = el - es;
    ml_x = {ml, 3'b000};
    // align the smaller operand, collecting shifted-out bits into sticky
    if (d >= 8'd27) begin
      ms_x = {26'd0, (ms != 24'd0)};
    end else begin
      ms_x = {ms, 3'b000} >> d;
      if ((({ms, 3'b000}) & ((27'd1 << d) - 27'd1)) != 27'd0) ms_x[0] = 1'b1;
    end

    lz    = '0;
    norm  = '0;
    e_res = $signed({2'b00, el});
    if (sl == ss) begin
      sum = {1'b0, ml_x} + {1'b0, ms_x};
      if (sum[27]) begin
        norm  = {sum[27:2], sum[1] | sum[0]};
        e_res = e_res + 10'sd1;
      end else begin
        norm  = sum[26:0];
      end
    end else begin
      sum = {1'b0, ml_x} - {1'b0, ms_x};
      for (int i = 0; i <= 26; i++) begin
        if (sum[i]) lz = 5'(26 - i);   // highest set bit wins (last assignment)
      end
      norm  = sum[26:0] << lz;
      e_res = e_res - $signed({5'd0, lz});
    end

    round_up = norm[2] & (norm[1] | norm[0] | norm[3]);
    rnd      = {1'b0, norm[26:3]} + {24'd0, round_up};
    if (rnd[24]) begin
      rnd   = rnd >> 1;
      e_res = e_res + 10'sd1;
    end

    // result selection
    if ((ea == 8'hFF && a[22:0] != 0) || (eb == 8'hFF && b[22:0] != 0)) begin
      y = QNAN;
    end else if (ea == 8'hFF && eb == 8'hFF) begin
      y = (sa == sb) ? {sa, 8'hFF, 23'd0} : QNAN;
    end else if (ea == 8'hFF) begin
      y = {sa, 8'hFF, 23'd0};
    end else if (eb == 8'hFF) begin
      y = {sb, 8'hFF, 23'd0};
    end else if (ml == 24'd0 && ms == 24'd0) begin
      y = {sa & sb, 31'd0};                        // (+0)+(-0) = +0
    end else if (sum == 28'd0) begin
      y = 32'd0;                                   // exact cancellation: +0
    end else if (e_res >= 10'sd255) begin
      y = {sl, 8'hFF, 23'd0};
    end else if (e_res <= 10'sd0) begin
      y = {sl, 31'd0};                             // flush to zero
    end else begin
      y = {sl, e_res[7:0], rnd[22:0]};
    end
  end
endmodule

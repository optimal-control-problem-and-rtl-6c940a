// fp_mul: IEEE-754 single-precision multiplier (combinational).
//
// The multiplying half of the PLA's floating-point FU. The 24-bit
// mantissas are multiplied into a 48-bit product, normalised by at most one
// position, and rounded to nearest, ties to even, with a guard bit and a
// sticky bit taken from the rest of the product.
//
// Choices of this implementation: subnormal inputs count as zero, results
// below the normal range are flushed to a signed zero, overflow gives a
// signed infinity, 0 * inf and NaN inputs give the quiet NaN 0x7FC00000.
// Combinational; the result is registered by the destination register file.
module fp_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  logic        s;
  logic [7:0]  ea, eb;
  logic [47:0] p;
  logic [23:0] m;
  logic        g, st, round_up;
  logic [24:0] rnd;
  logic signed [10:0] e;
  logic a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;

  always_comb begin
    s  = a[31] ^ b[31];
    ea = a[30:23];
    eb = b[30:23];
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hFF) && (a[22:0] == 0);
    b_inf  = (eb == 8'hFF) && (b[22:0] == 0);
    a_nan  = (ea == 8'hFF) && (a[22:0] != 0);
    b_nan  = (eb == 8'hFF) && (b[22:0] != 0);
    p  = {24'd0, 1'b1, a[22:0]} * {24'd0, 1'b1, b[22:0]};
    e  = $signed({3'b000, ea}) + $signed({3'b000, eb}) - 11'sd127;
    if (p[47]) begin
      m  = p[47:24];
      g  = p[23];
      st = (p[22:0] != 0);
      e  = e + 11'sd1;
    end else begin
      m  = p[46:23];
      g  = p[22];
      st = (p[21:0] != 0);
    end
    round_up = g & (st | m[0]);
    rnd = {1'b0, m} + {24'd0, round_up};
    if (rnd[24]) begin
      rnd = rnd >> 1;
      e   = e + 11'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) y = QNAN;
    else if (a_inf || b_inf)   y = {s, 8'hFF, 23'd0};
    else if (a_zero || b_zero) y = {s, 31'd0};
    else if (e >= 11'sd255)    y = {s, 8'hFF, 23'd0};
    else if (e <= 11'sd0)      y = {s, 31'd0};
    else                       y = {s, e[7:0], rnd[22:0]};
  end
endmodule

// fp16_mul: IEEE 754 half-precision multiplier, one SIMD lane of the
// arithmetic unit. Purely combinational; the PU pipeline registers its
// output at the end of the multiplication stage.
//
// The design specifies half-precision data; the rounding details here are
// this implementation's choice: round to nearest, ties to even; subnormal
// inputs are read as zero and results below the normal range flush to a
// signed zero; overflow gives infinity; any NaN input, or infinity times
// zero, gives the quiet NaN 16'h7E00.
//
// Ports: a, b operands; y = a * b.
module fp16_mul (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [15:0] y
);
  logic       sa, sb, sy;
  logic [4:0] ea, eb;
  logic [9:0] fa, fb;
  logic       a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
  logic [21:0] prod;
  logic [10:0] mant;
  logic        guard, sticky, round_up;
  logic [11:0] mant_r;
  logic signed [7:0] exp_v;

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    sy     = sa ^ sb;
    a_nan  = (ea == 5'h1f) && (fa != '0);
    b_nan  = (eb == 5'h1f) && (fb != '0);
    a_inf  = (ea == 5'h1f) && (fa == '0);
    b_inf  = (eb == 5'h1f) && (fb == '0);
    a_zero = (ea == '0);
    b_zero = (eb == '0);

    prod  = {1'b1, fa} * {1'b1, fb};
    exp_v = $signed({3'b000, ea}) + $signed({3'b000, eb}) - 8'sd15;
    if (prod[21]) begin
      mant   = prod[21:11];
      guard  = prod[10];
      sticky = |prod[9:0];
      exp_v  = exp_v + 8'sd1;
    end else begin
      mant   = prod[20:10];
      guard  = prod[9];
      sticky = |prod[8:0];
    end
    round_up = guard && (sticky || mant[0]);
    mant_r   = {1'b0, mant} + {11'd0, round_up};
    if (mant_r[11]) begin
      mant_r = mant_r >> 1;
      exp_v  = exp_v + 8'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      y = 16'h7e00;
    else if (a_inf || b_inf)
      y = {sy, 5'h1f, 10'd0};
    else if (a_zero || b_zero)
      y = {sy, 15'd0};
    else if (exp_v >= 8'sd31)
      y = {sy, 5'h1f, 10'd0};
    else if (exp_v <= 8'sd0)
      y = {sy, 15'd0};
    else
      y = {sy, exp_v[4:0], mant_r[9:0]};
  end
endmodule

// fp16_add: IEEE 754 half-precision adder, one SIMD lane of the arithmetic
// unit. Purely combinational; the PU pipeline registers its output at the
// end of the addition stage.
//
// The design specifies half-precision data; the rounding details are this
// implementation's choice and match fp16_mul: round to nearest, ties to
// even, with guard, round and sticky bits; subnormal inputs are read as
// zero and results below the normal range flush to zero; overflow gives
// infinity; NaN inputs or (+inf) + (-inf) give the quiet NaN 16'h7E00.
// An exact zero sum of opposite-signed operands is +0.
//
// Ports: a, b operands; y = a + b.
module fp16_add (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [15:0] y
);
  logic        sa, sb;
  logic [4:0]  ea, eb;
  logic [9:0]  fa, fb;
  logic        a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
  logic        swap, s_big;
  logic [4:0]  e_big, e_sml;
  logic [13:0] m_big, m_sml, m_sh;
  logic [27:0] shift_tmp;
  logic [4:0]  shamt;
  logic [14:0] sum;
  logic [3:0]  lead;
  logic        found;
  logic [10:0] mant;
  logic        guard, sticky, round_up;
  logic [11:0] mant_r;
  logic signed [7:0] exp_v;

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    a_nan  = (ea == 5'h1f) && (fa != '0);
    b_nan  = (eb == 5'h1f) && (fb != '0);
    a_inf  = (ea == 5'h1f) && (fa == '0);
    b_inf  = (eb == 5'h1f) && (fb == '0);
    a_zero = (ea == '0);
    b_zero = (eb == '0);

    // Order the operands by magnitude.
    swap  = {eb, fb} > {ea, fa};
    s_big = swap ? sb : sa;
    e_big = swap ? eb : ea;
    e_sml = swap ? ea : eb;
    m_big = {1'b1, (swap ? fb : fa), 3'b000};
    m_sml = {1'b1, (swap ? fa : fb), 3'b000};
    shamt  = e_big - e_sml;

    // Align the smaller operand, folding the bits shifted out into sticky.
    shift_tmp = {m_sml, 14'd0} >> shamt;
    m_sh      = shift_tmp[27:14];
    m_sh[0]   = m_sh[0] | (|shift_tmp[13:0]);
    if (shamt > 5'd14) m_sh = 14'd1;  // only the sticky bit survives

    exp_v = $signed({3'b000, e_big});
    if (sa == sb) begin
      sum = {1'b0, m_big} + {1'b0, m_sh};
      if (sum[14]) begin
        sum   = {1'b0, sum[14:2], sum[1] | sum[0]};
        exp_v = exp_v + 8'sd1;
      end
    end else begin
      sum = {1'b0, m_big} - {1'b0, m_sh};
    end

    // Normalise after cancellation: bring the leading one to bit 13.
    lead  = 4'd0;
    found = 1'b0;
    for (int i = 13; i >= 0; i--) begin
      if (!found && sum[i]) begin
        lead  = 4'(13 - i);
        found = 1'b1;
      end
    end
    sum   = sum << lead;
    exp_v = exp_v - $signed({4'd0, lead});

    mant     = sum[13:3];
    guard    = sum[2];
    sticky   = |sum[1:0];
    round_up = guard && (sticky || mant[0]);
    mant_r   = {1'b0, mant} + {11'd0, round_up};
    if (mant_r[11]) begin
      mant_r = mant_r >> 1;
      exp_v  = exp_v + 8'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb)))
      y = 16'h7e00;
    else if (a_inf)
      y = {sa, 5'h1f, 10'd0};
    else if (b_inf)
      y = {sb, 5'h1f, 10'd0};
    else if (a_zero && b_zero)
      y = {sa & sb, 15'd0};
    else if (a_zero)
      y = b;
    else if (b_zero)
      y = a;
    else if (!found)
      y = 16'h0000;
    else if (exp_v >= 8'sd31)
      y = {s_big, 5'h1f, 10'd0};
    else if (exp_v <= 8'sd0)
      y = {s_big, 15'd0};
    else
      y = {s_big, exp_v[4:0], mant_r[9:0]};
  end
endmodule

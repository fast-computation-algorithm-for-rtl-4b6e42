// fp_multiplier: three-stage pipelined floating-point multiplier, y = a * b.
//
// The stages follow the multiplier diagram of the PE:
//   S1  exponent adder (sum of the biased exponents less the bias) and
//       24 x 24-bit mantissa multiplier; the sign is the XOR of the signs;
//   S2  normaliser: the 48-bit product lies in [1, 4), so it is shifted
//       right by one place when its top bit is set, giving a shift count of
//       0 or 1; guard and sticky bits are formed here;
//   S3  exponent adder: the shift count is added to the exponent; this
//       design also rounds to nearest-even here, flushes results below the
//       normal range to zero and saturates overflow to infinity.
// A new pair of operands can enter every cycle (in_valid); the product
// appears MUL_LAT = 3 cycles later with out_valid. Format: see ap_pkg.
// A zero operand gives a zero with the XOR sign. Synchronous active-high
// reset clears the valid bits only.
module fp_multiplier
  import ap_pkg::*;
(
  input  logic  clk,
  input  logic  reset,
  input  logic  in_valid,
  input  fp32_t a,
  input  fp32_t b,
  output logic  out_valid,
  output fp32_t y
);

  // ---------------- S1: exponent add, mantissa multiply ----------------
  typedef struct packed {
    logic               sign;
    logic               zero;
    logic signed [10:0] exp;    // unbiased sum, rebiased once
    logic [47:0]        prod;
  } s1_t;

  s1_t s1_d, s1_q;

  always_comb begin
    logic a_zero, b_zero;
    a_zero       = (a[30:23] == 8'd0);
    b_zero       = (b[30:23] == 8'd0);
    s1_d.sign    = a[31] ^ b[31];
    s1_d.zero    = a_zero || b_zero;
    s1_d.exp     = $signed({3'd0, a[30:23]}) + $signed({3'd0, b[30:23]})
                 - 11'(BIAS);
    s1_d.prod    = {1'b1, a[22:0]} * {1'b1, b[22:0]};
  end

  // ---------------- S2: normalise ----------------
  typedef struct packed {
    logic               sign;
    logic               zero;
    logic signed [10:0] exp;
    logic               shift;  // 1: product was in [2, 4)
    logic [23:0]        mant;   // 1.fraction
    logic               guard;
    logic               sticky;
  } s2_t;

  s2_t s2_d, s2_q;

  always_comb begin
    s2_d.sign  = s1_q.sign;
    s2_d.zero  = s1_q.zero;
    s2_d.exp   = s1_q.exp;
    s2_d.shift = s1_q.prod[47];
    if (s1_q.prod[47]) begin
      s2_d.mant   = s1_q.prod[47:24];
      s2_d.guard  = s1_q.prod[23];
      s2_d.sticky = |s1_q.prod[22:0];
    end else begin
      s2_d.mant   = s1_q.prod[46:23];
      s2_d.guard  = s1_q.prod[22];
      s2_d.sticky = |s1_q.prod[21:0];
    end
  end

  // ---------------- S3: exponent adjust, round, range ----------------
  fp32_t y_d, y_q;
  logic  v1, v2, v3;

  always_comb begin
    logic               round_up;
    logic [24:0]        rounded;
    logic signed [10:0] e;
    round_up = s2_q.guard && (s2_q.sticky || s2_q.mant[0]);
    rounded  = {1'b0, s2_q.mant} + 25'(round_up);
    e        = s2_q.exp + 11'(s2_q.shift);
    if (rounded[24]) begin
      rounded = rounded >> 1;
      e       = e + 11'sd1;
    end
    if (s2_q.zero || e <= 11'sd0)
      y_d = {s2_q.sign, 31'd0};
    else if (e >= 11'sd255)
      y_d = {s2_q.sign, 8'hFF, 23'd0};
    else
      y_d = {s2_q.sign, e[7:0], rounded[22:0]};
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
      v3 <= 1'b0;
    end else begin
      v1 <= in_valid;
      v2 <= v1;
      v3 <= v2;
    end
  end

  always_ff @(posedge clk) begin
    s1_q <= s1_d;
    s2_q <= s2_d;
    y_q  <= y_d;
  end

  assign out_valid = v3;
  assign y         = y_q;

endmodule

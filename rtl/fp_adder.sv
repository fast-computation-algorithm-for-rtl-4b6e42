// fp_adder: four-stage pipelined floating-point adder, y = a + b.
//
// The stages follow the adder diagram of the PE:
//   S1  exponent subtractor, fraction selector and right shifter: the
//       operand of smaller magnitude is shifted right by the exponent
//       difference so both share the larger exponent (guard, round and
//       sticky bits keep what is shifted out);
//   S2  fraction adder (adds, or subtracts when the signs differ);
//   S3  leading-zero counter and left shifter: the sum is normalised so its
//       MSB is 1 (a carry-out is handled by a one-bit right shift);
//   S4  exponent adder: the shift count is added to the exponent; this
//       design also rounds to nearest-even here and flushes results below
//       the normal range to zero / saturates overflow to infinity.
// A new pair of operands can enter every cycle (in_valid); the sum appears
// ADD_LAT = 4 cycles later with out_valid. Format: see ap_pkg. Subtraction
// is done by the caller flipping the sign bit of b. An exactly cancelling
// sum gives +0; (-0) + (-0) gives -0. Synchronous active-high reset clears
// the valid bits only.
module fp_adder
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

  // ---------------- S1: compare, select, align ----------------
  typedef struct packed {
    logic        sign;      // sign of the larger-magnitude operand
    logic        eff_sub;   // operands have different signs
    logic        both_zero;
    logic        zero_sign;
    logic [7:0]  exp;       // larger exponent
    logic [26:0] big;       // {1.fraction, 3'b000}
    logic [26:0] aligned;     // aligned smaller operand, G/R/S in [2:0]
  } s1_t;

  s1_t s1_d, s1_q;
  logic v1, v2, v3, v4;

  always_comb begin
    logic        a_zero, b_zero, swap;
    logic [23:0] ma, mb, m_big, m_small;
    logic [7:0]  e_big, e_small, diff;
    logic [49:0] ext;
    a_zero  = (a[30:23] == 8'd0);
    b_zero  = (b[30:23] == 8'd0);
    ma      = a_zero ? 24'd0 : {1'b1, a[22:0]};
    mb      = b_zero ? 24'd0 : {1'b1, b[22:0]};
    swap    = (b[30:0] > a[30:0]) && !b_zero;
    m_big   = swap ? mb : ma;
    m_small = swap ? ma : mb;
    e_big   = swap ? b[30:23] : a[30:23];
    e_small = swap ? a[30:23] : b[30:23];
    diff    = e_big - e_small;
    // m_small placed with 26 spare bits below it, then shifted right; past
    // 26 places all of it lands in the sticky bit
    ext     = {m_small, 26'd0} >> diff;
    s1_d.sign      = swap ? b[31] : a[31];
    s1_d.eff_sub   = a[31] ^ b[31];
    s1_d.both_zero = a_zero && b_zero;
    s1_d.zero_sign = a[31] & b[31];
    s1_d.exp       = e_big;
    s1_d.big       = {m_big, 3'b000};
    if (diff > 8'd26)
      s1_d.aligned = {26'd0, m_small != 24'd0};
    else
      s1_d.aligned = {ext[49:24], |ext[23:0]};
  end

  // ---------------- S2: fraction add/subtract ----------------
  typedef struct packed {
    logic        sign;
    logic        both_zero;
    logic        zero_sign;
    logic [7:0]  exp;
    logic [27:0] sum;
  } s2_t;

  s2_t s2_d, s2_q;

  always_comb begin
    s2_d.sign      = s1_q.sign;
    s2_d.both_zero = s1_q.both_zero;
    s2_d.zero_sign = s1_q.zero_sign;
    s2_d.exp       = s1_q.exp;
    s2_d.sum       = s1_q.eff_sub ? ({1'b0, s1_q.big} - {1'b0, s1_q.aligned})
                                  : ({1'b0, s1_q.big} + {1'b0, s1_q.aligned});
  end

  // ---------------- S3: leading-zero count, normalise ----------------
  typedef struct packed {
    logic              sign;
    logic              zero;
    logic              zero_sign;
    logic [7:0]        exp;
    logic signed [9:0] shift;   // amount to add to the exponent
    logic [26:0]       mant;    // normalised: [26] = 1, [2:0] = G/R/S
  } s3_t;

  s3_t s3_d, s3_q;

  always_comb begin
    logic [4:0] lz;
    lz = 5'd0;
    for (int k = 0; k < 27; k++) begin
      if (s2_q.sum[k]) lz = 5'(26 - k);
    end
    s3_d.sign      = s2_q.sign;
    s3_d.zero_sign = s2_q.zero_sign;
    s3_d.exp       = s2_q.exp;
    s3_d.zero      = s2_q.both_zero || (s2_q.sum == 28'd0);
    if (s2_q.sum[27]) begin
      s3_d.shift = 10'sd1;
      s3_d.mant  = {s2_q.sum[27:2], s2_q.sum[1] | s2_q.sum[0]};
    end else begin
      s3_d.shift = -$signed({5'd0, lz});
      s3_d.mant  = s2_q.sum[26:0] << lz;
    end
  end

  // ---------------- S4: exponent adjust, round, range ----------------
  fp32_t y_d, y_q;

  always_comb begin
    logic        round_up;
    logic [24:0] rounded;
    logic signed [10:0] e;
    round_up = s3_q.mant[2] && (s3_q.mant[1] || s3_q.mant[0] || s3_q.mant[3]);
    rounded  = {1'b0, s3_q.mant[26:3]} + 25'(round_up);
    e        = $signed({3'd0, s3_q.exp}) + 11'(s3_q.shift);
    if (rounded[24]) begin
      rounded = rounded >> 1;
      e       = e + 11'sd1;
    end
    if (s3_q.zero)
      y_d = {s3_q.zero_sign, 31'd0};
    else if (e <= 11'sd0)
      y_d = {s3_q.sign, 31'd0};
    else if (e >= 11'sd255)
      y_d = {s3_q.sign, 8'hFF, 23'd0};
    else
      y_d = {s3_q.sign, e[7:0], rounded[22:0]};
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
      v3 <= 1'b0;
      v4 <= 1'b0;
    end else begin
      v1 <= in_valid;
      v2 <= v1;
      v3 <= v2;
      v4 <= v3;
    end
  end

  always_ff @(posedge clk) begin
    s1_q <= s1_d;
    s2_q <= s2_d;
    s3_q <= s3_d;
    y_q  <= y_d;
  end

  assign out_valid = v4;
  assign y         = y_q;

endmodule

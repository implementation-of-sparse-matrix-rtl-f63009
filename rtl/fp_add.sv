// Pipelined IEEE-754 single-precision adder (the accumulation adder of the
// floating point MAC).
//
// Five working stages, each ending in a register:
//   1. unpack, order the operands by magnitude, exponent difference;
//   2. shift the smaller significand right by that difference, keeping
//      guard and round bits and a sticky bit for everything shifted out;
//   3. add or subtract the aligned significands;
//   4. normalise: one place right on carry-out, else left by the count of
//      leading zeros;
//   5. round to nearest-even and pack.
// LATENCY-5 further registers only delay the result, giving the 8-cycle
// adder latency of the design description. One operation may enter every
// cycle; results leave exactly LATENCY clocks later together with in_tag,
// which the MAC uses to name the partial-sum slot a result belongs to.
//
// Own choices, not stated in the description: the split into stages;
// subnormal inputs are read as zero and subnormal results flush to zero; an
// exact zero sum is +0 unless both operands are negative; NaN in or inf-inf
// gives the quiet NaN 7FC00000.
module fp_add
  import spmv_pkg::*;
#(
  parameter int unsigned LATENCY = ADD_LAT,
  parameter int unsigned TAG_W   = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  fp32_t            a,
  input  fp32_t            b,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output fp32_t            y,
  output logic [TAG_W-1:0] out_tag
);

  localparam int unsigned WORK = 5;   // working stages

  // sign and special cases, carried through the working stages
  typedef struct packed {
    logic sign;       // sign of the larger operand
    logic sub;        // operand signs differ
    logic both_neg;   // both operands negative (sign of an exact zero)
    logic inf;
    logic nan;
  } info_t;

  logic             v      [WORK-1];
  info_t            info_q [WORK-1];
  logic [TAG_W-1:0] tg     [WORK-1];

  // ---- stage 1: unpack and order by magnitude ----
  logic [30:0] mag_a, mag_b;
  fp32_t       big, sml;
  logic        a_inf, b_inf, a_nan, b_nan;
  info_t       info_in;

  always_comb begin
    mag_a = (a[30:23] == 8'd0) ? 31'd0 : a[30:0];
    mag_b = (b[30:23] == 8'd0) ? 31'd0 : b[30:0];
    if (mag_a >= mag_b) begin
      big = {a[31], mag_a};
      sml = {b[31], mag_b};
    end else begin
      big = {b[31], mag_b};
      sml = {a[31], mag_a};
    end
    a_inf = (a[30:23] == 8'hFF) && (a[22:0] == '0);
    b_inf = (b[30:23] == 8'hFF) && (b[22:0] == '0);
    a_nan = (a[30:23] == 8'hFF) && (a[22:0] != '0);
    b_nan = (b[30:23] == 8'hFF) && (b[22:0] != '0);
    info_in.sign     = big[31];
    info_in.sub      = big[31] ^ sml[31];
    info_in.both_neg = a[31] && b[31];
    info_in.inf      = a_inf || b_inf;
    info_in.nan      = a_nan || b_nan || (a_inf && b_inf && (a[31] != b[31]));
  end

  logic [7:0]  s1_exp, s1_d;
  logic [26:0] s1_mb, s1_ms;   // {hidden, fraction, guard, round, sticky}

  always_ff @(posedge clk) begin
    s1_exp <= big[30:23];
    s1_d   <= big[30:23] - sml[30:23];
    s1_mb  <= (big[30:23] == 8'd0) ? 27'd0 : {1'b1, big[22:0], 3'b000};
    s1_ms  <= (sml[30:23] == 8'd0) ? 27'd0 : {1'b1, sml[22:0], 3'b000};
  end

  // ---- stage 2: align ----
  logic [26:0] ms_al;

  always_comb begin
    if (s1_d >= 8'd27)
      ms_al = {26'd0, |s1_ms};
    else
      ms_al = (s1_ms >> s1_d) | {26'd0, |(s1_ms & ((27'd1 << s1_d) - 27'd1))};
  end

  logic [7:0]  s2_exp;
  logic [26:0] s2_mb, s2_ms;

  always_ff @(posedge clk) begin
    s2_exp <= s1_exp;
    s2_mb  <= s1_mb;
    s2_ms  <= ms_al;
  end

  // ---- stage 3: add or subtract ----
  logic [7:0]  s3_exp;
  logic [27:0] s3_sum;

  always_ff @(posedge clk) begin
    s3_exp <= s2_exp;
    s3_sum <= info_q[1].sub ? ({1'b0, s2_mb} - {1'b0, s2_ms})
                            : ({1'b0, s2_mb} + {1'b0, s2_ms});
  end

  // ---- stage 4: normalise ----
  logic [26:0]       norm;
  logic signed [9:0] e4;
  logic [4:0]        lz;

  always_comb begin
    lz = 5'd0;
    for (int i = 0; i <= 26; i++)
      if (s3_sum[i]) lz = 5'(26 - i);
    if (s3_sum[27]) begin
      norm = s3_sum[27:1] | {26'd0, s3_sum[0]};
      e4   = $signed({2'b00, s3_exp}) + 10'sd1;
    end else begin
      norm = s3_sum[26:0] << lz;
      e4   = $signed({2'b00, s3_exp}) - $signed({5'd0, lz});
    end
  end

  logic              s4_zero;
  logic [26:0]       s4_norm;
  logic signed [9:0] s4_exp;

  always_ff @(posedge clk) begin
    s4_norm <= norm;
    s4_exp  <= e4;
    s4_zero <= (s3_sum == 28'd0);
  end

  // ---- stage 5: round to nearest even, pack ----
  logic              round_up, sign5;
  logic [24:0]       mant_r;
  logic signed [9:0] e5;
  fp32_t             packed_y;
  info_t             i4;

  always_comb begin
    i4       = info_q[3];
    sign5    = s4_zero ? i4.both_neg : i4.sign;
    round_up = s4_norm[2] && ((|s4_norm[1:0]) || s4_norm[3]);
    mant_r   = {1'b0, s4_norm[26:3]} + 25'(round_up);
    e5       = s4_exp;
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      e5     = e5 + 10'sd1;
    end
    if (i4.nan)
      packed_y = FP_QNAN;
    else if (i4.inf || e5 >= 10'sd255)
      packed_y = {sign5, FP_PINF[30:0]};
    else if (s4_zero || e5 <= 10'sd0)
      packed_y = {sign5, 31'd0};
    else
      packed_y = {sign5, e5[7:0], mant_r[22:0]};
  end

  // control, special cases and tag through the working stages
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < WORK-1; i++) v[i] <= 1'b0;
    end else begin
      v[0] <= in_valid;
      for (int i = 1; i < WORK-1; i++) v[i] <= v[i-1];
    end
  end

  always_ff @(posedge clk) begin
    info_q[0] <= info_in;
    tg[0]     <= in_tag;
    for (int i = 1; i < WORK-1; i++) begin
      info_q[i] <= info_q[i-1];
      tg[i]     <= tg[i-1];
    end
  end

  // ---- delay line up to LATENCY ----
  localparam int unsigned NDLY = LATENCY - WORK + 1;  // stage-5 register and after
  logic             d_v   [NDLY];
  fp32_t            d_y   [NDLY];
  logic [TAG_W-1:0] d_tag [NDLY];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NDLY; i++) d_v[i] <= 1'b0;
    end else begin
      d_v[0] <= v[WORK-2];
      for (int i = 1; i < NDLY; i++) d_v[i] <= d_v[i-1];
    end
  end

  always_ff @(posedge clk) begin
    d_y[0]   <= packed_y;
    d_tag[0] <= tg[WORK-2];
    for (int i = 1; i < NDLY; i++) begin
      d_y[i]   <= d_y[i-1];
      d_tag[i] <= d_tag[i-1];
    end
  end

  assign out_valid = d_v[NDLY-1];
  assign y         = d_y[NDLY-1];
  assign out_tag   = d_tag[NDLY-1];

  initial assert (LATENCY >= WORK) else $error("fp_add: LATENCY must be at least 5");

endmodule

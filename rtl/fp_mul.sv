// Pipelined IEEE-754 single-precision multiplier (the multiplier half of the
// floating point MAC).
//
// Four working stages, each ending in a register:
//   1. unpack: sign, biased exponent sum, 24-bit significands, special cases;
//   2. two 24 x 12 partial products of the significands;
//   3. their sum, the 48-bit significand product;
//   4. normalise (at most one place), round to nearest-even, pack.
// LATENCY-4 further registers only delay the result, so that the unit has
// the 8-cycle latency the design description gives for its multiplier. A
// new operand pair may enter every cycle; out_valid/y/out_tag appear exactly
// LATENCY clocks after the matching in_valid/a/b/in_tag. in_tag is carried
// alongside for the caller (the MAC uses it to mark the last product of a
// row).
//
// Own choices, not stated in the description: the split into stages;
// subnormal inputs are read as zero and subnormal results are flushed to a
// signed zero (the usual FPGA core behaviour); overflow gives infinity; any
// NaN operand or inf*0 gives the quiet NaN 7FC00000.
module fp_mul
  import spmv_pkg::*;
#(
  parameter int unsigned LATENCY = MUL_LAT,
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

  localparam int unsigned WORK = 4;   // working stages

  // special cases and exponent, carried through the working stages
  typedef struct packed {
    logic              sign;
    logic              zero;
    logic              inf;
    logic              nan;
    logic signed [9:0] exp;   // ea + eb - 127
  } info_t;

  logic             v   [WORK-1];
  info_t            info_q [WORK-1];
  logic [TAG_W-1:0] tg  [WORK-1];

  // ---- stage 1: unpack ----
  logic [7:0] ea, eb;
  logic       a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  info_t      info_in;

  always_comb begin
    ea     = a[30:23];
    eb     = b[30:23];
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hFF) && (a[22:0] == '0);
    b_inf  = (eb == 8'hFF) && (b[22:0] == '0);
    a_nan  = (ea == 8'hFF) && (a[22:0] != '0);
    b_nan  = (eb == 8'hFF) && (b[22:0] != '0);
    info_in.sign = a[31] ^ b[31];
    info_in.zero = a_zero || b_zero;
    info_in.inf  = a_inf || b_inf;
    info_in.nan  = a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero);
    info_in.exp  = $signed({2'b00, ea}) + $signed({2'b00, eb}) - 10'sd127;
  end

  logic [23:0] s1_ma, s1_mb;
  always_ff @(posedge clk) begin
    s1_ma <= {1'b1, a[22:0]};
    s1_mb <= {1'b1, b[22:0]};
  end

  // ---- stage 2: partial products ----
  logic [35:0] s2_lo, s2_hi;
  always_ff @(posedge clk) begin
    s2_lo <= s1_ma * s1_mb[11:0];
    s2_hi <= s1_ma * s1_mb[23:12];
  end

  // ---- stage 3: significand product ----
  logic [47:0] s3_prod;
  always_ff @(posedge clk) begin
    s3_prod <= {12'd0, s2_lo} + {s2_hi, 12'd0};
  end

  // ---- stage 4: normalise, round to nearest even, pack ----
  logic [23:0]       mant;
  logic              guard, sticky, round_up;
  logic [24:0]       mant_r;
  logic signed [9:0] exp_n;
  fp32_t             packed_y;
  info_t             i3;

  always_comb begin
    i3 = info_q[2];
    if (s3_prod[47]) begin
      mant   = s3_prod[47:24];
      guard  = s3_prod[23];
      sticky = |s3_prod[22:0];
      exp_n  = i3.exp + 10'sd1;
    end else begin
      mant   = s3_prod[46:23];
      guard  = s3_prod[22];
      sticky = |s3_prod[21:0];
      exp_n  = i3.exp;
    end
    round_up = guard && (sticky || mant[0]);
    mant_r   = {1'b0, mant} + 25'(round_up);
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_n  = exp_n + 10'sd1;
    end
    if (i3.nan)
      packed_y = FP_QNAN;
    else if (i3.inf || exp_n >= 10'sd255)
      packed_y = {i3.sign, FP_PINF[30:0]};
    else if (i3.zero || exp_n <= 10'sd0)
      packed_y = {i3.sign, 31'd0};
    else
      packed_y = {i3.sign, exp_n[7:0], mant_r[22:0]};
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
    tg[0]  <= in_tag;
    for (int i = 1; i < WORK-1; i++) begin
      info_q[i] <= info_q[i-1];
      tg[i]  <= tg[i-1];
    end
  end

  // ---- delay line up to LATENCY ----
  localparam int unsigned NDLY = LATENCY - WORK + 1;  // stage-4 register and after
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

  initial assert (LATENCY >= WORK) else $error("fp_mul: LATENCY must be at least 4");

endmodule

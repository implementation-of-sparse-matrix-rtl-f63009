// Floating point MAC: computes the dot product of one sparse-matrix row with
// the matching elements of the x vector.
//
// Element pairs (a = matrix value, b = x value) arrive at most one per cycle
// with in_last marking the final pair of the row. They pass through the
// 8-cycle multiplier, and each product is added into one of SLOTS partial
// sums (SLOTS = ADD_LAT rounded up to a power of two) in turn. Because a slot
// is reused only every SLOTS products, its previous addition, 8 cycles deep
// in the adder, has always finished by then: the accumulation runs at one
// product per cycle with no stall. The slot's operand is taken straight from
// the adder output when it is being written back in the same cycle.
//
// After the last product and once the adder has drained, the partial sums
// are reduced in log2(SLOTS) rounds of a pairwise tree on the same adder
// (8 -> 4 -> 2 -> 1). The row result then appears on out_data (mult_out)
// with out_valid (conv_done) high until out_ready accepts it; the partial
// sums are cleared at that moment and the next row may begin. A row of n
// elements fed back to back takes n + MLAT + 4*ALAT + 11 cycles (n + 51 at
// the default latencies) from its first pair to conv_done. idle is high
// between rows.
//
// The description gives the multiplier and adder latencies, conv_done and
// mult_out; the interleaved partial sums, the tree reduction and the
// in_last marking of the row end are this implementation's choices. The
// order of additions, and so the rounding of the result, is fixed by the
// slot scheme: element k goes to partial sum k mod SLOTS.
module fp_mac
  import spmv_pkg::*;
#(
  parameter int unsigned MLAT = MUL_LAT,
  parameter int unsigned ALAT = ADD_LAT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t in_a,
  input  fp32_t in_b,
  input  logic  in_last,
  output logic  idle,
  output logic  out_valid,   // conv_done
  output fp32_t out_data,    // mult_out
  input  logic  out_ready
);

  localparam int unsigned SW    = ($clog2(ALAT) < 2) ? 2 : $clog2(ALAT);
  localparam int unsigned SLOTS = 1 << SW;
  localparam int unsigned OW    = $clog2(SLOTS + 1) + 1;

  typedef enum logic [1:0] {S_ACC, S_WAIT, S_RED, S_OUT} state_t;
  state_t state;

  // ---- multiplier ----
  logic  p_valid, p_last;
  fp32_t p_data;

  fp_mul #(.LATENCY(MLAT), .TAG_W(1)) u_mul (
    .clk, .rst_n,
    .in_valid (in_valid),
    .a        (in_a),
    .b        (in_b),
    .in_tag   (in_last),
    .out_valid(p_valid),
    .y        (p_data),
    .out_tag  (p_last)
  );

  // ---- adder and partial sums ----
  fp32_t          psum [SLOTS];
  logic [SW-1:0]  slot;
  logic [SW-1:0]  red_i, red_n;   // pair index and pairs in this round
  logic [OW-1:0]  outstanding;

  logic           add_in_v;
  fp32_t          add_a, add_b;
  logic [SW-1:0]  add_in_tag;
  logic           add_out_v;
  fp32_t          add_y;
  logic [SW-1:0]  add_out_tag;

  fp_add #(.LATENCY(ALAT), .TAG_W(SW)) u_add (
    .clk, .rst_n,
    .in_valid (add_in_v),
    .a        (add_a),
    .b        (add_b),
    .in_tag   (add_in_tag),
    .out_valid(add_out_v),
    .y        (add_y),
    .out_tag  (add_out_tag)
  );

  always_comb begin
    add_in_v   = 1'b0;
    add_a      = p_data;
    add_b      = (add_out_v && add_out_tag == slot) ? add_y : psum[slot];
    add_in_tag = slot;
    if (state == S_ACC) begin
      add_in_v = p_valid;
    end else if (state == S_RED) begin
      add_in_v   = 1'b1;
      add_a      = psum[{red_i[SW-2:0], 1'b0}];
      add_b      = psum[{red_i[SW-2:0], 1'b1}];
      add_in_tag = red_i;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_ACC;
      slot        <= '0;
      red_i       <= '0;
      red_n       <= '0;
      outstanding <= '0;
      for (int i = 0; i < SLOTS; i++) psum[i] <= '0;
    end else begin
      outstanding <= outstanding + OW'(add_in_v) - OW'(add_out_v);
      if (add_out_v) psum[add_out_tag] <= add_y;

      unique case (state)
        S_ACC: begin
          if (p_valid) begin
            slot <= slot + 1'b1;
            if (p_last) begin
              state <= S_WAIT;
              red_n <= SW'(SLOTS / 2);
            end
          end
        end
        S_WAIT: begin
          // all additions written back (the one leaving now is counted too)
          if (outstanding == '0) begin
            if (red_n == '0) begin
              state <= S_OUT;
            end else begin
              state <= S_RED;
              red_i <= '0;
            end
          end
        end
        S_RED: begin
          red_i <= red_i + 1'b1;
          if (red_i == red_n - 1'b1) begin
            red_n <= red_n >> 1;
            state <= S_WAIT;
          end
        end
        S_OUT: begin
          if (out_ready) begin
            state <= S_ACC;
            slot  <= '0;
            for (int i = 0; i < SLOTS; i++) psum[i] <= '0;
          end
        end
        default: state <= S_ACC;
      endcase
    end
  end

  assign out_valid = (state == S_OUT);
  assign out_data  = psum[0];
  assign idle      = (state == S_ACC) && (slot == '0) && (outstanding == '0);

  // a new row may only start after the previous result has been taken
  a_no_early_row: assert property (@(posedge clk) disable iff (!rst_n)
                                   p_valid |-> state == S_ACC);
  initial assert (SLOTS >= ALAT) else $error("fp_mac: bad slot count");

endmodule

// Sparse matrix-vector multiplier y = A x in binary32: N_SE sparse engines
// working side by side on different rows, and a result memory that collects
// y.
//
// Use. First write x (up to 2**COL_W elements) through x_we/x_addr/x_data;
// it is written into the Coeff RAM of every engine at once. Then stream the
// non-zeros of A in compressed-row order (row by row, each row's elements
// in any column order) on nz_valid/nz_ready with their global row index
// nz_row, column index nz_col and value nz_val, and finish the matrix with a
// beat that has nz_eom set. Pulse res_clear before a matrix to make rows
// without non-zeros read as zero. When busy falls, every row result is in
// the result memory: present a row on res_raddr and read y[row] on
// res_rdata one clock later. Each result is also shown on res_wvalid/
// res_wrow/res_wdata in the cycle it is written, and conv_done shows which
// engines have a finished row waiting for the result memory.
//
// Row distribution. The low log2(N_SE) bits of the row index select the
// engine and the rest form the engine's local row index, so consecutive
// rows run in consecutive engines and a matrix may have
// N_SE * 2**ROW_W rows (512 by default). The stream is stalled (nz_ready
// low) whenever any engine's row_cnt or col_id FIFO is full. Finished rows
// from the engines reach the single write port of the result memory through
// a round-robin arbiter; an engine whose result is waiting holds it and
// starts its next row only after the write.
//
// The eight engines, the engine contents and the result memory follow the
// design description; the row-to-engine mapping, the shared stall, the
// arbiter and the handshakes are this implementation's choices.
module spmv_top
  import spmv_pkg::fp32_t;
#(
  parameter int unsigned N_SE         = spmv_pkg::N_SE,
  parameter int unsigned ROW_W        = spmv_pkg::ROW_W,
  parameter int unsigned COL_W        = spmv_pkg::COL_W,
  parameter int unsigned SPARSE_DEPTH = spmv_pkg::SPARSE_DEPTH,
  parameter int unsigned FIFO_DEPTH   = spmv_pkg::FIFO_DEPTH,
  parameter int unsigned MLAT         = spmv_pkg::MUL_LAT,
  parameter int unsigned ALAT         = spmv_pkg::ADD_LAT,
  localparam int unsigned SEL_W       = (N_SE > 1) ? $clog2(N_SE) : 1,
  localparam int unsigned GROW_W      = ROW_W + SEL_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // x vector load
  input  logic              x_we,
  input  logic [COL_W-1:0]  x_addr,
  input  fp32_t             x_data,
  // non-zero stream of A
  input  logic              nz_valid,
  output logic              nz_ready,
  input  logic              nz_eom,
  input  logic [GROW_W-1:0] nz_row,
  input  logic [COL_W-1:0]  nz_col,
  input  fp32_t             nz_val,
  // result memory
  input  logic              res_clear,
  input  logic [GROW_W-1:0] res_raddr,
  output fp32_t             res_rdata,
  output logic              res_wvalid,
  output logic [GROW_W-1:0] res_wrow,
  output fp32_t             res_wdata,
  // status
  output logic [N_SE-1:0]   conv_done,   // per engine: a row result is waiting
  output logic              busy,
  output logic              stall
);

  logic [N_SE-1:0]  se_in_valid, se_in_ready, se_out_valid, se_grant, se_busy;
  logic [ROW_W-1:0] se_out_row  [N_SE];
  fp32_t            se_out_data [N_SE];
  logic [SEL_W-1:0] sel;

  assign sel      = (N_SE > 1) ? nz_row[SEL_W-1:0] : '0;
  assign nz_ready = &se_in_ready;
  assign stall    = nz_valid && !nz_ready;

  for (genvar i = 0; i < N_SE; i++) begin : g_se
    // an end-of-matrix beat goes to every engine, a non-zero to one
    assign se_in_valid[i] = nz_valid && nz_ready && (nz_eom || sel == SEL_W'(i));

    sparse_engine #(
      .ROW_W(ROW_W), .COL_W(COL_W), .SPARSE_DEPTH(SPARSE_DEPTH),
      .FIFO_DEPTH(FIFO_DEPTH), .MLAT(MLAT), .ALAT(ALAT)
    ) u_se (
      .clk, .rst_n,
      .x_we, .x_addr, .x_data,
      .in_valid (se_in_valid[i]),
      .in_ready (se_in_ready[i]),
      .in_eom   (nz_eom),
      .in_row_col_id({nz_row[GROW_W-1 -: ROW_W], nz_col}),
      .in_val   (nz_val),
      .out_valid(se_out_valid[i]),
      .out_ready(se_grant[i]),
      .out_row  (se_out_row[i]),
      .out_data (se_out_data[i]),
      .busy     (se_busy[i])
    );
  end

  rr_arbiter #(.N(N_SE)) u_arb (
    .clk, .rst_n, .req(se_out_valid), .grant(se_grant)
  );

  always_comb begin
    res_wvalid = 1'b0;
    res_wrow   = '0;
    res_wdata  = '0;
    for (int i = 0; i < N_SE; i++) begin
      if (se_grant[i]) begin
        res_wvalid = 1'b1;
        res_wrow   = (N_SE > 1) ? {se_out_row[i], SEL_W'(i)} : GROW_W'(se_out_row[i]);
        res_wdata  = se_out_data[i];
      end
    end
  end

  result_ram #(.DEPTH(1 << GROW_W)) u_result (
    .clk, .rst_n,
    .clear (res_clear),
    .we    (res_wvalid),
    .waddr (res_wrow),
    .wdata (res_wdata),
    .raddr (res_raddr),
    .rdata (res_rdata)
  );

  assign conv_done = se_out_valid;
  assign busy      = |se_busy || |se_out_valid;

  // stream rule: a beat offered and not taken stays unchanged
  a_nz_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (nz_valid && !nz_ready) |=> (nz_valid && $stable({nz_eom, nz_row, nz_col, nz_val})));
  // every result written to the result memory comes from a granted engine
  a_one_write: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(se_grant));

  initial assert ((1 << $clog2(N_SE)) == N_SE) else $error("spmv_top: N_SE must be a power of two");

endmodule

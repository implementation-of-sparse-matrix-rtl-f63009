// Sparse Engine (SE): the computational unit of the design. It multiplies
// the rows it is given of a sparse matrix, streamed in compressed-row order,
// by the x vector held in its Coeff RAM.
//
// Contents: the controller, a Coeff RAM (x vector, 2**COL_W x 32), a
// Sparse RAM (non-zero values, SPARSE_DEPTH x 32), the row_cnt and col_id
// FIFOs (FIFO_DEPTH deep) and the floating point MAC. The x vector is
// written through x_we/x_addr/x_data before the matrix is streamed in. A
// non-zero is taken when in_valid and in_ready are both high: in_row_col_id
// holds its row index (upper ROW_W bits) and column index (lower COL_W
// bits), and in_val is its value; in_ready falls (a stall) while the
// row_cnt or col_id FIFO is full. A beat with in_eom closes the
// last row. Each finished row leaves on out_valid/out_row/out_data and is
// held until out_ready. busy is high while any row is queued or in work.
//
// Timing: a non-zero is written to the FIFOs and the Sparse RAM at the
// clock edge that takes it. When the engine is idle, a row's result appears
// row_cnt + MLAT + 4*ALAT + 14 clocks (row_cnt + 54 by default) after the
// beat that closes the row is taken: two clocks to start the row, one of
// RAM latency, then the MAC. Rows are processed one at a time, in arrival
// order.
//
// The set of blocks and their sizes follow the design description; the
// port handshakes and the in_eom beat are this implementation's choices.
module sparse_engine
  import spmv_pkg::fp32_t;
#(
  parameter int unsigned ROW_W        = spmv_pkg::ROW_W,
  parameter int unsigned COL_W        = spmv_pkg::COL_W,
  parameter int unsigned SPARSE_DEPTH = spmv_pkg::SPARSE_DEPTH,
  parameter int unsigned FIFO_DEPTH   = spmv_pkg::FIFO_DEPTH,
  parameter int unsigned MLAT         = spmv_pkg::MUL_LAT,
  parameter int unsigned ALAT         = spmv_pkg::ADD_LAT
) (
  input  logic             clk,
  input  logic             rst_n,
  // x vector load
  input  logic             x_we,
  input  logic [COL_W-1:0] x_addr,
  input  fp32_t            x_data,
  // non-zero stream
  input  logic             in_valid,
  output logic             in_ready,
  input  logic             in_eom,
  input  logic [ROW_W+COL_W-1:0] in_row_col_id,  // {row index, column index}
  input  fp32_t            in_val,
  // row results
  output logic             out_valid,
  input  logic             out_ready,
  output logic [ROW_W-1:0] out_row,
  output fp32_t            out_data,
  // status
  output logic             busy
);

  localparam int unsigned SP_AW = $clog2(SPARSE_DEPTH);
  localparam int unsigned RF_W  = ROW_W + COL_W;

  logic             rowf_push, rowf_pop, rowf_full, rowf_empty;
  logic [RF_W-1:0]  rowf_din, rowf_dout;
  logic             colf_push, colf_pop, colf_full, colf_empty;
  logic [COL_W-1:0] colf_din, colf_dout;
  logic             sp_we;
  logic [SP_AW-1:0] sp_waddr, sp_raddr;
  logic [COL_W-1:0] coeff_raddr;
  fp32_t            a_val, x_val;
  logic             mac_valid, mac_last, mac_idle, ctrl_busy;

  se_controller #(.ROW_W(ROW_W), .COL_W(COL_W), .SP_AW(SP_AW)) u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_eom, .in_row_col_id,
    .rowf_push, .rowf_din, .rowf_full, .rowf_pop, .rowf_dout, .rowf_empty,
    .colf_push, .colf_din, .colf_full, .colf_pop, .colf_dout, .colf_empty,
    .sp_we, .sp_waddr, .sp_raddr, .coeff_raddr,
    .mac_valid, .mac_last,
    .mac_done (out_valid && out_ready),
    .cur_row  (out_row),
    .busy     (ctrl_busy)
  );

  sync_fifo #(.WIDTH(RF_W), .DEPTH(FIFO_DEPTH)) u_row_fifo (
    .clk, .rst_n,
    .push(rowf_push), .din(rowf_din), .full(rowf_full),
    .pop(rowf_pop), .dout(rowf_dout), .empty(rowf_empty)
  );

  sync_fifo #(.WIDTH(COL_W), .DEPTH(FIFO_DEPTH)) u_col_fifo (
    .clk, .rst_n,
    .push(colf_push), .din(colf_din), .full(colf_full),
    .pop(colf_pop), .dout(colf_dout), .empty(colf_empty)
  );

  sdp_ram #(.WIDTH(32), .DEPTH(1 << COL_W)) u_coeff_ram (
    .clk, .we(x_we), .waddr(x_addr), .wdata(x_data),
    .raddr(coeff_raddr), .rdata(x_val)
  );

  sdp_ram #(.WIDTH(32), .DEPTH(SPARSE_DEPTH)) u_sparse_ram (
    .clk, .we(sp_we), .waddr(sp_waddr), .wdata(in_val),
    .raddr(sp_raddr), .rdata(a_val)
  );

  fp_mac #(.MLAT(MLAT), .ALAT(ALAT)) u_mac (
    .clk, .rst_n,
    .in_valid (mac_valid),
    .in_a     (a_val),
    .in_b     (x_val),
    .in_last  (mac_last),
    .idle     (mac_idle),
    .out_valid,
    .out_data,
    .out_ready
  );

  assign busy = ctrl_busy || !mac_idle;

  // result rule: a result offered and not taken stays unchanged
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid && !out_ready) |=> (out_valid && $stable({out_row, out_data})));

  // the Sparse RAM is written in step with the col_id FIFO, so it can hold
  // every queued value only if it is at least as deep
  initial assert (SPARSE_DEPTH >= FIFO_DEPTH) else $error("sparse_engine: Sparse RAM shallower than col_id FIFO");
  // a row is issued only once the first element of the next row (or the
  // end-of-matrix beat) has closed it, so the col_id FIFO must hold a full
  // row plus one more element or the stream would stall for ever
  initial assert (FIFO_DEPTH > (1 << COL_W)) else $error("sparse_engine: col_id FIFO shorter than a row");

endmodule

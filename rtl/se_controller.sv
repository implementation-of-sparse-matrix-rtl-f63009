// Sparse engine controller: turns the incoming stream of non-zeros into row
// counts and drives the row-by-row multiply-accumulate.
//
// Write side. Each non-zero arrives as a 12-bit row_col_id (row index in the
// upper 6 bits, column index in the lower 6 bits) with its value. The controller
// compares the row index with that of the previous non-zero: on a match the
// running row_cnt grows by one; otherwise the finished row is written to the
// row_cnt FIFO and a new count starts at one. Every column index is written
// to the col_id FIFO and every value to the Sparse RAM at the next write
// address. in_ready (the stall) is low while either FIFO is full. A beat
// with in_eom set carries no non-zero: it closes the open row at the end of
// a matrix.
//
// Read side. When a row entry is waiting in the row_cnt FIFO and the MAC is
// free, the controller pops it and then, one per cycle, pops row_cnt column
// indices, using each as the Coeff RAM read address while the Sparse RAM is
// read in order. One clock later (the RAM latency) the pair reaches the MAC
// with mac_last on the final element. It then waits for the MAC's result to
// be accepted (mac_done) before starting the next row; cur_row names the
// row of the result.
//
// Follows the description: the row-index comparison, the two FIFOs, the
// stall on a full FIFO and the use of col_id as the x read address. Own
// choices: each row_cnt FIFO entry also carries the row index and stores
// row_cnt - 1 (so a full row of 2**COL_W elements fits), the end-of-matrix
// beat, and the valid/ready handshakes.
//
// Two outputs are plain wires from inputs, by design: colf_din is the column
// field of the incoming row_col_id, and coeff_raddr is the col_id FIFO head.
module se_controller #(
  parameter int unsigned ROW_W = spmv_pkg::ROW_W,
  parameter int unsigned COL_W = spmv_pkg::COL_W,
  parameter int unsigned SP_AW = $clog2(spmv_pkg::SPARSE_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  // non-zero stream
  input  logic               in_valid,
  output logic               in_ready,
  input  logic               in_eom,
  input  logic [ROW_W+COL_W-1:0] in_row_col_id,   // {row index, column index}
  // row_cnt FIFO: {row index, row_cnt - 1}
  output logic               rowf_push,
  output logic [ROW_W+COL_W-1:0] rowf_din,
  input  logic               rowf_full,
  output logic               rowf_pop,
  input  logic [ROW_W+COL_W-1:0] rowf_dout,
  input  logic               rowf_empty,
  // col_id FIFO
  output logic               colf_push,
  output logic [COL_W-1:0]   colf_din,
  input  logic               colf_full,
  output logic               colf_pop,
  input  logic [COL_W-1:0]   colf_dout,
  input  logic               colf_empty,
  // Sparse RAM and Coeff RAM addresses
  output logic               sp_we,
  output logic [SP_AW-1:0]   sp_waddr,
  output logic [SP_AW-1:0]   sp_raddr,
  output logic [COL_W-1:0]   coeff_raddr,
  // MAC
  output logic               mac_valid,
  output logic               mac_last,
  input  logic               mac_done,
  output logic [ROW_W-1:0]   cur_row,
  // status
  output logic               busy
);

  // ---------------- write side ----------------
  logic             open_q;
  logic [ROW_W-1:0] wrow_q;
  logic [COL_W:0]   wcnt_q;     // elements in the open row, 1 .. 2**COL_W
  logic [SP_AW-1:0] wptr_q;
  logic             accept, same_row;
  logic [ROW_W-1:0] in_row;
  logic [COL_W-1:0] in_col;

  assign {in_row, in_col} = in_row_col_id;

  assign in_ready = !rowf_full && !colf_full;
  assign accept   = in_valid && in_ready;
  assign same_row = open_q && (in_row == wrow_q);

  always_comb begin
    rowf_push = 1'b0;
    rowf_din  = {wrow_q, wcnt_q[COL_W-1:0] - 1'b1};
    colf_push = accept && !in_eom;
    colf_din  = in_col;
    sp_we     = accept && !in_eom;
    sp_waddr  = wptr_q;
    if (accept && open_q && (in_eom || !same_row)) rowf_push = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      open_q <= 1'b0;
      wrow_q <= '0;
      wcnt_q <= '0;
      wptr_q <= '0;
    end else if (accept) begin
      if (in_eom) begin
        open_q <= 1'b0;
      end else begin
        wptr_q <= wptr_q + 1'b1;
        if (same_row) begin
          wcnt_q <= wcnt_q + 1'b1;
        end else begin
          open_q <= 1'b1;
          wrow_q <= in_row;
          wcnt_q <= 1;
        end
      end
    end
  end

  // ---------------- read side ----------------
  typedef enum logic [1:0] {R_IDLE, R_ISSUE, R_WAIT} rstate_t;
  rstate_t          rstate;
  logic [COL_W-1:0] remain_q;   // elements still to issue, minus one
  logic [SP_AW-1:0] rptr_q;
  logic [ROW_W-1:0] rrow_q;
  logic             issue;

  assign rowf_pop    = (rstate == R_IDLE) && !rowf_empty;
  assign issue       = (rstate == R_ISSUE) && !colf_empty;
  assign colf_pop    = issue;
  assign coeff_raddr = colf_dout;
  assign sp_raddr    = rptr_q;
  assign cur_row     = rrow_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rstate    <= R_IDLE;
      remain_q  <= '0;
      rptr_q    <= '0;
      rrow_q    <= '0;
      mac_valid <= 1'b0;
      mac_last  <= 1'b0;
    end else begin
      // RAM outputs are valid one clock after the read addresses
      mac_valid <= issue;
      mac_last  <= issue && (remain_q == '0);
      unique case (rstate)
        R_IDLE: if (!rowf_empty) begin
          rrow_q   <= rowf_dout[ROW_W+COL_W-1:COL_W];
          remain_q <= rowf_dout[COL_W-1:0];
          rstate   <= R_ISSUE;
        end
        R_ISSUE: if (issue) begin
          rptr_q   <= rptr_q + 1'b1;
          remain_q <= remain_q - 1'b1;
          if (remain_q == '0) rstate <= R_WAIT;
        end
        R_WAIT: if (mac_done) rstate <= R_IDLE;
        default: rstate <= R_IDLE;
      endcase
    end
  end

  assign busy = open_q || !rowf_empty || !colf_empty || (rstate != R_IDLE);

  // a row must not exceed the 2**COL_W columns its count can hold
  a_row_fits: assert property (@(posedge clk) disable iff (!rst_n)
                               (accept && !in_eom && same_row) |-> (wcnt_q < (COL_W + 1)'(1 << COL_W)));
  // every element of a row is queued before the row itself
  a_cols_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                 (rstate == R_ISSUE) |-> !colf_empty);

endmodule

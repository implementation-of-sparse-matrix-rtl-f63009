// Self-checking testbench of se_controller, connected to two small FIFOs
// (a 4-deep row_cnt FIFO, so that the stall happens often, and a col_id
// FIFO deeper than a full row) and to a MAC stand-in that
// acknowledges each row a random time after its last element.
//
// Checked: every row_cnt FIFO write ({row, row_cnt-1}) against the rows of
// the stream, including a full row of 64 elements and the row closed by the
// end-of-matrix beat; every col_id FIFO and Sparse RAM write; the order of
// the Coeff RAM and Sparse RAM read addresses and mac_last on each row's
// final element; cur_row during each row; no element issued before the
// previous row was acknowledged; and that the stall occurred.
module tb_se_controller;
  localparam int unsigned ROW_W = 6, COL_W = 6, SP_AW = 10, FD_ROW = 4, FD_COL = 128;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_eom = 1'b0, in_ready;
  logic [ROW_W+COL_W-1:0] in_row_col_id = '0;
  logic rowf_push, rowf_full, rowf_pop, rowf_empty;
  logic [ROW_W+COL_W-1:0] rowf_din, rowf_dout;
  logic colf_push, colf_full, colf_pop, colf_empty;
  logic [COL_W-1:0] colf_din, colf_dout;
  logic sp_we;
  logic [SP_AW-1:0] sp_waddr, sp_raddr;
  logic [COL_W-1:0] coeff_raddr;
  logic mac_valid, mac_last, mac_done = 1'b0, busy;
  logic [ROW_W-1:0] cur_row;

  int checks = 0, failures = 0, n_stall = 0;

  se_controller #(.ROW_W(ROW_W), .COL_W(COL_W), .SP_AW(SP_AW)) dut (.*);

  sync_fifo #(.WIDTH(ROW_W + COL_W), .DEPTH(FD_ROW)) u_rowf (
    .clk, .rst_n, .push(rowf_push), .din(rowf_din), .full(rowf_full),
    .pop(rowf_pop), .dout(rowf_dout), .empty(rowf_empty));
  sync_fifo #(.WIDTH(COL_W), .DEPTH(FD_COL)) u_colf (
    .clk, .rst_n, .push(colf_push), .din(colf_din), .full(colf_full),
    .pop(colf_pop), .dout(colf_dout), .empty(colf_empty));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("se_controller: %s", what);
    end
  endtask

  // expected streams
  logic [ROW_W+COL_W-1:0] exp_rows [$];   // row FIFO writes
  logic [COL_W-1:0]       exp_cols [$];   // col FIFO writes
  logic [COL_W-1:0]       iss_cols [$];   // read-side column order
  int                     iss_cnt  [$];
  logic [ROW_W-1:0]       iss_row  [$];
  int unsigned            wexp = 0, rexp = 0;

  // write-side monitor
  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) n_stall++;
    if (rowf_push) begin
      check(exp_rows.size() > 0 && rowf_din == exp_rows[0],
            $sformatf("row FIFO write %h expected %h", rowf_din, exp_rows.size() > 0 ? exp_rows[0] : 0));
      if (exp_rows.size() > 0) void'(exp_rows.pop_front());
    end
    if (colf_push) begin
      check(exp_cols.size() > 0 && colf_din == exp_cols[0], "col FIFO write out of order");
      if (exp_cols.size() > 0) void'(exp_cols.pop_front());
      check(sp_we && sp_waddr == SP_AW'(wexp), "Sparse RAM write address");
      wexp++;
    end
  end

  // read-side monitor and MAC stand-in
  int  left = 0;
  bit  waiting = 0;
  int  ack_delay = 0;
  logic [COL_W-1:0] pend_col;
  logic [SP_AW-1:0] pend_sp;
  bit  pend = 0;
  logic [ROW_W-1:0] row_now;
  always @(posedge clk) if (rst_n) begin
    mac_done <= 1'b0;
    if (mac_valid) begin
      check(!waiting, "element issued before the previous row was acknowledged");
      check(pend, "mac_valid without a read one clock earlier");
      if (left == 0) begin
        check(iss_cnt.size() > 0, "element issued for no row");
        left    = iss_cnt.pop_front();
        row_now = iss_row.pop_front();
      end
      check(pend_col == iss_cols.pop_front(), "Coeff RAM read address order");
      check(pend_sp == SP_AW'(rexp), "Sparse RAM read address order");
      rexp++;
      left--;
      check(mac_last == (left == 0), "mac_last on the wrong element");
      check(cur_row == row_now, "cur_row wrong during a row");
      if (mac_last) begin
        waiting   = 1;
        ack_delay = $urandom_range(20, 0);
      end
    end else if (waiting) begin
      if (ack_delay == 0) begin
        mac_done <= 1'b1;
        waiting  = 0;
      end else begin
        ack_delay--;
      end
    end
    pend     = colf_pop;
    pend_col = coeff_raddr;
    pend_sp  = sp_raddr;
  end

  task automatic send(bit eom, logic [ROW_W-1:0] r, logic [COL_W-1:0] c);
    @(negedge clk);
    in_valid = 1'b1; in_eom = eom; in_row_col_id = {r, c};
    // in_ready only changes on a clock edge: sample it half a cycle early
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    @(negedge clk);
    in_valid = 1'b0; in_eom = 1'b0;
  endtask

  initial begin
    int row, n;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 3; m++) begin
      row = int'($urandom_range(3, 0));
      while (row < 64) begin
        n = (row == 5) ? 64 : int'($urandom_range(12, 1));
        exp_rows.push_back({ROW_W'(row), COL_W'(n - 1)});
        iss_cnt.push_back(n);
        iss_row.push_back(ROW_W'(row));
        for (int k = 0; k < n; k++) begin
          logic [COL_W-1:0] c;
          c = (n == 64) ? COL_W'(k) : COL_W'($urandom);
          exp_cols.push_back(c);
          iss_cols.push_back(c);
          send(0, ROW_W'(row), c);
        end
        row += int'($urandom_range(3, 1));
      end
      send(1, '0, '0);
    end
    while (busy || waiting || mac_done) @(posedge clk);
    repeat (3) @(posedge clk);
    check(exp_rows.size() == 0 && exp_cols.size() == 0 && iss_cnt.size() == 0 && iss_cols.size() == 0,
          "not every row was written and issued");
    check(n_stall > 0, "the stall never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("se_controller: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

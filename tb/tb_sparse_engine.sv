// Self-checking testbench of one sparse_engine at its default sizes.
//
// Matrix 1 is a single row of 10 non-zeros closed by the end-of-matrix
// beat; its result must appear 3 + (MAC latency) cycles after that beat,
// the controller and RAM adding three clocks to the MAC's own latency.
// Matrix 2 has 64 rows with random lengths from 0 to 64 (one row full, some
// empty) streamed back to back, over 1024 non-zeros in all, so the col_id
// FIFO fills and the stream stalls. Each result must carry the right row
// index and equal the dot product rounded in the MAC's order; results are
// taken after random delays. x is a random 64-element vector.
module tb_sparse_engine;
  import spmv_pkg::*;
  import fp_ref_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  x_we = 1'b0;
  logic [5:0] x_addr = '0;
  fp32_t x_data = '0;
  logic  in_valid = 1'b0, in_ready, in_eom = 1'b0;
  logic [11:0] in_row_col_id = '0;
  fp32_t in_val = '0;
  logic  out_valid, out_ready = 1'b0, busy;
  logic [5:0] out_row;
  fp32_t out_data;

  int checks = 0, failures = 0, n_stall = 0, n_results = 0;
  int unsigned cycle = 0;

  sparse_engine dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("sparse_engine: %s", what);
    end
  endtask

  fp32_t x [64];
  // stream of beats: {eom, row, col, val}
  typedef struct packed { logic eom; logic [5:0] row; logic [5:0] col; fp32_t val; } beat_t;
  beat_t beats [$];
  // expected results in order
  logic [5:0] exp_row [$];
  fp32_t      exp_val [$];

  task automatic add_row(int r, int n);
    fp32_t qa [$];
    fp32_t qb [$];
    int cols [$];
    for (int c = 0; c < 64; c++) cols.push_back(c);
    cols.shuffle();
    for (int k = 0; k < n; k++) begin
      fp32_t v = rand_fp(6);
      beats.push_back('{1'b0, 6'(r), 6'(cols[k]), v});
      qa.push_back(v);
      qb.push_back(x[cols[k]]);
    end
    if (n > 0) begin
      exp_row.push_back(6'(r));
      exp_val.push_back(mac_ref(qa, qb, 8));
    end
  endtask

  task automatic stream(bit gaps);
    int i = 0;
    while (i < beats.size()) begin
      @(negedge clk);
      if (gaps && $urandom_range(9, 0) == 0) begin
        in_valid = 1'b0;
      end else begin
        in_valid = 1'b1;
        {in_eom, in_row_col_id, in_val} = beats[i];
        if (in_ready) i++;
        else n_stall++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    in_eom   = 1'b0;
    beats.delete();
  endtask

  // result collector with random back-pressure
  // out_ready is set at the falling edge; a result is taken at the next
  // rising edge if out_valid is high with it
  always @(negedge clk) begin
    out_ready = ($urandom_range(3, 0) != 0);
    if (out_valid && out_ready) begin
      n_results++;
      check(exp_row.size() > 0, "unexpected result");
      if (exp_row.size() > 0) begin
        check(out_row == exp_row[0], $sformatf("row %0d expected %0d", out_row, exp_row[0]));
        check(out_data == exp_val[0], $sformatf("row %0d: %h expected %h", out_row, out_data, exp_val[0]));
        void'(exp_row.pop_front());
        void'(exp_val.pop_front());
      end
    end
  end

  initial begin
    int t_eom, full_row;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      x[i] = rand_fp(6);
      x_we = 1'b1; x_addr = 6'(i); x_data = x[i];
    end
    @(negedge clk) x_we = 1'b0;

    // matrix 1: one row, latency from the end-of-matrix beat
    add_row(17, 10);
    beats.push_back('{1'b1, 6'd0, 6'd0, 32'd0});
    stream(0);
    t_eom = int'(cycle) - 1;
    while (!out_valid) @(negedge clk);
    check(int'(cycle) - t_eom == 3 + mac_latency(10, 8, 8, 8),
          $sformatf("row latency %0d, expected %0d", int'(cycle) - t_eom, 3 + mac_latency(10, 8, 8, 8)));
    while (busy) @(negedge clk);

    // matrix 2: 64 rows, one full, some empty
    full_row = int'($urandom_range(63, 0));
    for (int r = 0; r < 64; r++)
      add_row(r, (r == full_row) ? 64 : ((r % 9 == 4) ? 0 : int'($urandom_range(63, 16))));
    beats.push_back('{1'b1, 6'd0, 6'd0, 32'd0});
    stream(1);
    while (busy || exp_row.size() > 0) @(negedge clk);
    check(n_stall > 0, "the stall never happened");
    check(n_results == 1 + 64 - 7, $sformatf("%0d results", n_results));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("sparse_engine: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

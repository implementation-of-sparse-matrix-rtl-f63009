// End-to-end testbench of spmv_top at its default sizes (8 engines, 6-bit
// local row and column indices, 1024-entry FIFOs and Sparse RAMs, 512-row
// result memory, 8-cycle multiplier and adder).
//
// Matrix 1 is the 4 x 7 example of compressed-row storage
//     [10 6 0 0 0 0 0; 1 0 0 0 0 4 0; 0 3 0 0 0 0 0; 0 0 0 3 0 0 5]
// with x = (1, 2, ..., 7): y must be exactly (22, 25, 6, 47).
// Matrix 2 has 512 rows and 64 columns of random binary32 values. In rows
// 0-447 engine 3's rows hold 63 non-zeros and the others one, which floods
// engine 3's FIFOs and stalls the stream; rows 448-511 hold 1 to 40. Some
// rows are empty and several are full (64 non-zeros). Every y[i] read back
// from the result memory must equal the dot product rounded in the MAC's
// order, and empty rows must read zero after the clear. Each row must be
// written exactly once.
//
// Mechanisms counted, each of which must occur: the input stall (a full
// FIFO), two or more engines with a result waiting at once (arbitration),
// the end-of-matrix beat closing open rows, a full 64-element row, an
// empty row reading zero, and the result-memory clear.
module tb_spmv_top;
  import spmv_pkg::*;
  import fp_ref_pkg::*;

  localparam int NROWS = 512;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  x_we = 1'b0;
  logic [5:0] x_addr = '0;
  fp32_t x_data = '0;
  logic  nz_valid = 1'b0, nz_ready, nz_eom = 1'b0;
  logic [8:0] nz_row = '0;
  logic [5:0] nz_col = '0;
  fp32_t nz_val = '0;
  logic  res_clear = 1'b0;
  logic [8:0] res_raddr = '0;
  fp32_t res_rdata;
  logic  res_wvalid;
  logic [8:0] res_wrow;
  fp32_t res_wdata;
  logic [7:0] conv_done;
  logic  busy, stall;

  int checks = 0, failures = 0;
  int n_stall = 0, n_arb = 0, n_eom = 0, n_full = 0, n_empty = 0, n_clear = 0;
  int unsigned cycle = 0;

  spmv_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("spmv_top: %s", what);
    end
  endtask

  fp32_t x [64];
  typedef struct packed { logic eom; logic [8:0] row; logic [5:0] col; fp32_t val; } beat_t;
  beat_t beats [$];
  fp32_t exp_y [NROWS];
  bit    has_nz [NROWS];
  int    writes [NROWS];

  always @(negedge clk) begin
    if (res_wvalid) writes[res_wrow]++;
    if ($countones(conv_done) > 1) n_arb++;
  end

  task automatic load_x();
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      x_we = 1'b1; x_addr = 6'(i); x_data = x[i];
    end
    @(negedge clk) x_we = 1'b0;
  endtask

  task automatic add_row(int r, int cols [$], fp32_t vals [$]);
    fp32_t qb [$];
    foreach (cols[k]) begin
      beats.push_back('{1'b0, 9'(r), 6'(cols[k]), vals[k]});
      qb.push_back(x[cols[k]]);
    end
    has_nz[r] = (cols.size() > 0);
    exp_y[r]  = (cols.size() > 0) ? mac_ref(vals, qb, 8) : 32'd0;
  endtask

  task automatic stream();
    int i = 0;
    while (i < beats.size()) begin
      @(negedge clk);
      nz_valid = 1'b1;
      {nz_eom, nz_row, nz_col, nz_val} = beats[i];
      if (nz_ready) begin
        if (nz_eom) n_eom++;
        i++;
      end else begin
        n_stall++;
      end
    end
    @(negedge clk);
    nz_valid = 1'b0;
    nz_eom   = 1'b0;
    beats.delete();
  endtask

  task automatic clear_results();
    @(negedge clk) res_clear = 1'b1;
    @(negedge clk) res_clear = 1'b0;
    n_clear++;
    foreach (writes[i]) writes[i] = 0;
  endtask

  task automatic read_back(int nrows);
    for (int r = 0; r < nrows; r++) begin
      @(negedge clk) res_raddr = 9'(r);
      @(negedge clk);
      check(res_rdata === exp_y[r], $sformatf("y[%0d] = %h, expected %h", r, res_rdata, exp_y[r]));
      check(writes[r] == (has_nz[r] ? 1 : 0), $sformatf("row %0d written %0d times", r, writes[r]));
      if (!has_nz[r] && res_rdata === 32'd0) n_empty++;
    end
  endtask

  initial begin
    int cols [$];
    fp32_t vals [$];
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- matrix 1: the 4 x 7 compressed-row example ----
    foreach (x[i]) x[i] = to_fp32(real'(i + 1));
    load_x();
    clear_results();
    foreach (has_nz[i]) begin has_nz[i] = 0; exp_y[i] = 32'd0; end
    // columns are 0-based here: the example's columns 1..7 are 0..6
    add_row(0, '{0, 1}, '{to_fp32(10.0), to_fp32(6.0)});
    add_row(1, '{0, 5}, '{to_fp32(1.0), to_fp32(4.0)});
    add_row(2, '{1},    '{to_fp32(3.0)});
    add_row(3, '{3, 6}, '{to_fp32(3.0), to_fp32(5.0)});
    beats.push_back('{1'b1, 9'd0, 6'd0, 32'd0});
    stream();
    while (busy) @(negedge clk);
    check(exp_y[0] == to_fp32(22.0) && exp_y[1] == to_fp32(25.0) &&
          exp_y[2] == to_fp32(6.0) && exp_y[3] == to_fp32(47.0), "reference model of the example");
    read_back(8);

    // ---- matrix 2: 512 x 64, random ----
    foreach (x[i]) x[i] = rand_fp(6);
    load_x();
    clear_results();
    t0 = int'(cycle);
    for (int r = 0; r < NROWS; r++) begin
      int n;
      if (r % 61 == 7)       n = 64;
      else if (r % 13 == 5)  n = 0;
      else if (r < 448)      n = (r % 8 == 3) ? 63 : 1;  // loads engine 3
      else                   n = int'($urandom_range(40, 1));
      if (n == 64) n_full++;
      cols.delete();
      vals.delete();
      for (int c = 0; c < 64; c++) cols.push_back(c);
      cols.shuffle();
      while (cols.size() > n) void'(cols.pop_back());
      for (int k = 0; k < n; k++) vals.push_back(rand_fp(6));
      add_row(r, cols, vals);
    end
    beats.push_back('{1'b1, 9'd0, 6'd0, 32'd0});
    stream();
    while (busy) @(negedge clk);
    $display("spmv_top: 512-row matrix done in %0d cycles", int'(cycle) - t0);
    read_back(NROWS);

    // ---- every mechanism must have happened ----
    check(n_stall > 0, "the input stall never happened");
    check(n_arb > 0, "engines never competed for the result memory");
    check(n_eom == 2, "end-of-matrix beats");
    check(n_full > 0, "no full row");
    check(n_empty > 0, "no empty row read back as zero");
    check(n_clear == 2, "result clear");
    $display("spmv_top: stall cycles %0d, arbitration cycles %0d, end-of-matrix %0d, full rows %0d, empty rows %0d, clears %0d",
             n_stall, n_arb, n_eom, n_full, n_empty, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("spmv_top: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Workload testbench of spmv_top at its default sizes: random 512 x 64
// matrices at densities of 2 %, 5 % and 9 % non-zeros (the design was aimed
// at matrices with fewer than 9 % non-zeros). Each element is non-zero with
// the given probability, x is random, and every y[i] read back must equal
// the dot product rounded in the MAC's order; rows left empty must read 0.
// The cycles from the first non-zero to the last result, and the products
// per cycle this gives, are printed for each density.
module tb_spmv_density;
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
  int unsigned cycle = 0;

  spmv_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("spmv_density: %s", what);
    end
  endtask

  fp32_t x [64];
  typedef struct packed { logic eom; logic [8:0] row; logic [5:0] col; fp32_t val; } beat_t;
  beat_t beats [$];
  fp32_t exp_y [NROWS];

  task automatic run(int percent);
    int nnz = 0, t0, cyc;
    int i;
    // x
    for (int c = 0; c < 64; c++) begin
      @(negedge clk);
      x[c] = rand_fp(6);
      x_we = 1'b1; x_addr = 6'(c); x_data = x[c];
    end
    @(negedge clk) x_we = 1'b0;
    @(negedge clk) res_clear = 1'b1;
    @(negedge clk) res_clear = 1'b0;
    // matrix
    for (int r = 0; r < NROWS; r++) begin
      fp32_t qa [$];
      fp32_t qb [$];
      for (int c = 0; c < 64; c++) begin
        if ($urandom_range(99, 0) < percent) begin
          fp32_t v = rand_fp(6);
          beats.push_back('{1'b0, 9'(r), 6'(c), v});
          qa.push_back(v);
          qb.push_back(x[c]);
        end
      end
      nnz += qa.size();
      exp_y[r] = (qa.size() > 0) ? mac_ref(qa, qb, 8) : 32'd0;
    end
    beats.push_back('{1'b1, 9'd0, 6'd0, 32'd0});
    // stream
    t0 = int'(cycle);
    i = 0;
    while (i < beats.size()) begin
      @(negedge clk);
      nz_valid = 1'b1;
      {nz_eom, nz_row, nz_col, nz_val} = beats[i];
      if (nz_ready) i++;
    end
    @(negedge clk);
    nz_valid = 1'b0;
    nz_eom   = 1'b0;
    beats.delete();
    while (busy) @(negedge clk);
    cyc = int'(cycle) - t0;
    $display("spmv_density: %0d %% non-zeros, %0d non-zeros, %0d cycles, %0.2f products per cycle",
             percent, nnz, cyc, real'(nnz) / real'(cyc));
    // read back
    for (int r = 0; r < NROWS; r++) begin
      @(negedge clk) res_raddr = 9'(r);
      @(negedge clk);
      check(res_rdata === exp_y[r], $sformatf("%0d %%: y[%0d] = %h, expected %h", percent, r, res_rdata, exp_y[r]));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(2);
    run(5);
    run(9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("spmv_density: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench of fp_mac: rows of 1 to 70 random elements, fed
// back to back, must give the dot product rounded exactly as the MAC's
// partial-sum order rounds it, and reach conv_done after the expected number
// of cycles. The result is accepted after a random delay, during which the
// MAC must hold it; idle must be high between rows.
module tb_fp_mac;
  import spmv_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned MLAT  = 8;
  localparam int unsigned ALAT  = 8;
  localparam int unsigned SLOTS = 8;
  localparam int NROWS = 200;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0, in_last = 1'b0, out_ready = 1'b0;
  fp32_t in_a = '0, in_b = '0;
  logic  idle, out_valid;
  fp32_t out_data;

  int checks = 0, failures = 0;
  int unsigned cycle = 0;

  fp_mac #(.MLAT(MLAT), .ALAT(ALAT)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("fp_mac: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < NROWS; r++) begin
      fp32_t qa [$];
      fp32_t qb [$];
      fp32_t expv;
      int n, t0, lat, hold;
      qa.delete();
      qb.delete();
      n = (r < 10) ? r + 1 : int'($urandom_range(70, 1));
      for (int k = 0; k < n; k++) begin
        qa.push_back(rand_fp(8));
        qb.push_back(rand_fp(8));
      end
      expv = mac_ref(qa, qb, SLOTS);
      @(negedge clk);
      check(idle === 1'b1, "not idle between rows");
      t0 = int'(cycle);
      for (int k = 0; k < n; k++) begin
        in_valid = 1'b1; in_a = qa[k]; in_b = qb[k]; in_last = (k == n - 1);
        @(negedge clk);
      end
      in_valid = 1'b0; in_last = 1'b0;
      while (!out_valid) @(negedge clk);
      lat = int'(cycle) - t0;
      check(lat == mac_latency(n, MLAT, ALAT, SLOTS),
            $sformatf("row %0d (n=%0d): latency %0d, expected %0d", r, n, lat,
                      mac_latency(n, MLAT, ALAT, SLOTS)));
      hold = int'($urandom_range(3, 0));
      repeat (hold) begin
        @(negedge clk);
        check(out_valid === 1'b1, "result dropped before out_ready");
      end
      check(out_data === expv, $sformatf("row %0d (n=%0d): got %h expected %h", r, n, out_data, expv));
      out_ready = 1'b1;
      @(negedge clk);
      out_ready = 1'b0;
      check(out_valid === 1'b0, "conv_done stays high after the result was taken");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("fp_mac: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench of result_ram: rows never written read as zero,
// written rows read back their value one clock later, a write to the row
// being read is returned at once, and clear makes every row read zero again.
module tb_result_ram;
  localparam int unsigned D  = 64;
  localparam int unsigned AW = $clog2(D);

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          clear = 1'b0, we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [31:0]   wdata = '0;
  logic [31:0]   rdata;

  int checks = 0, failures = 0, n_clear = 0, n_bypass = 0;
  logic [31:0] model [D];
  bit          valid [D];
  logic [31:0] expect_q;
  bit          expect_v = 0;

  result_ram #(.DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    foreach (valid[i]) valid[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (expect_v) begin
        checks++;
        if (rdata !== expect_q) begin
          failures++;
          if (failures < 10) $display("result_ram: read %h expected %h", rdata, expect_q);
        end
      end
      clear = ($urandom_range(499, 0) == 0);
      we    = !clear && ($urandom_range(3, 0) == 0);
      waddr = AW'($urandom);
      wdata = $urandom;
      raddr = ($urandom_range(7, 0) == 0) ? waddr : AW'($urandom);
      if (clear) begin
        n_clear++;
        expect_q = 32'd0;
        foreach (valid[k]) valid[k] = 0;
      end else if (we && waddr == raddr) begin
        n_bypass++;
        expect_q = wdata;
      end else begin
        expect_q = valid[raddr] ? model[raddr] : 32'd0;
      end
      expect_v = 1;
      if (we) begin
        model[waddr] = wdata;
        valid[waddr] = 1;
      end
    end
    checks++;
    if (n_clear == 0 || n_bypass == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("result_ram: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

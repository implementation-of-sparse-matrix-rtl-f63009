// Self-checking testbench of sdp_ram: random writes and reads against an
// array model, with one-cycle read latency, and reads of the address being
// written in the same cycle, which must return the new data (write first).
module tb_sdp_ram;
  localparam int unsigned W = 32;
  localparam int unsigned D = 64;
  localparam int unsigned AW = $clog2(D);

  logic          clk = 1'b0;
  logic          we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0]  wdata = '0;
  logic [W-1:0]  rdata;

  int checks = 0, failures = 0, n_collide = 0;
  logic [W-1:0] model [D];
  logic [W-1:0] expect_q;
  bit           expect_v = 0;

  sdp_ram #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    // fill every word first so all reads are defined
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = $urandom; model[i] = wdata;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (expect_v) begin
        checks++;
        if (rdata !== expect_q) begin
          failures++;
          if (failures < 10) $display("sdp_ram: read %h expected %h", rdata, expect_q);
        end
      end
      we    = $urandom_range(1, 0);
      waddr = AW'($urandom);
      wdata = $urandom;
      raddr = ($urandom_range(3, 0) == 0) ? waddr : AW'($urandom);
      if (we && waddr == raddr) n_collide++;
      expect_q = (we && waddr == raddr) ? wdata : model[raddr];
      expect_v = 1;
      if (we) model[waddr] = wdata;
    end
    checks++;
    if (n_collide == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("sdp_ram: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench of sync_fifo: random pushes and pops, including
// simultaneous ones, against a queue model; the head word, empty and full
// are compared every cycle, and the FIFO is filled to full and drained to
// empty several times.
module tb_sync_fifo;
  localparam int unsigned W = 6;
  localparam int unsigned D = 16;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         push = 1'b0, pop = 1'b0;
  logic [W-1:0] din = '0;
  logic         full, empty;
  logic [W-1:0] dout;

  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0;
  logic [W-1:0] model [$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("sync_fifo: %s", what);
    end
  endtask

  initial begin
    int phase;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), $sformatf("empty=%0b with %0d words", empty, model.size()));
      check(full == (model.size() == D), $sformatf("full=%0b with %0d words", full, model.size()));
      if (model.size() > 0) check(dout == model[0], $sformatf("head %0h expected %0h", dout, model[0]));
      if (full) n_full++;
      if (empty) n_empty++;
      // alternate between filling and draining phases
      phase = (i / 200) % 2;
      push = !full && ($urandom_range(99, 0) < (phase ? 30 : 70));
      pop  = !empty && ($urandom_range(99, 0) < (phase ? 70 : 30));
      din  = W'($urandom);
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin
      failures++;
      $display("sync_fifo: never full (%0d) or never empty (%0d)", n_full, n_empty);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("sync_fifo: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

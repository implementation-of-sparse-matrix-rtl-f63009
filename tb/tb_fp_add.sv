// Self-checking testbench of fp_add: random normal operands with exponents
// close enough for double precision to give the exact sum, plus cancellation,
// far-apart exponents, zero, infinity, NaN, overflow and underflow cases,
// issued back to back; every result must leave exactly LATENCY cycles after
// its operands.
module tb_fp_add;
  import spmv_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned LAT = 8;
  localparam int unsigned N   = 3000;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  in_valid = 1'b0;
  fp32_t a = '0, b = '0;
  logic [15:0] in_tag = '0;
  logic  out_valid;
  fp32_t y;
  logic [15:0] out_tag;

  int checks = 0, failures = 0;
  int unsigned cycle = 0;

  fp_add #(.LATENCY(LAT), .TAG_W(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  fp32_t exp_y   [N];
  int unsigned issue_cyc [N];
  int n_out = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (y !== exp_y[out_tag] || cycle - issue_cyc[out_tag] != LAT) begin
        failures++;
        if (failures < 10)
          $display("fp_add mismatch #%0d: got %h exp %h, latency %0d", out_tag, y, exp_y[out_tag],
                   cycle - issue_cyc[out_tag]);
      end
      n_out++;
    end
  end

  initial begin
    fp32_t sa [N];
    fp32_t sb [N];
    for (int i = 0; i < N; i++) begin
      sa[i] = rand_fp(14);
      sb[i] = rand_fp(14);
      case (i % 50)
        1: sa[i] = 32'h0000_0000;
        2: sb[i] = 32'h8000_0000;
        3: sa[i] = 32'h7F80_0000;
        4: begin sa[i] = 32'h7F80_0000; sb[i] = 32'hFF80_0000; end
        5: sb[i] = 32'h7FC0_1234;
        6: begin sa[i] = {1'b0, 8'd254, 23'h7FFFFF}; sb[i] = {1'b0, 8'd254, 23'h5}; end  // overflow
        7: begin sa[i] = {1'b0, 8'd1, 23'h1}; sb[i] = {1'b1, 8'd1, 23'h0}; end  // underflow
        8: sb[i] = {~sa[i][31], sa[i][30:0]};  // exact cancellation
        9: sb[i] = {sb[i][31], 8'd60, sb[i][22:0]};  // far smaller
        10: begin sa[i] = 32'h3F80_0000; sb[i] = 32'hB380_0000; end  // 1 - 2^-24
        11: begin sa[i] = 32'h3F80_0000; sb[i] = 32'h3380_0000; end  // tie, stays even
        12: begin sa[i] = 32'h3F80_0001; sb[i] = 32'h3380_0000; end  // tie, rounds up
        default: ;
      endcase
      if (sa[i][30:23] == 8'hFF || sb[i][30:23] == 8'hFF) begin
        if ((sa[i][30:23] == 8'hFF && sa[i][22:0] != 0) || (sb[i][30:23] == 8'hFF && sb[i][22:0] != 0) ||
            (sa[i][30:23] == 8'hFF && sb[i][30:23] == 8'hFF && sa[i][31] != sb[i][31]))
          exp_y[i] = 32'h7FC0_0000;
        else
          exp_y[i] = (sa[i][30:23] == 8'hFF) ? sa[i] : sb[i];
      end else if (sa[i][30:23] == 8'h00 && sb[i][30:23] == 8'h00) begin
        exp_y[i] = {sa[i][31] & sb[i][31], 31'd0};
      end else if (sa[i][30:23] == 8'h00) begin
        exp_y[i] = sb[i];
      end else if (sb[i][30:23] == 8'h00) begin
        exp_y[i] = sa[i];
      end else if (i % 50 == 9) begin
        exp_y[i] = sa[i];  // the smaller operand is far below half an ulp
      end else begin
        exp_y[i] = add_ref(sa[i], sb[i]);
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      in_valid = 1'b1; a = sa[i]; b = sb[i]; in_tag = 16'(i);
      issue_cyc[i] = cycle;
      if (i % 7 == 3) begin
        @(negedge clk);
        in_valid = 1'b0;
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (n_out != N) begin
      failures++;
      $display("fp_add: %0d results for %0d operations", n_out, N);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("fp_add: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

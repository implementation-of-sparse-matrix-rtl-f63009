// Round-robin arbiter: grants at most one of N requesters per cycle.
//
// The search for a request starts one place after the last requester
// granted, so every requester that keeps asking is served within N grants.
// grant is one-hot and combinational from req; the priority pointer moves
// on the clock edge after a grant. It merges the result streams of the
// sparse engines onto the single write port of the result memory, a
// connection the design description leaves open.
module rr_arbiter #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] grant
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last_q;

  always_comb begin
    logic [IW-1:0] idx;
    grant = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      idx = IW'((int'(last_q) + k) % N);
      if (req[idx] && grant == '0) grant[idx] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      last_q <= IW'(N - 1);
    end else begin
      for (int unsigned i = 0; i < N; i++)
        if (grant[i]) last_q <= IW'(i);
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));

endmodule

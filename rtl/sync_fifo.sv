// Single-clock FIFO, used for the engine's row_cnt FIFO and col_id FIFO.
//
// The storage is an array of DEPTH words with binary read and write
// pointers one bit wider than the address, so that full and empty are told
// apart by the extra bit. The head word is shown on dout whenever empty is
// low (show-ahead); pop removes it at the next clock edge. A push and a pop
// may happen in the same cycle. full and empty are decoded from registered
// pointers, so they are clean to use as stall and issue conditions.
// The 1024-word depth follows the design description; the show-ahead read
// is this implementation's choice.
module sync_fifo #(
  parameter int unsigned WIDTH = 6,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [WIDTH-1:0]           din,
  output logic                       full,
  input  logic                       pop,
  output logic [WIDTH-1:0]           dout,
  output logic                       empty
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;

  assign empty = (wptr == rptr);
  assign full  = (wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]);
  assign dout  = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (push && !full) wptr <= wptr + 1'b1;
      if (pop && !empty) rptr <= rptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push && !full) mem[wptr[AW-1:0]] <= din;
  end

  // a full FIFO drops a push and an empty one ignores a pop: callers must not
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

  initial assert (DEPTH >= 2 && (1 << AW) == DEPTH) else $error("sync_fifo: DEPTH must be a power of two");

endmodule

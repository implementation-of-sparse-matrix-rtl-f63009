// Simple dual-port block RAM: one write port and one read port on the same
// clock, used for the Coeff RAM (the x vector, 64 x 32) and the Sparse RAM
// (the non-zero values, 1024 x 32) of each sparse engine.
//
// The read is synchronous: rdata shows mem[raddr] one clock after raddr is
// presented. When the write and the read hit the same address in the same
// cycle the new data is returned ("write first, read next", as the design
// description configures its dual-port RAM). No reset: the contents are
// undefined until written.
module sdp_ram #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (we && waddr == raddr) rdata <= wdata;
    else                      rdata <= mem[raddr];
  end

endmodule

// Result BRAM: holds one binary32 result per matrix row, written by the
// sparse engines as rows complete and read back by the host.
//
// A simple dual-port memory of DEPTH words plus one "written" flag per row.
// clear resets every flag in one cycle, so a new matrix starts from an
// all-zero result vector without rewriting the memory: a row that never
// receives a result (a row with no non-zeros) reads as +0.0. The read is
// synchronous, one clock from raddr to rdata, and a write to the address
// being read returns the new data. The description only names this memory;
// the flags and the clear are this implementation's choices.
module result_ram
  import spmv_pkg::*;
#(
  parameter int unsigned DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  fp32_t                    wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output fp32_t                    rdata
);

  fp32_t             mem_q;
  logic [DEPTH-1:0]  written;
  logic              flag_q;

  sdp_ram #(.WIDTH(32), .DEPTH(DEPTH)) u_mem (
    .clk, .we, .waddr, .wdata, .raddr, .rdata(mem_q)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      written <= '0;
      flag_q  <= 1'b0;
    end else begin
      if (clear)   written        <= '0;
      else if (we) written[waddr] <= 1'b1;
      flag_q <= (we && waddr == raddr && !clear) || (written[raddr] && !clear);
    end
  end

  assign rdata = flag_q ? mem_q : 32'd0;

endmodule

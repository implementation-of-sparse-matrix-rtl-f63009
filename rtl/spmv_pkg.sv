// Shared types and default sizes of the sparse matrix-vector multiplier.
//
// All arithmetic is IEEE-754 single precision (binary32). The default sizes
// are those of the engine: a 6-bit row index and a 6-bit column index per
// non-zero (the 12-bit row_col_id word, so a 64-entry coefficient (x) memory),
// a 1024-entry sparse value memory, 1024-entry FIFOs, 8-cycle multiplier and
// adder, and 8 sparse engines side by side. The split of the 12-bit
// row_col_id into two 6-bit fields and the 8 engines follow the design
// description; the quiet-NaN encoding is this implementation's choice.
package spmv_pkg;

  typedef logic [31:0] fp32_t;

  localparam int unsigned ROW_W        = 6;     // row index bits in row_col_id
  localparam int unsigned COL_W        = 6;     // column index bits in row_col_id
  localparam int unsigned SPARSE_DEPTH = 1024;  // Sparse RAM 1024 x 32
  localparam int unsigned FIFO_DEPTH   = 1024;  // FIFO row_cnt / col_id depth
  localparam int unsigned MUL_LAT      = 8;     // multiplier latency, cycles
  localparam int unsigned ADD_LAT      = 8;     // adder latency, cycles
  localparam int unsigned N_SE         = 8;     // sparse engines in parallel

  localparam fp32_t FP_QNAN = 32'h7FC0_0000;
  localparam fp32_t FP_PINF = 32'h7F80_0000;

endpackage

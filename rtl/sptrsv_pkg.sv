// Shared types and constants of the level-scheduled sparse triangular solver
// (SPTRSV, forward substitution L x = b with L lower triangular in CSR form).
//
// Numbers are IEEE-754 single precision, the "float" of the kernels. Indices
// and pointers are 32-bit words, as the int arrays row_ptr, col_idx, iorder and
// ilevels are on the host. Global memory is word addressed (one 32-bit word
// per address). The beat structs below are the payloads of the channels that
// join the memory kernel to the compute kernel.
package sptrsv_pkg;

  typedef logic [31:0] fp32_t;
  typedef logic [31:0] idx_t;

  // Word address into the 1 GB global memory (2^28 words of 4 bytes).
  localparam int unsigned GADDR_W = 28;
  typedef logic [GADDR_W-1:0] gaddr_t;

  localparam fp32_t FP32_QNAN = 32'h7fc0_0000;
  localparam fp32_t FP32_ZERO = 32'h0000_0000;

  // Row-size channel: one beat per row, carrying the row number and its
  // number of stored entries (the diagonal included).
  typedef struct packed {
    idx_t row;
    idx_t nnz;
  } row_beat_t;

  // Result channel (the return half of the x exchange): a solved unknown.
  typedef struct packed {
    idx_t  row;
    fp32_t x;
  } res_beat_t;

  // Classification of an operand, used by the floating-point units.
  typedef enum logic [1:0] {FP_ZERO, FP_NORM, FP_INF, FP_NAN} fp_class_t;

  // Denormal inputs are treated as zero (flush to zero).
  function automatic fp_class_t fp_classify(logic [30:0] v);
    if (v[30:23] == 8'd0)   return FP_ZERO;
    if (v[30:23] == 8'hff)  return (v[22:0] == 23'd0) ? FP_INF : FP_NAN;
    return FP_NORM;
  endfunction

endpackage

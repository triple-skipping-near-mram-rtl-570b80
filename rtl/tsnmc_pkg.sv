// tsnmc_pkg -- sizes and types shared by the triple-skipping near-MRAM
// computing (TS-NMC) blocks.
//
// A processing element (PE) multiplies a vector of VEC_LEN activations by a
// vector of VEC_LEN weights, each DATA_W bits wide. One weight vector is one
// row of the MRAM core array (VEC_W data bits plus one sparse-flag bit); the
// core array has CORE_ROWS rows in each of CORE_SUBS sub-arrays that share
// their peripherals. The activation vector sits in a two-bank (ping-pong)
// MRAM buffer. These numbers follow the paper's 64x65x2 core array and
// 8x9x2 buffer. The partial-sum and accumulator widths are this design's own
// choice, sized so that no sum can overflow.
package tsnmc_pkg;

  localparam int unsigned DATA_W    = 8;                  // bits per element (j)
  localparam int unsigned VEC_LEN   = 8;                  // elements per vector (i)
  localparam int unsigned VEC_W     = DATA_W * VEC_LEN;   // n = i*j = 64
  localparam int unsigned CORE_ROWS = 64;                 // rows per sub-array
  localparam int unsigned CORE_SUBS = 2;                  // sub-arrays sharing peripherals
  localparam int unsigned CORE_DEPTH = CORE_ROWS * CORE_SUBS;
  localparam int unsigned ROW_AW    = $clog2(CORE_DEPTH); // {sub-array, row}
  localparam int unsigned BUF_BANKS = 2;                  // ping-pong banks

  // |sum of VEC_LEN products of an unsigned DATA_W activation and a signed
  // DATA_W weight| < VEC_LEN * 2^(2*DATA_W-1), so one bit of headroom plus sign.
  localparam int unsigned PSUM_W    = 2 * DATA_W + $clog2(VEC_LEN) + 1;   // 20
  localparam int unsigned ACC_W     = 32;                 // engine accumulator

  typedef logic [VEC_W-1:0]         vec_t;
  typedef logic [VEC_LEN-1:0]       plane_t;   // one bit of every element
  typedef logic signed [PSUM_W-1:0] psum_t;
  typedef logic [ROW_AW-1:0]        row_addr_t;

  // Element k of a packed vector occupies bits [DATA_W*k +: DATA_W].
  function automatic plane_t bit_plane(vec_t v, int unsigned m);
    plane_t p;
    for (int unsigned k = 0; k < VEC_LEN; k++) p[k] = v[DATA_W*k + m];
    return p;
  endfunction

endpackage

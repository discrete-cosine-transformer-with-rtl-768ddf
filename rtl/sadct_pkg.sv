// sadct_pkg - constants, types and the DCT basis shared by the SA-DCT/IDCT core.
//
// The core works on 8x8 blocks (BLK) whose columns and rows hold 0..8 object
// pixels. Every N-point 1D transform (N = 1..8) is the orthonormal DCT
//   C(u) = sqrt(2/N) * alpha(u) * sum_n f(n) * cos(pi*u*(2n+1)/(2N)),
//   alpha(0) = 1/sqrt(2), alpha(u) = 1 otherwise,
// whose inverse uses the same basis values. basis_coef() returns one basis
// value in signed fixed point with COEF_FRAC fractional bits, rounded to the
// nearest integer; the coefficient ROM is built from it at elaboration time.
// The block size, the transform and the 16-bit data width follow the source
// design; the coefficient word (14 bits, 12 fractional) is this design's choice.
package sadct_pkg;

  localparam int BLK       = 8;   // block edge: 8x8 pixels
  localparam int HALF      = 4;   // inputs of one 1x4 matrix calculator
  localparam int IDX_W     = 3;   // index of a pixel within a column/row
  localparam int CNT_W     = 4;   // pixel count 0..8
  localparam int KIDX_W    = 2;   // cycle index within a vector, 0..3
  localparam int DATA_W    = 16;  // pixel / coefficient word
  localparam int COEF_W    = 14;  // basis coefficient word
  localparam int COEF_FRAC = 12;  // fractional bits of a basis coefficient

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic [BLK-1:0]           shape_t;   // bit n = pixel n is in the object
  typedef logic [CNT_W-1:0]         cnt_t;
  typedef logic [IDX_W-1:0]         idx_t;
  typedef logic [KIDX_W-1:0]        kidx_t;

  // One output sample of the core: its position in the 8x8 block and value.
  typedef struct packed {
    logic  valid;
    idx_t  row;
    idx_t  col;
    data_t value;
  } sample_t;

  // Pass of the controller. A DCT block runs COL_IN then ROW_MEM; an IDCT block
  // runs SHAPE, ROW_IN, then COL_MEM. START is the idle state ahead of a block.
  typedef enum logic [2:0] {
    PH_START   = 3'd0,
    PH_SHAPE   = 3'd1,   // IDCT: load the packed shape of each column
    PH_COL_IN  = 3'd2,   // DCT: vertical transforms of input columns
    PH_ROW_MEM = 3'd3,   // DCT: horizontal transforms of stored rows
    PH_ROW_IN  = 3'd4,   // IDCT: horizontal inverse transforms of input rows
    PH_COL_MEM = 3'd5    // IDCT: vertical inverse transforms of stored columns
  } phase_e;

  localparam real PI = 3.14159265358979323846;

  // Basis value of the n-th sample in the u-th N-point DCT basis vector,
  // rounded to fixed point with `frac` fractional bits. Zero outside 0..N-1.
  function automatic int basis_coef(int npt, int u, int n, int frac);
    real r;
    if (npt < 1 || u < 0 || n < 0 || u >= npt || n >= npt) return 0;
    // cos(pi*u/2) is exactly zero for odd u at the middle sample of odd N
    if ((2 * n + 1) == npt && (u % 2) == 1) return 0;
    r = $sqrt(2.0 / npt) * ((u == 0) ? $sqrt(0.5) : 1.0)
        * $cos(PI * u * (2 * n + 1) / (2.0 * npt)) * (2.0 ** frac);
    return (r >= 0.0) ? $rtoi(r + 0.5) : -$rtoi(-r + 0.5);
  endfunction

endpackage

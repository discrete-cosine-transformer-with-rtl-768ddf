// coef_rom - coefficient ROM of the 1D-DCT/IDCT block.
//
// Supplies coeff0..coeff3 of the even and the odd 1x4 matrix calculator for a
// transform length N (1..8), the cycle k within the vector (0..3) and the
// direction. The entries are the orthonormal DCT basis values of sadct_pkg,
// computed when the design is elaborated, so the table is a constant ROM of
// 2 x 9 x 4 words of 8 coefficients.
//   DCT, cycle k: even unit row 2k, odd unit row 2k+1 of the folded matrices,
//     coeff_i = basis(N, 2k, i) and basis(N, 2k+1, i) for the sample pairs
//     i = 0..ceil(N/2)-1 (sample i and sample N-1-i share one multiplier).
//   IDCT, cycle k (output sample k and N-1-k):
//     even coeff_m = basis(N, 2m, k), odd coeff_m = basis(N, 2m+1, k).
// Entries for u >= N or for unused pairs are zero, which also masks whatever
// the unused data inputs hold. Purely combinational (an asynchronous ROM).
// That the coefficients are programmable per N follows the source design; the
// address layout and word width are this design's choice.
module coef_rom
  import sadct_pkg::*;
#(
  parameter int FRAC = COEF_FRAC   // fractional bits of a coefficient
) (
  input  cnt_t  npt_i,            // transform length N, 0..8
  input  kidx_t k_i,              // cycle within the vector
  input  logic  idct_i,           // 1 = inverse transform
  output coef_t ce_o [HALF],      // coefficients of the even calculator
  output coef_t co_o [HALF]       // coefficients of the odd calculator
);

  localparam int DEPTH = 2 * 16 * 4;          // address {idct, N, k}
  localparam int WORDS = 2 * HALF;            // coefficients per address
  typedef logic [WORDS*COEF_W-1:0] word_t;    // coefficient i at [i*COEF_W +: COEF_W]
  typedef word_t rom_t [DEPTH];

  function automatic rom_t build_rom();
    rom_t t;
    for (int a = 0; a < DEPTH; a++) begin
      int    idct, npt, k;
      word_t w;
      idct = a / 64;
      npt  = (a / 4) % 16;
      k    = a % 4;
      w    = '0;
      for (int i = 0; i < HALF; i++) begin
        if (idct == 0) begin
          // pair i is used only while 2i+1 <= N
          if (2 * i + 1 <= npt) begin
            w[i*COEF_W +: COEF_W]        = coef_t'(basis_coef(npt, 2 * k,     i, FRAC));
            w[(HALF+i)*COEF_W +: COEF_W] = coef_t'(basis_coef(npt, 2 * k + 1, i, FRAC));
          end
        end else begin
          w[i*COEF_W +: COEF_W]        = coef_t'(basis_coef(npt, 2 * i,     k, FRAC));
          w[(HALF+i)*COEF_W +: COEF_W] = coef_t'(basis_coef(npt, 2 * i + 1, k, FRAC));
        end
      end
      t[a] = w;
    end
    return t;
  endfunction

  localparam rom_t ROM = build_rom();

  word_t word;
  assign word = ROM[{idct_i, npt_i, k_i}];

  always_comb begin
    for (int i = 0; i < HALF; i++) begin
      ce_o[i] = coef_t'(word[i*COEF_W +: COEF_W]);
      co_o[i] = coef_t'(word[(HALF+i)*COEF_W +: COEF_W]);
    end
  end

endmodule

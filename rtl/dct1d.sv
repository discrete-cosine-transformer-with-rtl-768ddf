// dct1d - 1D-DCT/IDCT block with a variable transform length N = 0..8.
//
// Two improved 1x4 matrix calculators (mat_calc) work side by side, so each
// clock cycle yields two results of the N-point transform; a vector takes
// ceil(N/2) cycles, selected by k_i. The block is combinational: the caller
// holds the vector and steps k_i.
//   DCT  (x_i = packed pixels): samples are folded into pairs
//        (x(i), x(N-1-i)); the even calculator adds them and yields z(2k), the
//        odd one subtracts them and yields z(2k+1). For odd N the middle sample
//        has no partner and enters alone.
//   IDCT (x_i = packed coefficients): the even calculator takes z0,z2,z4,z6,
//        the odd one z1,z3,z5,z7, giving the even part E and odd part O of
//        output sample k; a butterfly forms x(k) = E + O and x(N-1-k) = E - O.
// Results are rounded to nearest (ties up) from the COEF_FRAC fixed point and
// saturated to the data word. idx*_o give each result's index within the
// vector and v*_o tell whether it exists (index < N, and the two IDCT indices
// differ).
// The paired calculators, the folding of equations (3)-(6) and the shared
// multipliers follow the source design; the pairing mux for N < 8, the
// IDCT butterfly, rounding and saturation are this design's choices.
module dct1d
  import sadct_pkg::*;
(
  input  data_t  x_i  [BLK],  // packed vector, entries past N are ignored
  input  cnt_t   npt_i,       // transform length N
  input  kidx_t  k_i,         // cycle within the vector
  input  logic   idct_i,      // 1 = inverse transform
  input  coef_t  ce_i [HALF], // even calculator coefficients
  input  coef_t  co_i [HALF], // odd calculator coefficients
  output data_t  y0_o,
  output data_t  y1_o,
  output idx_t   idx0_o,
  output idx_t   idx1_o,
  output logic   v0_o,
  output logic   v1_o
);

  localparam int SW = DATA_W + COEF_W + 3;

  data_t ea [HALF], eb [HALF], oa [HALF], ob [HALF];
  logic signed [SW-1:0] se, so;
  logic signed [SW:0]   r0, r1;

  // Operand network in front of the two calculators.
  always_comb begin
    for (int i = 0; i < HALF; i++) begin
      if (idct_i) begin
        ea[i] = x_i[2*i];
        oa[i] = x_i[2*i+1];
        eb[i] = '0;
        ob[i] = '0;
      end else begin
        ea[i] = x_i[i];
        oa[i] = x_i[i];
        // partner of sample i is sample N-1-i while i < N-1-i
        if (32'(2 * i + 2) <= 32'(npt_i)) eb[i] = x_i[3'(npt_i - cnt_t'(1) - cnt_t'(i))];
        else                              eb[i] = '0;
        ob[i] = eb[i];
      end
    end
  end

  mat_calc u_even (.a_i(ea), .b_i(eb), .sub_i(1'b0), .coeff_i(ce_i), .z_o(se));
  mat_calc u_odd  (.a_i(oa), .b_i(ob), .sub_i(1'b1), .coeff_i(co_i), .z_o(so));

  function automatic data_t round_sat(logic signed [SW:0] v);
    logic signed [SW:0] t;
    t = (v + (SW+1)'(1 <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
    if (t > (SW+1)'(2 ** (DATA_W - 1) - 1))      return data_t'(2 ** (DATA_W - 1) - 1);
    else if (t < -(SW+1)'(2 ** (DATA_W - 1)))    return data_t'(-(2 ** (DATA_W - 1)));
    else                                          return data_t'(t);
  endfunction

  always_comb begin
    cnt_t k2;
    k2 = {1'b0, k_i, 1'b0};
    if (idct_i) begin
      r0     = (SW+1)'(se) + (SW+1)'(so);
      r1     = (SW+1)'(se) - (SW+1)'(so);
      idx0_o = idx_t'(k_i);
      idx1_o = idx_t'(npt_i - cnt_t'(1) - cnt_t'(k_i));
      v0_o   = cnt_t'(k_i) < npt_i;
      v1_o   = cnt_t'(k_i) < npt_i - cnt_t'(1) - cnt_t'(k_i) && cnt_t'(k_i) < npt_i;
    end else begin
      r0     = (SW+1)'(se);
      r1     = (SW+1)'(so);
      idx0_o = idx_t'(k2);
      idx1_o = idx_t'(k2 + cnt_t'(1));
      v0_o   = k2 < npt_i;
      v1_o   = k2 + cnt_t'(1) < npt_i;
    end
    y0_o = round_sat(r0);
    y1_o = round_sat(r1);
  end

endmodule

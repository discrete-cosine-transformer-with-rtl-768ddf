// mat_calc - improved 1x4 matrix calculator.
//
// Computes one output of a 4x4 matrix-vector product in one clock cycle:
//   z = sum_i coeff_i * (a_i +/- b_i),   i = 0..3.
// Each input pair first goes through an adder/subtractor (sub_i = 1 selects
// a - b), then a multiplier with its programmable coefficient, then a two-level
// adder tree. With the DCT the pairs are the folded samples x(i) and x(N-1-i);
// with the IDCT b is zero and the pre-adders pass a through.
// The result keeps full precision (no rounding); the caller scales it.
// Purely combinational. The structure (pre add/sub, four multipliers, adder
// tree) follows the source design; the word widths are this design's choice.
module mat_calc
  import sadct_pkg::*;
#(
  parameter int DW = DATA_W,   // data word
  parameter int CW = COEF_W,   // coefficient word
  parameter int SW = DW + CW + 3
) (
  input  logic signed [DW-1:0] a_i     [HALF],
  input  logic signed [DW-1:0] b_i     [HALF],
  input  logic                 sub_i,          // 1: a - b, 0: a + b
  input  logic signed [CW-1:0] coeff_i [HALF],
  output logic signed [SW-1:0] z_o
);

  logic signed [DW:0]    pre  [HALF];
  logic signed [SW-1:0]  prod [HALF];
  logic signed [SW-1:0]  s01, s23;

  always_comb begin
    for (int i = 0; i < HALF; i++) begin
      pre[i]  = sub_i ? (DW+1)'(a_i[i]) - (DW+1)'(b_i[i])
                      : (DW+1)'(a_i[i]) + (DW+1)'(b_i[i]);
      prod[i] = SW'(pre[i]) * SW'(coeff_i[i]);
    end
    s01 = prod[0] + prod[1];
    s23 = prod[2] + prod[3];
    z_o = s01 + s23;
  end

endmodule

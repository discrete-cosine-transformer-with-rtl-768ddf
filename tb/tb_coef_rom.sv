// tb_coef_rom - checks every entry of the coefficient ROM.
// For N = 0..8, k = 0..3 and both directions compares coeff0..3 of the even
// and the odd calculator with basis values computed here from cos():
// DCT even/odd = basis(N, 2k / 2k+1, i) for pairs with 2i+1 <= N, else 0;
// IDCT even/odd = basis(N, 2i / 2i+1, k). Spot-checks a few known values
// (N = 1 gives 4096 = 1.0; N = 8, u = 0 gives 1448 = 1/sqrt(8)).
module tb_coef_rom;
  import sadct_pkg::*;
  import sadct_ref_pkg::*;

  cnt_t  npt;
  kidx_t k;
  logic  idct;
  coef_t ce [HALF], co [HALF];
  logic  clk = 1'b0;
  int    checks = 0, failures = 0;

  coef_rom dut (.npt_i(npt), .k_i(k), .idct_i(idct), .ce_o(ce), .co_o(co));

  always #5 clk = ~clk;

  function automatic int bas(int n, int u, int s);
    return (n == 0 || u >= n || s >= n) ? 0 : ref_coef(n, u, s);
  endfunction

  initial begin
    for (int inv = 0; inv < 2; inv++)
      for (int n = 0; n <= 8; n++)
        for (int kk = 0; kk < 4; kk++) begin
          npt = cnt_t'(n); k = kidx_t'(kk); idct = inv[0];
          @(posedge clk);
          for (int i = 0; i < HALF; i++) begin
            int e, o;
            if (inv == 0) begin
              e = (2 * i + 1 <= n) ? bas(n, 2 * kk, i) : 0;
              o = (2 * i + 1 <= n) ? bas(n, 2 * kk + 1, i) : 0;
            end else begin
              e = bas(n, 2 * i, kk);
              o = bas(n, 2 * i + 1, kk);
            end
            checks += 2;
            if (int'(ce[i]) != e) begin failures++; $display("idct=%0d N=%0d k=%0d even %0d: %0d, expected %0d", inv, n, kk, i, ce[i], e); end
            if (int'(co[i]) != o) begin failures++; $display("idct=%0d N=%0d k=%0d odd %0d: %0d, expected %0d", inv, n, kk, i, co[i], o); end
          end
        end
    npt = 1; k = 0; idct = 0; @(posedge clk);
    checks++; if (ce[0] != 14'sd4096) failures++;
    npt = 8; @(posedge clk);
    checks++; if (ce[0] != 14'sd1448 || ce[3] != 14'sd1448) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

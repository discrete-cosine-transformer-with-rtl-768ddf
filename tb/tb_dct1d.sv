// tb_dct1d - test of the variable-length 1D-DCT/IDCT block.
// For every N = 0..8 and both directions, drives random vectors (entries past
// N hold garbage that must be ignored), feeds the coefficients computed here
// from cos() in the layout of the two calculators, steps k over the
// max(1, ceil(N/2)) cycles of the vector and collects the two results per
// cycle by their index. Checks that every index 0..N-1 is produced exactly
// once and equals the direct-form N-point transform of sadct_ref_pkg, and that
// ceil(N/2) cycles suffice. Large inputs exercise the saturation.
module tb_dct1d;
  import sadct_pkg::*;
  import sadct_ref_pkg::*;

  data_t x [BLK];
  cnt_t  npt;
  kidx_t k;
  logic  idct;
  coef_t ce [HALF], co [HALF];
  data_t y0, y1;
  idx_t  i0, i1;
  logic  v0, v1;
  logic  clk = 1'b0;
  int    checks = 0, failures = 0;

  dct1d dut (.x_i(x), .npt_i(npt), .k_i(k), .idct_i(idct), .ce_i(ce), .co_i(co),
             .y0_o(y0), .y1_o(y1), .idx0_o(i0), .idx1_o(i1), .v0_o(v0), .v1_o(v1));

  always #5 clk = ~clk;

  function automatic int bas(int n, int u, int s);
    return (n == 0 || u >= n || s >= n) ? 0 : ref_coef(n, u, s);
  endfunction

  initial begin
    for (int inv = 0; inv < 2; inv++)
      for (int n = 0; n <= 8; n++)
        for (int t = 0; t < 40; t++) begin
          vec_t v, e;
          int   got [8], cnt [8], ncyc;
          for (int q = 0; q < 8; q++) begin
            v[q]   = (q < n) ? ((t < 4) ? ((t % 2) ? 32767 : -32768)
                               : (t % 3 == 0) ? int'($signed(16'($urandom)))
                               : int'($urandom_range(600)) - 300)
                             : int'($signed(16'($urandom)));
            x[q]   = data_t'(v[q]);
            got[q] = 0; cnt[q] = 0;
          end
          e = xform(v, n, inv[0]);
          idct = inv[0]; npt = cnt_t'(n);
          ncyc = (n <= 2) ? 1 : (n + 1) / 2;
          for (int kk = 0; kk < ncyc; kk++) begin
            k = kidx_t'(kk);
            for (int i = 0; i < HALF; i++) begin
              if (inv == 0) begin
                ce[i] = coef_t'((2 * i + 1 <= n) ? bas(n, 2 * kk, i) : 0);
                co[i] = coef_t'((2 * i + 1 <= n) ? bas(n, 2 * kk + 1, i) : 0);
              end else begin
                ce[i] = coef_t'(bas(n, 2 * i, kk));
                co[i] = coef_t'(bas(n, 2 * i + 1, kk));
              end
            end
            @(posedge clk);
            if (v0) begin got[i0] = int'(y0); cnt[i0]++; end
            if (v1) begin got[i1] = int'(y1); cnt[i1]++; end
          end
          for (int q = 0; q < 8; q++) begin
            checks++;
            if (q < n) begin
              if (cnt[q] != 1 || got[q] != e[q]) begin
                failures++;
                $display("idct=%0d N=%0d t=%0d idx %0d: %0d (x%0d), expected %0d", inv, n, t, q, got[q], cnt[q], e[q]);
              end
            end else if (cnt[q] != 0) begin
              failures++;
              $display("idct=%0d N=%0d: index %0d produced", inv, n, q);
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

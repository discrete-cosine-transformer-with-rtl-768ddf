// tb_mat_calc - random test of the 1x4 matrix calculator.
// Drives random data pairs, coefficients and add/subtract mode, including
// full-scale extremes, and compares z with sum_i c_i * (a_i +/- b_i)
// computed in 64-bit integers.
module tb_mat_calc;
  import sadct_pkg::*;

  localparam int SW = DATA_W + COEF_W + 3;
  data_t a [HALF], b [HALF];
  coef_t c [HALF];
  logic  sub;
  logic signed [SW-1:0] z;
  logic  clk = 1'b0;
  int    checks = 0, failures = 0;

  mat_calc dut (.a_i(a), .b_i(b), .sub_i(sub), .coeff_i(c), .z_o(z));

  always #5 clk = ~clk;

  initial begin
    for (int t = 0; t < 3000; t++) begin
      longint e;
      e = 0;
      sub = $urandom_range(1);
      for (int i = 0; i < HALF; i++) begin
        if (t < 8) begin
          a[i] = (t % 2) ? 16'sh8000 : 16'sh7FFF;
          b[i] = (t % 4 < 2) ? 16'sh8000 : 16'sh7FFF;
          c[i] = (t % 8 < 4) ? 14'sh2000 : 14'sh1FFF;
        end else begin
          a[i] = data_t'($urandom); b[i] = data_t'($urandom); c[i] = coef_t'($urandom);
        end
      end
      @(posedge clk);
      for (int i = 0; i < HALF; i++)
        e += longint'(c[i]) * (sub ? longint'(a[i]) - longint'(b[i]) : longint'(a[i]) + longint'(b[i]));
      checks++;
      if (longint'(z) != e) begin failures++; $display("t=%0d: z=%0d expected %0d", t, z, e); end
    end
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

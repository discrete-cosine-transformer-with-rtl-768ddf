// tb_pixel_shift - exhaustive test of the pixel shifter.
// For all 256 shapes, with random pixels, checks that the object pixels come
// out packed to the top in their original order, that the rest are zero and
// that pos_o gives each packed pixel's original position. The four shift
// examples 00100100, 00100101, 00100110 and 00100111 are among the shapes.
module tb_pixel_shift;
  import sadct_pkg::*;

  data_t  x [BLK], xp [BLK];
  idx_t   pos [BLK];
  shape_t shape;
  logic   clk = 1'b0;
  int     checks = 0, failures = 0;

  pixel_shift dut (.x_i(x), .shape_i(shape), .xp_o(xp), .pos_o(pos));

  always #5 clk = ~clk;

  initial begin
    for (int rep = 0; rep < 4; rep++)
      for (int s = 0; s < 256; s++) begin
        int m;
        shape = shape_t'(s);
        for (int n = 0; n < BLK; n++) x[n] = data_t'($urandom);
        @(posedge clk);
        m = 0;
        for (int n = 0; n < BLK; n++)
          if (shape[n]) begin
            checks += 2;
            if (xp[m] != x[n])      begin failures++; $display("shape %b slot %0d: %0d, expected %0d", shape, m, xp[m], x[n]); end
            if (pos[m] != idx_t'(n)) begin failures++; $display("shape %b slot %0d: pos %0d, expected %0d", shape, m, pos[m], n); end
            m++;
          end
        for (int q = m; q < BLK; q++) begin
          checks++;
          if (xp[q] != '0) begin failures++; $display("shape %b slot %0d not zero", shape, q); end
        end
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

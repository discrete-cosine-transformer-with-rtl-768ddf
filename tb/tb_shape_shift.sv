// tb_shape_shift - exhaustive test of the shape shifter.
// For all 256 shapes checks the object-pixel count against a bit count and
// the packed shape against a mask of that many low bits; includes the column
// 1,0,0,1,0,1,1,0 (pixel 0 first) whose count is 4.
module tb_shape_shift;
  import sadct_pkg::*;

  shape_t shape, packed_s;
  cnt_t   count;
  logic   clk = 1'b0;
  int     checks = 0, failures = 0;

  shape_shift dut (.shape_i(shape), .count_o(count), .packed_o(packed_s));

  always #5 clk = ~clk;

  initial begin
    for (int s = 0; s < 256; s++) begin
      int c;
      c = 0;
      shape = shape_t'(s);
      for (int b = 0; b < 8; b++) c += (s >> b) & 1;
      @(posedge clk);
      checks += 2;
      if (int'(count) != c) begin failures++; $display("shape %b: count %0d, expected %0d", shape, count, c); end
      if (packed_s != shape_t'((1 << c) - 1)) begin failures++; $display("shape %b: packed %b", shape, packed_s); end
    end
    shape = 8'b01101001;
    @(posedge clk);
    checks++;
    if (count != 4 || packed_s != 8'b00001111) failures++;
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

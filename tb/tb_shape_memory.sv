// tb_shape_memory - random test of the shape memory.
// Writes random column shapes, reads random rows and compares with a model
// array; checks that a read is zero while rd_en is low, that writes without
// wr_en change nothing and that reset clears the array.
module tb_shape_memory;
  import sadct_pkg::*;

  logic   clk = 1'b0, rst = 1'b1, wr_en = 1'b0, rd_en = 1'b0;
  idx_t   wr_col = '0, rd_row = '0;
  shape_t wr_data = '0, rd_data;
  logic [7:0] model [8];   // [row] bit col
  int     checks = 0, failures = 0;

  shape_memory dut (.clk_i(clk), .rst_i(rst), .wr_en_i(wr_en), .wr_col_i(wr_col), .wr_data_i(wr_data),
                    .rd_en_i(rd_en), .rd_row_i(rd_row), .rd_data_o(rd_data));

  always #5 clk = ~clk;

  initial begin
    for (int r = 0; r < 8; r++) model[r] = '0;
    @(negedge clk); @(negedge clk); rst = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      rd_en = 1'b1; rd_row = idx_t'($urandom);
      #1;
      checks++;
      if (rd_data != model[rd_row]) begin failures++; $display("t=%0d row %0d: %b, expected %b", t, rd_row, rd_data, model[rd_row]); end
      rd_en = 1'b0; #1;
      checks++;
      if (rd_data != '0) begin failures++; $display("read not gated"); end
      wr_en = ($urandom_range(3) != 0); wr_col = idx_t'($urandom); wr_data = shape_t'($urandom);
      @(posedge clk);
      if (wr_en) for (int r = 0; r < 8; r++) model[r][wr_col] = wr_data[r];
      if (t == 1500) begin
        @(negedge clk); wr_en = 1'b0; rst = 1'b1; @(posedge clk);
        for (int r = 0; r < 8; r++) model[r] = '0;
        @(negedge clk); rst = 1'b0;
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

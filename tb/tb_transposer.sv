// tb_transposer - random test of the transportation memory.
// Writes random words along random rows or columns through both write ports
// (each enabled at random, distinct positions), reads random rows and columns
// and compares with a model array; checks the read gating and the reset. A
// column written word by word and read back as a row shows the transposition.
module tb_transposer;
  import sadct_pkg::*;

  logic  clk = 1'b0, rst = 1'b1;
  logic  wr_en [2], wr_row, rd_en, rd_col;
  idx_t  wr_line, wr_idx [2], rd_line;
  data_t wr_data [2], rd_data [BLK];
  int    model [8][8];
  int    checks = 0, failures = 0;

  transposer dut (.clk_i(clk), .rst_i(rst), .wr_en_i(wr_en), .wr_row_i(wr_row), .wr_line_i(wr_line),
                  .wr_idx_i(wr_idx), .wr_data_i(wr_data), .rd_en_i(rd_en), .rd_col_i(rd_col),
                  .rd_line_i(rd_line), .rd_data_o(rd_data));

  always #5 clk = ~clk;

  task automatic check_read();
    for (int n = 0; n < 8; n++) begin
      int e;
      e = rd_col ? model[n][rd_line] : model[rd_line][n];
      checks++;
      if (int'(rd_data[n]) != e) begin
        failures++;
        $display("read %s %0d [%0d]: %0d, expected %0d", rd_col ? "col" : "row", rd_line, n, rd_data[n], e);
      end
    end
  endtask

  initial begin
    wr_en[0] = 1'b0; wr_en[1] = 1'b0; wr_row = 1'b0; rd_en = 1'b0; rd_col = 1'b0;
    wr_line = '0; rd_line = '0;
    for (int p = 0; p < 2; p++) begin wr_idx[p] = '0; wr_data[p] = '0; end
    for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) model[r][c] = 0;
    @(negedge clk); @(negedge clk); rst = 1'b0;
    // column 3 written two words at a time, then every row read back
    for (int q = 0; q < 4; q++) begin
      @(negedge clk);
      wr_row = 1'b0; wr_line = 3'd3;
      for (int p = 0; p < 2; p++) begin
        wr_en[p] = 1'b1; wr_idx[p] = idx_t'(2 * q + p); wr_data[p] = data_t'(100 * q + p);
        model[2 * q + p][3] = 100 * q + p;
      end
    end
    @(negedge clk); wr_en[0] = 1'b0; wr_en[1] = 1'b0;
    rd_en = 1'b1; rd_col = 1'b0;
    for (int r = 0; r < 8; r++) begin rd_line = idx_t'(r); #1; check_read(); end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      rd_en = 1'b1; rd_col = $urandom_range(1); rd_line = idx_t'($urandom);
      #1; check_read();
      rd_en = 1'b0; #1;
      checks++;
      if (rd_data[$urandom_range(7)] != '0) begin failures++; $display("read not gated"); end
      wr_row = $urandom_range(1); wr_line = idx_t'($urandom);
      wr_idx[0] = idx_t'($urandom); wr_idx[1] = wr_idx[0] + idx_t'($urandom_range(1, 7));
      for (int p = 0; p < 2; p++) begin wr_en[p] = $urandom_range(1); wr_data[p] = data_t'($urandom); end
      @(posedge clk);
      for (int p = 0; p < 2; p++)
        if (wr_en[p]) begin
          if (wr_row) model[wr_line][wr_idx[p]] = int'(wr_data[p]);
          else        model[wr_idx[p]][wr_line] = int'(wr_data[p]);
        end
      if (t == 2500) begin
        @(negedge clk); wr_en[0] = 1'b0; wr_en[1] = 1'b0; rst = 1'b1; @(posedge clk);
        for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) model[r][c] = 0;
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

// transposer - Transportation Memory (matrix transposer) of the core.
//
// Holds the 8x8 intermediate values between the two 1D passes. Each write
// cycle stores up to two words into one line of the array: a column when
// wr_row_i is 0 (the vertical DCT pass) or a row when wr_row_i is 1 (the
// horizontal IDCT pass); wr_idx_i selects the position within the line and
// wr_en_i enables each of the two words separately. A read returns a whole
// line, a row when rd_col_i is 0 (horizontal DCT pass) or a column when
// rd_col_i is 1 (vertical IDCT pass).
// Timing: writes on the rising clock edge; reads are asynchronous and return
// zero while rd_en_i is low. rst_i (synchronous) clears the array.
// Writing in one direction and reading in the other, shared between DCT and
// IDCT, follows the source design; two write ports, direction selects and
// the read gating are this design's choices.
module transposer
  import sadct_pkg::*;
(
  input  logic  clk_i,
  input  logic  rst_i,
  input  logic  wr_en_i   [2],
  input  logic  wr_row_i,        // 1: write along a row, 0: along a column
  input  idx_t  wr_line_i,       // row or column written
  input  idx_t  wr_idx_i  [2],   // position within that line
  input  data_t wr_data_i [2],
  input  logic  rd_en_i,
  input  logic  rd_col_i,        // 1: read a column, 0: read a row
  input  idx_t  rd_line_i,
  output data_t rd_data_o [BLK]
);

  data_t mem [BLK][BLK];   // mem[row][col]

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      for (int r = 0; r < BLK; r++)
        for (int c = 0; c < BLK; c++) mem[r][c] <= '0;
    end else begin
      for (int p = 0; p < 2; p++) begin
        if (wr_en_i[p]) begin
          if (wr_row_i) mem[wr_line_i][wr_idx_i[p]] <= wr_data_i[p];
          else          mem[wr_idx_i[p]][wr_line_i] <= wr_data_i[p];
        end
      end
    end
  end

  always_comb begin
    for (int n = 0; n < BLK; n++) begin
      if (!rd_en_i)      rd_data_o[n] = '0;
      else if (rd_col_i) rd_data_o[n] = mem[n][rd_line_i];
      else               rd_data_o[n] = mem[rd_line_i][n];
    end
  end

endmodule

// shape_memory - Shape Memory of the SA-DCT/IDCT core.
//
// An 8x8 array of shape bits that turns the packed shape of the columns into
// the shape of the rows. One column is written per write cycle (wr_data_i
// bit r = row r of column wr_col_i); one row is read combinationally
// (rd_data_o bit c = column c of row rd_row_i). After all eight packed column
// shapes are written, row i reads which columns hold an i-th coefficient,
// i.e. the shape the horizontal pass works on.
// Timing: write on the rising clock edge when wr_en_i; read is asynchronous
// and returns zero while rd_en_i is low. rst_i (synchronous) clears the array.
// The memory, its column-write/row-read use and the WR_EN/RD_EN/RST/CLK pins
// follow the source design; the read gating and reset are this design's choice.
module shape_memory
  import sadct_pkg::*;
(
  input  logic   clk_i,
  input  logic   rst_i,
  input  logic   wr_en_i,
  input  idx_t   wr_col_i,
  input  shape_t wr_data_i,
  input  logic   rd_en_i,
  input  idx_t   rd_row_i,
  output shape_t rd_data_o
);

  shape_t mem [BLK];   // mem[row][col]

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      for (int r = 0; r < BLK; r++) mem[r] <= '0;
    end else if (wr_en_i) begin
      for (int r = 0; r < BLK; r++) mem[r][wr_col_i] <= wr_data_i[r];
    end
  end

  assign rd_data_o = rd_en_i ? mem[rd_row_i] : '0;

endmodule

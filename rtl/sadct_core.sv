// sadct_core - shape-adaptive 8x8 DCT / IDCT core (top level).
//
// Transforms one 8x8 block of an arbitrarily shaped video object. Forward
// (idct_i = 0): each input column is packed to the top by the Shift Block and
// transformed with an N-point DCT (N = its object-pixel count); the results go
// into the transposer column by column and the packed column shapes into the
// shape memory. Then each row of the transposer is packed to the left with
// the row shape from the shape memory and transformed with an M-point DCT;
// those results are the block's SA-DCT coefficients, coefficient c of row i
// leaving at (row i, col c).
// Inverse (idct_i = 1): the eight shape columns are sent first and their
// packed shapes stored; then the coefficient rows are sent (row i holding its
// coefficients in columns 0..M_i-1), inverse-transformed and scattered back to
// their columns in the transposer; finally the shape columns are sent again,
// and each transposer column is inverse-transformed and its pixels put back at
// their original positions, pixel (r, j) leaving at (row r, col j).
// One 1D-DCT/IDCT block (two 1x4 matrix calculators) is time-shared by both
// passes and both directions; it yields two results per cycle, so a column or
// row of N samples takes max(1, ceil(N/2)) cycles and a full forward block 64.
// Interface: in_x_i/in_shape_i are one input line (column or row: word/bit n
// is sample n), taken with valid/ready; ready rises in the last cycle of the
// line, and the line must stay stable until then. out_o[0..1] are registered
// results, one clock after they are computed; out_blk_end_o marks the cycle
// holding the last results of a block. idct_i is sampled at the first line of
// a block. rst_i is synchronous, active high.
// The organisation (shift blocks, address generator, coefficient ROM, two
// 1D-DCT units, shape memory, matrix transposer, input multiplexers fed back
// from the memories) follows the source design; the handshake, the IDCT pass
// order and the output format are this design's choices.
module sadct_core
  import sadct_pkg::*;
(
  input  logic    clk_i,
  input  logic    rst_i,
  input  logic    idct_i,            // direction of the next block
  input  logic    in_valid_i,
  output logic    in_ready_o,
  input  shape_t  in_shape_i,        // shape of the input column/row
  input  data_t   in_x_i [BLK],      // pixels or coefficients x0..x7
  output sample_t out_o  [2],        // two results per cycle
  output logic    out_blk_end_o,     // last results of a block
  output logic    busy_o             // a block is in progress
);

  phase_e phase;
  logic   idct, tr_wr_en, tr_wr_row, tr_rd_en, tr_rd_col;
  logic   sm_wr_en, sm_rd_en, out_en, blk_end;
  idx_t   line;
  kidx_t  k;

  shape_t shape_src, shape_packed, sm_rd_data;
  cnt_t   npt;
  data_t  tr_rd_data [BLK];
  data_t  data_src   [BLK];
  data_t  x_packed   [BLK];
  data_t  dct_in     [BLK];
  idx_t   pos        [BLK];
  coef_t  ce [HALF], co [HALF];
  data_t  y0, y1;
  idx_t   idx0, idx1, dst0, dst1;
  logic   v0, v1;

  addr_gen u_ctrl (
    .clk_i, .rst_i, .idct_i, .in_valid_i, .in_ready_o,
    .npt_i       (npt),
    .phase_o     (phase),
    .idct_o      (idct),
    .line_o      (line),
    .k_o         (k),
    .busy_o      (busy_o),
    .tr_wr_en_o  (tr_wr_en),
    .tr_wr_row_o (tr_wr_row),
    .tr_rd_en_o  (tr_rd_en),
    .tr_rd_col_o (tr_rd_col),
    .sm_wr_en_o  (sm_wr_en),
    .sm_rd_en_o  (sm_rd_en),
    .out_en_o    (out_en),
    .blk_end_o   (blk_end)
  );

  // Input multiplexers: external line or line fed back from the memories.
  always_comb begin
    shape_src = (phase == PH_ROW_MEM || phase == PH_ROW_IN) ? sm_rd_data : in_shape_i;
    for (int n = 0; n < BLK; n++)
      data_src[n] = tr_rd_en ? tr_rd_data[n] : in_x_i[n];
  end

  shape_shift u_shape_shift (.shape_i(shape_src), .count_o(npt), .packed_o(shape_packed));

  pixel_shift u_pixel_shift (.x_i(data_src), .shape_i(shape_src), .xp_o(x_packed), .pos_o(pos));

  // Forward lines are packed here; inverse lines arrive packed already.
  always_comb
    for (int n = 0; n < BLK; n++) dct_in[n] = idct ? data_src[n] : x_packed[n];

  coef_rom u_rom (.npt_i(npt), .k_i(k), .idct_i(idct), .ce_o(ce), .co_o(co));

  dct1d u_dct (
    .x_i(dct_in), .npt_i(npt), .k_i(k), .idct_i(idct), .ce_i(ce), .co_i(co),
    .y0_o(y0), .y1_o(y1), .idx0_o(idx0), .idx1_o(idx1), .v0_o(v0), .v1_o(v1)
  );

  // Inverse results return to the original positions of their samples.
  assign dst0 = idct ? pos[idx0] : idx0;
  assign dst1 = idct ? pos[idx1] : idx1;

  shape_memory u_shape_mem (
    .clk_i, .rst_i,
    .wr_en_i(sm_wr_en), .wr_col_i(line), .wr_data_i(shape_packed),
    .rd_en_i(sm_rd_en), .rd_row_i(line), .rd_data_o(sm_rd_data)
  );

  logic  tr_we [2];
  idx_t  tr_widx [2];
  data_t tr_wdata [2];
  assign tr_we[0]    = tr_wr_en && v0;
  assign tr_we[1]    = tr_wr_en && v1;
  assign tr_widx[0]  = dst0;
  assign tr_widx[1]  = dst1;
  assign tr_wdata[0] = y0;
  assign tr_wdata[1] = y1;

  transposer u_transposer (
    .clk_i, .rst_i,
    .wr_en_i(tr_we), .wr_row_i(tr_wr_row), .wr_line_i(line),
    .wr_idx_i(tr_widx), .wr_data_i(tr_wdata),
    .rd_en_i(tr_rd_en), .rd_col_i(tr_rd_col), .rd_line_i(line),
    .rd_data_o(tr_rd_data)
  );

  // Output register: forward results are row `line`, inverse ones column `line`.
  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      out_o[0]      <= '0;
      out_o[1]      <= '0;
      out_blk_end_o <= 1'b0;
    end else begin
      out_o[0].valid <= out_en && v0;
      out_o[1].valid <= out_en && v1;
      out_o[0].value <= y0;
      out_o[1].value <= y1;
      out_o[0].row   <= idct ? dst0 : line;
      out_o[0].col   <= idct ? line : dst0;
      out_o[1].row   <= idct ? dst1 : line;
      out_o[1].col   <= idct ? line : dst1;
      out_blk_end_o  <= blk_end;
    end
  end

endmodule

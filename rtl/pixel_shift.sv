// pixel_shift - pixel half of the Shift Block.
//
// Packs the object pixels of one column or row to the uppermost/leftmost
// positions, keeping their order: the m-th object pixel (counting set shape
// bits from pixel 0) goes to output m, and outputs past the object-pixel count
// are zero. Holes are handled like any other gap, so a column made of two or
// more separate runs of object pixels is packed into one run.
// For every output slot m the module also returns pos_o[m], the original
// position of the m-th object pixel. The inverse transform uses it to put
// reconstructed values back where they belong.
// Each output is a one-hot select over the inputs, driven by the rank of each
// set shape bit (number of set bits below it). Purely combinational.
// The packing follows the source design; the pos_o output and the rank/select
// structure are this design's choice.
module pixel_shift
  import sadct_pkg::*;
(
  input  data_t  x_i   [BLK],  // pixels of the column/row
  input  shape_t shape_i,      // bit n set = pixel n is in the object
  output data_t  xp_o  [BLK],  // packed pixels, zero beyond the count
  output idx_t   pos_o [BLK]   // original position of packed pixel m
);

  cnt_t rank [BLK];

  always_comb begin
    cnt_t acc;
    acc = '0;
    for (int n = 0; n < BLK; n++) begin
      rank[n] = acc;
      acc     = acc + cnt_t'(shape_i[n]);
    end
    for (int m = 0; m < BLK; m++) begin
      xp_o[m]  = '0;
      pos_o[m] = '0;
      for (int n = 0; n < BLK; n++) begin
        if (shape_i[n] && rank[n] == cnt_t'(m)) begin
          xp_o[m]  = x_i[n];
          pos_o[m] = idx_t'(n);
        end
      end
    end
  end

endmodule

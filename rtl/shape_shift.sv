// shape_shift - shape half of the Shift Block.
//
// Takes the 8-bit binary shape of one column or row (bit n set = pixel n
// belongs to the object), counts its object pixels and returns the shape as it
// is after the pixels are packed to the top/left: the lowest `count` bits set,
// the rest clear. Example: shape 1,0,0,1,0,1,1,0 (pixel 0 first) gives count 4
// and packed 1,1,1,1,0,0,0,0. The count is the transform length N of that
// column/row and also drives the controller and the coefficient ROM.
// Purely combinational. Counting the object pixels to shift the shape follows
// the source design; the adder/thermometer structure is the simplest one.
module shape_shift
  import sadct_pkg::*;
(
  input  shape_t shape_i,   // shape of the column/row, bit n = pixel n
  output cnt_t   count_o,   // number of object pixels, 0..8
  output shape_t packed_o   // shape after packing: bits 0..count-1 set
);

  always_comb begin
    count_o = '0;
    for (int n = 0; n < BLK; n++) count_o = count_o + cnt_t'(shape_i[n]);
    for (int n = 0; n < BLK; n++) packed_o[n] = (cnt_t'(n) < count_o);
  end

endmodule

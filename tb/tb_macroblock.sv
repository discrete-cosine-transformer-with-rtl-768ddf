// tb_macroblock - one 16x16 macroblock through the core, the unit of the
// throughput figures (52,000 macroblocks/s at 20 MHz, Main@L2, 4CIF at 30 Hz).
// A macroblock is four luminance and two chrominance 8x8 blocks. Two
// macroblocks are sent back to back: one inside the object (all six blocks
// full, forward: must take 6 x 64 = 384 cycles) and one on the object
// boundary (random shapes, forward, then the six blocks inverse). Every
// result is compared bit-exactly with sadct_ref_pkg, and the inverse output
// with the original pixels (within 3).
module tb_macroblock;
  import sadct_pkg::*;
  import sadct_ref_pkg::*;

  localparam int NB = 18;   // 6 full forward, 6 boundary forward, 6 boundary inverse

  logic    clk = 1'b0, rst = 1'b1;
  logic    idct, in_valid, in_ready, busy, blk_end;
  shape_t  in_shape;
  data_t   in_x [BLK];
  sample_t outs [2];

  sadct_core dut (
    .clk_i(clk), .rst_i(rst), .idct_i(idct), .in_valid_i(in_valid), .in_ready_o(in_ready),
    .in_shape_i(in_shape), .in_x_i(in_x), .out_o(outs), .out_blk_end_o(blk_end), .busy_o(busy)
  );

  always #5 clk = ~clk;

  int     checks = 0, failures = 0;
  longint cyc = 0, t_start = 0, t_end [NB];
  always @(posedge clk) cyc <= cyc + 1;

  mat_t  px [NB], cfin [NB], expv [NB];
  cols_t shp [NB];
  bit    inv [NB];
  int    got [NB][8][8], cnt [NB][8][8];
  int    blk = 0;

  task automatic send(logic [7:0] s, vec_t v, bit dir);
    @(negedge clk);
    in_valid = 1'b1; idct = dir; in_shape = s;
    for (int n = 0; n < 8; n++) in_x[n] = data_t'(v[n]);
    if (t_start == 0) t_start = cyc;
    forever begin
      #1;
      if (in_ready) begin @(posedge clk); break; end
      @(negedge clk);
    end
  endtask

  initial begin
    for (int b = 0; b < 12; b++) begin
      for (int j = 0; j < 8; j++) shp[b][j] = (b < 6) ? 8'hFF : 8'($urandom);
      for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) px[b][r][c] = $urandom_range(255);
      expv[b] = sa_dct(px[b], shp[b]);
      inv[b] = 1'b0;
    end
    for (int b = 12; b < 18; b++) begin
      shp[b] = shp[b-6]; px[b] = px[b-6]; cfin[b] = expv[b-6]; inv[b] = 1'b1;
      expv[b] = sa_idct(cfin[b], shp[b]);
    end
    for (int b = 0; b < NB; b++) for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) begin
      got[b][r][c] = 0; cnt[b][r][c] = 0;
    end
    in_valid = 1'b0; idct = 1'b0; in_shape = '0;
    for (int n = 0; n < 8; n++) in_x[n] = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int b = 0; b < NB; b++) begin
      vec_t v;
      if (!inv[b]) begin
        for (int j = 0; j < 8; j++) begin
          for (int r = 0; r < 8; r++) v[r] = px[b][r][j];
          send(shp[b][j], v, 1'b0);
        end
      end else begin
        for (int r = 0; r < 8; r++) v[r] = 0;
        for (int j = 0; j < 8; j++) send(shp[b][j], v, 1'b1);
        for (int i = 0; i < 8; i++) begin
          for (int q = 0; q < 8; q++) v[q] = cfin[b][i][q];
          send(8'h00, v, 1'b1);
        end
        for (int r = 0; r < 8; r++) v[r] = 0;
        for (int j = 0; j < 8; j++) send(shp[b][j], v, 1'b1);
      end
    end
    @(negedge clk); in_valid = 1'b0;
  end

  always @(negedge clk) begin
    if (!rst && blk < NB) begin
      for (int p = 0; p < 2; p++)
        if (outs[p].valid) begin
          got[blk][outs[p].row][outs[p].col] = int'(outs[p].value);
          cnt[blk][outs[p].row][outs[p].col]++;
        end
      if (blk_end) begin
        t_end[blk] = cyc;
        blk++;
        if (blk == NB) finish_test();
      end
    end
  end

  task automatic finish_test();
    for (int b = 0; b < NB; b++)
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          bit want;
          want = inv[b] ? shp[b][c][r] : (c < row_len(shp[b], r));
          checks++;
          if (want ? (cnt[b][r][c] != 1 || got[b][r][c] != expv[b][r][c]) : (cnt[b][r][c] != 0)) begin
            failures++;
            $display("block %0d (%0d,%0d): got %0d x%0d, expected %0d", b, r, c, got[b][r][c], cnt[b][r][c], expv[b][r][c]);
          end
          if (want && inv[b]) begin
            checks++;
            if (got[b][r][c] - px[b][r][c] > 3 || px[b][r][c] - got[b][r][c] > 3) failures++;
          end
        end
    checks++;
    $display("interior macroblock: %0d cycles", t_end[5] - t_start);
    if (t_end[5] - t_start != 384) begin failures++; $display("expected 384 cycles"); end
    $display("boundary macroblock: %0d cycles forward, %0d inverse", t_end[11] - t_end[5], t_end[17] - t_end[11]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d blocks finished", blk, NB);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

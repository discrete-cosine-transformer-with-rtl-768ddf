// tb_sadct_core - end-to-end test of the SA-DCT/IDCT core at its default sizes.
//
// Runs a list of 8x8 blocks through the core, each shape first forward (SA-DCT)
// and then backward (SA-IDCT of the coefficients just produced), with blocks
// sent back to back so that every block starts in the cycle after the last one
// ends. Shapes cover the full block, the empty block, every column/row length
// 0..8, columns and rows with holes, and the shape examples of the shift logic
// (columns 00100100, 00100101, 00100110, 00100111 and 01101001). Random idle
// cycles on the input exercise the stall of the handshake.
// Checks: every coefficient/pixel against the bit-exact model of
// sadct_ref_pkg, that each expected position arrives exactly once and nothing
// else does, the reconstruction against the original pixels (within 3), and
// the cycle count of every block: max(1, ceil(N/2)) cycles per line (+8 shape
// cycles for an inverse block) plus the idle cycles inserted, i.e. 64 cycles
// for a full forward block. Each mechanism is counted and must occur.
module tb_sadct_core;
  import sadct_pkg::*;
  import sadct_ref_pkg::*;

  localparam int NCASE = 48;
  localparam int NBLK  = 2 * NCASE;

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

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---- block plan -------------------------------------------------------
  mat_t  b_in   [NBLK];   // DCT: pixels; IDCT: coefficients (garbage past M_i)
  mat_t  b_exp  [NBLK];   // expected outputs
  mat_t  b_orig [NBLK];   // IDCT: original pixels
  cols_t b_shp  [NBLK];
  bit    b_inv  [NBLK];
  int    b_cyc  [NBLK];   // expected cycles without idle cycles
  int    b_gap  [NBLK][24];

  int n_len_col [9], n_len_row [9];
  int n_hole_col = 0, n_hole_row = 0, n_stall = 0, n_dct = 0, n_idct = 0;
  int n_switch = 0, n_b2b = 0, n_full64 = 0;

  function automatic int runs(logic [7:0] m);
    int r = 0;
    for (int i = 0; i < 8; i++) if (m[i] && (i == 0 || !m[i-1])) r++;
    return r;
  endfunction

  function automatic int kc(int n);   // cycles of one line
    return (n <= 2) ? 1 : (n + 1) / 2;
  endfunction

  function automatic logic [7:0] rand_n_mask(int n);   // n random set bits
    logic [7:0] m = '0;
    int c = 0;
    while (c < n) begin
      int p = $urandom_range(7);
      if (!m[p]) begin m[p] = 1'b1; c++; end
    end
    return m;
  endfunction

  task automatic make_shape(int t, output cols_t s);
    for (int j = 0; j < 8; j++) begin
      case (t)
        0: s[j] = 8'hFF;                                   // full block
        1: s[j] = 8'h00;                                   // empty block
        2: s[j] = rand_n_mask(j + 1);                      // lengths 1..8
        3: s[j] = rand_n_mask((j == 0) ? 0 : 8 - j);       // lengths 0,7..1
        4: begin                                           // shift examples
             logic [7:0] ex [8] = '{8'b00100100, 8'b00100101, 8'b00100110, 8'b00100111,
                                    8'b01101001, 8'b00000000, 8'b11111111, 8'b10000001};
             s[j] = ex[j];
           end
        5: s[j] = (j % 3 == 1) ? 8'h00 : rand_n_mask($urandom_range(8));  // row holes
        default: s[j] = 8'($urandom);
      endcase
    end
  endtask

  initial begin
    for (int n = 0; n < 9; n++) begin n_len_col[n] = 0; n_len_row[n] = 0; end
    for (int c = 0; c < NCASE; c++) begin
      cols_t s;
      mat_t  px, cf;
      int    t, base;
      t = (c < 6) ? c : 6 + (c % 4);
      make_shape(t, s);
      for (int r = 0; r < 8; r++)
        for (int j = 0; j < 8; j++)
          px[r][j] = (c % 5 == 4) ? $signed($urandom_range(510)) - 255 : int'($urandom_range(255));
      cf = sa_dct(px, s);
      // forward block
      b_in[2*c] = px; b_exp[2*c] = cf; b_shp[2*c] = s; b_inv[2*c] = 1'b0;
      base = 0;
      for (int j = 0; j < 8; j++) base += kc(popc(s[j]));
      for (int i = 0; i < 8; i++) base += kc(row_len(s, i));
      b_cyc[2*c] = base;
      // inverse block: coefficient rows, garbage past each row's length
      for (int i = 0; i < 8; i++)
        for (int q = 0; q < 8; q++)
          b_in[2*c+1][i][q] = (q < row_len(s, i)) ? cf[i][q] : int'($signed(16'($urandom)));
      b_exp[2*c+1] = sa_idct(cf, s); b_orig[2*c+1] = px; b_shp[2*c+1] = s; b_inv[2*c+1] = 1'b1;
      b_cyc[2*c+1] = base + 8;
      for (int b = 2*c; b <= 2*c+1; b++)
        for (int l = 0; l < 24; l++)
          b_gap[b][l] = (l > 0 && (c % 3 == 2) && $urandom_range(3) == 0) ? $urandom_range(1, 3) : 0;
      // mechanism bookkeeping
      for (int j = 0; j < 8; j++) begin
        n_len_col[popc(s[j])]++;
        if (runs(s[j]) > 1) n_hole_col++;
      end
      for (int i = 0; i < 8; i++) begin
        logic [7:0] rm;
        rm = '0;
        for (int j = 0; j < 8; j++) rm[j] = (popc(s[j]) > i);
        n_len_row[row_len(s, i)]++;
        if (runs(rm) > 1) n_hole_row++;
      end
    end
  end

  bit     started = 1'b0;
  longint t_prev = 0;

  // ---- driver ------------------------------------------------------------
  task automatic send(logic [7:0] shp, vec_t v, bit inv, int gap);
    for (int g = 0; g < gap; g++) begin
      @(negedge clk); in_valid = 1'b0; in_shape = 8'($urandom);
    end
    if (gap > 0) n_stall++;
    @(negedge clk);
    in_valid = 1'b1; idct = inv; in_shape = shp;
    if (!started) begin started = 1'b1; t_prev = cyc; end
    for (int n = 0; n < 8; n++) in_x[n] = data_t'(v[n]);
    forever begin
      #1;
      if (in_ready) begin @(posedge clk); break; end
      @(negedge clk);
    end
  endtask

  initial begin : drive
    in_valid = 1'b0; idct = 1'b0; in_shape = '0;
    for (int n = 0; n < 8; n++) in_x[n] = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int b = 0; b < NBLK; b++) begin
      vec_t v;
      if (!b_inv[b]) begin
        for (int j = 0; j < 8; j++) begin
          for (int r = 0; r < 8; r++) v[r] = b_in[b][r][j];
          send(b_shp[b][j], v, 1'b0, b_gap[b][j]);
        end
      end else begin
        for (int r = 0; r < 8; r++) v[r] = $urandom;
        for (int j = 0; j < 8; j++) send(b_shp[b][j], v, 1'b1, b_gap[b][j]);
        for (int i = 0; i < 8; i++) begin
          for (int q = 0; q < 8; q++) v[q] = b_in[b][i][q];
          send(8'($urandom), v, 1'b1, b_gap[b][8+i]);
        end
        for (int r = 0; r < 8; r++) v[r] = $urandom;
        for (int j = 0; j < 8; j++) send(b_shp[b][j], v, 1'b1, b_gap[b][16+j]);
      end
    end
    @(negedge clk); in_valid = 1'b0;
  end

  // ---- checker -----------------------------------------------------------
  int     blk = 0;
  int     got     [8][8];
  int     got_cnt [8][8];

  task automatic check_block(int b, longint t_now);
    int gaps = 0, cyc_exp;
    for (int l = 0; l < (b_inv[b] ? 24 : 8); l++) gaps += b_gap[b][l];
    cyc_exp = b_cyc[b] + gaps;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        bit want;
        want = b_inv[b] ? b_shp[b][c][r] : (c < row_len(b_shp[b], r));
        checks++;
        if (want) begin
          if (got_cnt[r][c] != 1 || got[r][c] != b_exp[b][r][c]) begin
            failures++;
            $display("block %0d (%s) (%0d,%0d): got %0d x%0d, expected %0d", b,
                     b_inv[b] ? "idct" : "dct", r, c, got[r][c], got_cnt[r][c], b_exp[b][r][c]);
          end
          if (b_inv[b]) begin
            int d = got[r][c] - b_orig[b][r][c];
            checks++;
            if (d > 3 || d < -3) begin
              failures++;
              $display("block %0d (%0d,%0d): reconstructed %0d, original %0d", b, r, c,
                       got[r][c], b_orig[b][r][c]);
            end
          end
        end else if (got_cnt[r][c] != 0) begin
          failures++;
          $display("block %0d: unexpected output at (%0d,%0d)", b, r, c);
        end
      end
    checks++;
    begin
      if (t_now - t_prev != longint'(cyc_exp)) begin
        failures++;
        $display("block %0d: took %0d cycles, expected %0d", b, t_now - t_prev, cyc_exp);
      end else begin
        if (gaps == 0 && b > 0) n_b2b++;
        if (!b_inv[b] && cyc_exp == 64) n_full64++;
      end
      if (b > 0 && b_inv[b] != b_inv[b-1]) n_switch++;
    end
    if (b_inv[b]) n_idct++; else n_dct++;
  endtask

  initial begin
    for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) begin got[r][c] = 0; got_cnt[r][c] = 0; end
  end

  always @(negedge clk) begin
    if (!rst) begin
      for (int p = 0; p < 2; p++)
        if (outs[p].valid) begin
          got[outs[p].row][outs[p].col] = int'(outs[p].value);
          got_cnt[outs[p].row][outs[p].col]++;
        end
      if (blk_end) begin
        if (blk < NBLK) check_block(blk, cyc);
        t_prev = cyc;
        blk++;
        for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) begin got[r][c] = 0; got_cnt[r][c] = 0; end
        if (blk == NBLK) finish_test();
      end
    end
  end

  task automatic need(string what, int n);
    checks++;
    $display("mechanism %-28s %0d", what, n);
    if (n == 0) begin failures++; $display("mechanism %s never happened", what); end
  endtask

  task automatic finish_test();
    for (int n = 0; n < 9; n++) begin
      need($sformatf("column length %0d", n), n_len_col[n]);
      need($sformatf("row length %0d", n), n_len_row[n]);
    end
    need("column with hole", n_hole_col);
    need("row with hole", n_hole_row);
    need("input stall", n_stall);
    need("forward block", n_dct);
    need("inverse block", n_idct);
    need("direction switch", n_switch);
    need("back-to-back start", n_b2b);
    need("full block in 64 cycles", n_full64);
    checks++;
    if (busy) begin failures++; $display("core still busy after the last block"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d blocks finished", blk, NBLK);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

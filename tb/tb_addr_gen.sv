// tb_addr_gen - test of the controller against a precomputed schedule.
// Builds, for a list of forward and inverse blocks with random line lengths,
// the expected sequence of working cycles: per line max(1, ceil(N/2)) cycles
// (one per line in the inverse shape pass), passes COL_IN, ROW_MEM for a DCT
// block and SHAPE, ROW_IN, COL_MEM for an IDCT block. Each cycle it drives the
// length of the current line and a random in_valid, and checks pass, line,
// cycle index, direction, in_ready, the memory enables, the output enable and
// the block end. Blocks follow each other without gaps; idle input cycles
// must only delay the schedule. The first block is a full forward block with
// no idle cycles and must take 64 cycles.
module tb_addr_gen;
  import sadct_pkg::*;

  typedef struct {
    phase_e ph;
    int     line, k, npt;
    bit     last_k, last_blk, inv, calm;
  } step_t;

  logic   clk = 1'b0, rst = 1'b1;
  logic   idct, in_valid, in_ready;
  cnt_t   npt;
  phase_e phase;
  logic   idct_o, busy, tr_wr_en, tr_wr_row, tr_rd_en, tr_rd_col, sm_wr_en, sm_rd_en, out_en, blk_end;
  idx_t   line;
  kidx_t  k;
  step_t  sched [$];
  int     checks = 0, failures = 0, n_full64 = 0, n_stall = 0;

  addr_gen dut (.clk_i(clk), .rst_i(rst), .idct_i(idct), .in_valid_i(in_valid), .in_ready_o(in_ready),
                .npt_i(npt), .phase_o(phase), .idct_o(idct_o), .line_o(line), .k_o(k), .busy_o(busy),
                .tr_wr_en_o(tr_wr_en), .tr_wr_row_o(tr_wr_row), .tr_rd_en_o(tr_rd_en),
                .tr_rd_col_o(tr_rd_col), .sm_wr_en_o(sm_wr_en), .sm_rd_en_o(sm_rd_en),
                .out_en_o(out_en), .blk_end_o(blk_end));

  always #5 clk = ~clk;

  task automatic add_pass(phase_e ph, bit inv, int lens [8], bit last_pass, bit calm);
    for (int l = 0; l < 8; l++) begin
      int nc;
      nc = (ph == PH_SHAPE || lens[l] <= 2) ? 1 : (lens[l] + 1) / 2;
      for (int kk = 0; kk < nc; kk++) begin
        step_t s;
        s.ph = ph; s.line = l; s.k = kk; s.npt = lens[l]; s.inv = inv; s.calm = calm;
        s.last_k = (kk == nc - 1);
        s.last_blk = last_pass && l == 7 && s.last_k;
        sched.push_back(s);
      end
    end
  endtask

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: %0d, expected %0d (schedule left %0d)", what, got, exp, sched.size()); end
  endtask

  initial begin
    int blk_len = 0, blk_stall = 0;
    for (int b = 0; b < 40; b++) begin
      int  la [8], lb [8], lc [8];
      bit  inv;
      inv = (b % 3 == 1);
      for (int l = 0; l < 8; l++) begin
        la[l] = (b == 0) ? 8 : $urandom_range(8);
        lb[l] = (b == 0) ? 8 : $urandom_range(8);
        lc[l] = $urandom_range(8);
      end
      if (!inv) begin
        add_pass(PH_COL_IN, 1'b0, la, 1'b0, b == 0);
        add_pass(PH_ROW_MEM, 1'b0, lb, 1'b1, b == 0);
      end else begin
        add_pass(PH_SHAPE, 1'b1, lc, 1'b0, b == 0);
        add_pass(PH_ROW_IN, 1'b1, la, 1'b0, b == 0);
        add_pass(PH_COL_MEM, 1'b1, lb, 1'b1, b == 0);
      end
    end
    idct = 1'b0; in_valid = 1'b0; npt = '0;
    @(negedge clk); @(negedge clk); rst = 1'b0;
    while (sched.size() > 0) begin
      step_t s;
      bit    need, go;
      s = sched[0];
      @(negedge clk);
      idct = s.inv; npt = cnt_t'(s.npt);
      need = (s.ph != PH_ROW_MEM);
      in_valid = (!s.calm && $urandom_range(6) == 0) ? 1'b0 : 1'b1;
      go = need ? in_valid : 1'b1;
      #1;
      check("phase", int'(phase), int'(s.ph));
      check("line", int'(line), s.line);
      check("k", int'(k), s.k);
      check("direction", int'(idct_o), int'(s.inv));
      check("in_ready", int'(in_ready), int'(need && s.last_k));
      check("transposer write", int'(tr_wr_en), int'(go && (s.ph == PH_COL_IN || s.ph == PH_ROW_IN)));
      check("transposer write dir", int'(tr_wr_row), int'(s.ph == PH_ROW_IN));
      check("transposer read", int'(tr_rd_en), int'(s.ph == PH_ROW_MEM || s.ph == PH_COL_MEM));
      check("transposer read dir", int'(tr_rd_col), int'(s.ph == PH_COL_MEM));
      check("shape write", int'(sm_wr_en), int'(go && (s.ph == PH_SHAPE || s.ph == PH_COL_IN)));
      check("shape read", int'(sm_rd_en), int'(s.ph == PH_ROW_IN || s.ph == PH_ROW_MEM));
      check("output enable", int'(out_en), int'(go && (s.ph == PH_ROW_MEM || s.ph == PH_COL_MEM)));
      check("block end", int'(blk_end), int'(go && s.last_blk));
      blk_len++;
      if (!go) begin blk_stall++; n_stall++; end
      @(posedge clk);
      if (go) begin
        void'(sched.pop_front());
        if (s.last_blk) begin
          if (!s.inv && blk_stall == 0 && blk_len == 64) n_full64++;
          blk_len = 0; blk_stall = 0;
        end
      end
    end
    @(negedge clk); #1;
    check("idle after last block", int'(busy), 0);
    check("full block in 64 cycles", int'(n_full64 > 0), 1);
    check("stalls seen", int'(n_stall > 0), 1);
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

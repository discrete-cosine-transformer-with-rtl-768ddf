// addr_gen - Address Generator: the controller of the SA-DCT/IDCT core.
//
// Steps the core through one 8x8 block at a time. A block is a sequence of
// passes over eight lines (columns or rows):
//   DCT  block: COL_IN  (column j of the input, vertical N-point DCTs)
//               ROW_MEM (row i of the transposer, horizontal M-point DCTs)
//   IDCT block: SHAPE   (shape column j of the input, packed shape stored)
//               ROW_IN  (coefficient row i of the input, horizontal IDCTs)
//               COL_MEM (column j of the transposer, vertical IDCTs, with the
//                        shape column j supplied again by the input)
// A line with N object samples takes max(1, ceil(N/2)) cycles (one cycle in
// SHAPE); the cycle counter k addresses the coefficient ROM, the line counter
// addresses the memories. Lines that need input wait for in_valid_i; in_ready_o
// is high in the last cycle of such a line, when the input is consumed.
// The direction (idct_i) is taken when a block starts and held to its end.
// With N = 8 everywhere a DCT block takes 64 cycles and a new one can start in
// the next cycle; an IDCT block takes 72 (the extra 8 load the shape).
// npt_i, the pixel count of the current line, comes combinationally from the
// shape shifter, so in_ready_o depends on it in the same cycle.
// The name, the CNT-driven addressing of ROM and memories and the WR_EN/RD_EN
// outputs follow the source design; the pass sequence, the IDCT shape pass and
// the handshake are this design's choices.
module addr_gen
  import sadct_pkg::*;
(
  input  logic   clk_i,
  input  logic   rst_i,
  input  logic   idct_i,       // direction of the next block
  input  logic   in_valid_i,   // input line available
  output logic   in_ready_o,   // input line consumed this cycle
  input  cnt_t   npt_i,        // object samples in the current line
  output phase_e phase_o,      // pass executed this cycle
  output logic   idct_o,       // direction of the current block
  output idx_t   line_o,       // current column/row
  output kidx_t  k_o,          // cycle within the line (CNT)
  output logic   busy_o,       // a block is in progress
  output logic   tr_wr_en_o,   // transposer write
  output logic   tr_wr_row_o,  // transposer written along a row
  output logic   tr_rd_en_o,   // transposer read
  output logic   tr_rd_col_o,  // transposer read along a column
  output logic   sm_wr_en_o,   // shape memory write
  output logic   sm_rd_en_o,   // shape memory read
  output logic   out_en_o,     // results of this cycle are block outputs
  output logic   blk_end_o     // last cycle of a block
);

  phase_e phase_q;
  logic   idct_q;
  idx_t   line_q;
  kidx_t  k_q;
  logic   need_in, last_k, last_line, go;
  kidx_t  k_last;
  phase_e next_phase;

  always_comb begin
    if (phase_q == PH_START) begin
      phase_o = idct_i ? PH_SHAPE : PH_COL_IN;
      idct_o  = idct_i;
    end else begin
      phase_o = phase_q;
      idct_o  = idct_q;
    end
  end

  always_comb begin
    need_in = (phase_o != PH_ROW_MEM);
    go    = need_in ? in_valid_i : 1'b1;
    if (phase_o == PH_SHAPE || npt_i <= cnt_t'(2)) k_last = '0;
    else                                            k_last = kidx_t'((npt_i + cnt_t'(1)) / cnt_t'(2) - cnt_t'(1));
    last_k     = (k_q == k_last);
    last_line  = (line_q == idx_t'(BLK - 1));
    in_ready_o = need_in && last_k;
    unique case (phase_o)
      PH_SHAPE:   next_phase = PH_ROW_IN;
      PH_COL_IN:  next_phase = PH_ROW_MEM;
      PH_ROW_IN:  next_phase = PH_COL_MEM;
      default:    next_phase = PH_START;   // ROW_MEM, COL_MEM end the block
    endcase
    tr_wr_en_o  = go && (phase_o == PH_COL_IN || phase_o == PH_ROW_IN);
    tr_wr_row_o = (phase_o == PH_ROW_IN);
    tr_rd_en_o  = (phase_o == PH_ROW_MEM || phase_o == PH_COL_MEM);
    tr_rd_col_o = (phase_o == PH_COL_MEM);
    sm_wr_en_o  = go && (phase_o == PH_SHAPE || phase_o == PH_COL_IN);
    sm_rd_en_o  = (phase_o == PH_ROW_IN || phase_o == PH_ROW_MEM);
    out_en_o    = go && (phase_o == PH_ROW_MEM || phase_o == PH_COL_MEM);
    blk_end_o   = go && last_k && last_line && next_phase == PH_START;
  end

  assign line_o = line_q;
  assign k_o    = k_q;
  assign busy_o = (phase_q != PH_START);

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      phase_q <= PH_START;
      idct_q  <= 1'b0;
      line_q  <= '0;
      k_q     <= '0;
    end else if (go) begin
      if (phase_q == PH_START) idct_q <= idct_i;
      if (!last_k) begin
        k_q     <= k_q + kidx_t'(1);
        phase_q <= phase_o;
      end else begin
        k_q <= '0;
        if (last_line) begin
          line_q  <= '0;
          phase_q <= next_phase;
        end else begin
          line_q  <= line_q + idx_t'(1);
          phase_q <= phase_o;
        end
      end
    end
  end

  // while the input of a line is held, k never passes its last cycle
  a_k_range: assert property (@(posedge clk_i) disable iff (rst_i) go |-> k_q <= k_last);

endmodule

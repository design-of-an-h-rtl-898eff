// lpl_unit -- line-pixel-lookahead (LPL) controller with its reduced slice
// SRAM.
//
// The decoder hands over one column of a macroblock (MB) row at a time, in
// raster order: 4 luma pixels wide, and with CHROMA the 2 Cb and 2 Cr
// pixels above the same place of a 4:2:0 frame. With the column come the
// mode and edge strength of its top 4x4 sub-block and its four bottom
// lines, EW words of 32 bits: word 2k is luma line k, word 2k+1 the chroma
// line k packed as {Cr, Cr, Cb, Cb} (with CHROMA = 0 word k is luma line k).
// For each column the unit
//   1. forms the decoding TAG pair D.TAG (lpl_tag_predict); in the first MB
//      row it is masked to 0 for the compare, since nothing lies above, but
//      the unmasked pair enters the TAG history;
//   2. reads N.TAG, the TAG pair predicted one row earlier, and the
//      previous row's D.TAG from the two TAG buffers (lpl_tag_buffer);
//   3. compares N.TAG with D.TAG (lpl_tag_cmp) and raises the miss requests;
//   4. predicts the TAG pair of the column one row below from the 4x3 TAG
//      template (lpl_tag_decision) and writes the bottom lines into the
//      slice SRAM (wen) when either predicted TAG is 1, except in the last
//      MB row of the frame;
//   5. returns the upper-neighbour lines: from the slice SRAM when they
//      were kept, from frame DRAM over the system bus when a unit needs
//      them and they were not kept (the miss with cycle penalty), or zeros
//      when nobody needs them.
// The TAG flow of steps 1-4, the template, the miss/hit table and storing
// four upper lines of luma and chroma (4:2:0, 8 bits) follow the published
// LPL scheme. Writing one copy for both units when either TAG is set, the
// column transaction, the circular slice SRAM, dropping a prediction when
// the SRAM is full (the TAG is then stored as 0, so the next row sees the
// true state), the packing of words and the bus protocol are this design's
// choices.
//
// Timing: a column is accepted in S_IDLE (col_valid & col_ready). If the
// column has stored words or must store some, S_XFER moves EW words in EW
// cycles plus one cycle for the last read, reads and writes in parallel. A
// fetch then issues EW single-word bus reads, one at a time (request until
// bus_req_ready, then wait for bus_rsp_valid). The result is offered in
// S_RESP until up_ready. Without a fetch the latency from accept to
// up_valid is 1 cycle (nothing to move) or EW + 2 cycles (10 with CHROMA).
//
// Bus address (32-bit words, planes in raster order, NCOL = FRAME_W/4) of
// upper line k = 0..3 of column j in MB row r:
//   luma   : frame_base + (16*r - 4 + k) * NCOL + j
//   chroma : frame_base + NCOL*FRAME_H + (8*r - 4 + k) * NCOL + j
module lpl_unit
  import lpl_pkg::*;
#(
  parameter int unsigned FRAME_W     = 1920,  // luma frame width (pixels)
  parameter int unsigned FRAME_H     = 1088,  // luma frame height (pixels)
  parameter int unsigned SLICE_DEPTH = 480,   // slice SRAM words
  parameter bit          CHROMA      = 1'b1,  // keep 4:2:0 chroma lines too
  parameter int unsigned ADDR_W      = 24,    // bus word-address width
  // words per line of one column: luma, plus Cb/Cb/Cr/Cr with CHROMA
  localparam int unsigned CFW        = CHROMA ? 2 : 1,
  // words kept per column: four upper lines
  localparam int unsigned EW         = UPPER_LINES * CFW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // frame control
  input  logic                 frame_start,   // pulse in S_IDLE: row 0 next
  input  logic [ADDR_W-1:0]    frame_base,    // word address of the frame
  // column input from the decoding engine
  input  logic                 col_valid,
  output logic                 col_ready,
  input  blk_info_t            col_info,
  input  word_t [EW-1:0]       col_bottom,    // bottom lines (see above)
  // upper-neighbour result
  output logic                 up_valid,
  input  logic                 up_ready,
  output word_t [EW-1:0]       up_data,       // upper lines (see above)
  output tag_pair_t            up_need,       // D.TAG of the column
  output tag_pair_t            up_req,        // miss requests (TAG CMP)
  output cmp_e                 up_cmp_dbf,
  output cmp_e                 up_cmp_intra,
  output logic                 up_fetched,    // data came from frame DRAM
  output tag_pair_t            up_pred,       // TAGs kept for the next row
  output rule_e                up_rule_dbf,
  output rule_e                up_rule_intra,
  output logic                 up_dropped,    // prediction lost: SRAM full
  // system bus (single-word reads of frame DRAM)
  output logic                 bus_req_valid,
  input  logic                 bus_req_ready,
  output logic [ADDR_W-1:0]    bus_req_addr,
  input  logic                 bus_rsp_valid,
  input  word_t                bus_rsp_data
);

  localparam int unsigned NCOL  = FRAME_W / PIX_PER_WORD;
  localparam int unsigned NROW  = FRAME_H / MB_SIZE;
  localparam int unsigned CIDXW = (NCOL > 1) ? $clog2(NCOL) : 1;
  localparam int unsigned RIDXW = (NROW > 1) ? $clog2(NROW) : 1;
  localparam int unsigned FREEW = $clog2(SLICE_DEPTH+1);
  localparam int unsigned EIW   = $clog2(EW);        // word index width
  localparam int unsigned EBW   = $clog2(EW + 1);    // beat counter width

  typedef enum logic [2:0] {S_IDLE, S_XFER, S_FREQ, S_FWAIT, S_RESP} state_e;

  state_e                 state_q;
  logic [CIDXW-1:0]       col_q;
  logic [RIDXW-1:0]       row_q;
  logic [EBW-1:0]         beat_q;
  logic [EBW-1:0]         line_q;

  // ---------------------------------------------------------------- TAGs
  logic       first_row;
  tag_pair_t  dtag_raw, dtag, hist, ntag, pred, req;
  cmp_e       cmp_dbf, cmp_intra;
  logic       fetch;
  rule_e      rule_dbf, rule_intra;
  logic       hist_dbf_rd, hist_intra_rd, ntag_dbf_rd, ntag_intra_rd;
  logic       accept;

  // template history: previous-row D.TAGs at j-1, j-2; current row at j-1, j-2
  tag_pair_t  pa1_q, pa2_q, f_q, e_q;
  tag_pair_t  a_t, e_t, f_t;

  logic last_row;
  assign first_row = (row_q == '0);
  assign last_row  = (row_q == RIDXW'(NROW-1));
  assign accept    = (state_q == S_IDLE) && col_valid && !frame_start;

  lpl_tag_predict u_predict (
    .blk_info (col_info),
    .dtag     (dtag_raw)
  );

  assign dtag = first_row ? '0 : dtag_raw;

  lpl_tag_buffer #(.NCOL(NCOL)) u_buf_dbf (
    .clk, .rst_n,
    .col    (col_q),
    .we     (accept),
    .hist_wr(dtag_raw.dbf),
    .ntag_wr(pred.dbf),
    .hist_rd(hist_dbf_rd),
    .ntag_rd(ntag_dbf_rd)
  );

  lpl_tag_buffer #(.NCOL(NCOL)) u_buf_intra (
    .clk, .rst_n,
    .col    (col_q),
    .we     (accept),
    .hist_wr(dtag_raw.intra),
    .ntag_wr(pred.intra),
    .hist_rd(hist_intra_rd),
    .ntag_rd(ntag_intra_rd)
  );

  // Outside the frame (first row, first two columns) TAGs read as 0.
  always_comb begin
    hist.dbf   = hist_dbf_rd   & !first_row;
    hist.intra = hist_intra_rd & !first_row;
    ntag.dbf   = ntag_dbf_rd   & !first_row;
    ntag.intra = ntag_intra_rd & !first_row;
    a_t = (col_q >= CIDXW'(2)) ? pa2_q : '0;
    e_t = (col_q >= CIDXW'(2)) ? e_q   : '0;
    f_t = (col_q >= CIDXW'(1)) ? f_q   : '0;
  end

  logic x_dbf, x_intra;

  lpl_tag_decision u_dec_dbf (
    .a(a_t.dbf), .c(hist.dbf), .e(e_t.dbf), .f(f_t.dbf), .g(dtag_raw.dbf),
    .x(x_dbf), .rule(rule_dbf)
  );

  lpl_tag_decision u_dec_intra (
    .a(a_t.intra), .c(hist.intra), .e(e_t.intra), .f(f_t.intra), .g(dtag_raw.intra),
    .x(x_intra), .rule(rule_intra)
  );

  lpl_tag_cmp u_cmp (
    .ntag     (ntag),
    .dtag     (dtag),
    .req      (req),
    .cmp_dbf  (cmp_dbf),
    .cmp_intra(cmp_intra),
    .fetch    (fetch)
  );

  // ------------------------------------------------ slice SRAM and wen
  logic             stored, want_store, room, do_store;
  logic             sram_wen, sram_ren;
  word_t            sram_wdata, sram_rdata;
  logic [FREEW-1:0] sram_free;

  assign stored     = ntag.dbf | ntag.intra;
  // Nothing lies below the last MB row: store nothing there.
  assign want_store = (x_dbf | x_intra) && !last_row;
  // The words of this column leave the SRAM while the new ones enter.
  assign room       = (32'(sram_free) + (stored ? EW : 0)) >= EW;
  assign do_store   = want_store && room;
  assign pred.dbf   = x_dbf   && do_store;
  assign pred.intra = x_intra && do_store;

  slice_sram #(.DEPTH(SLICE_DEPTH)) u_sram (
    .clk, .rst_n,
    .flush(frame_start && state_q == S_IDLE),
    .wen  (sram_wen),
    .wdata(sram_wdata),
    .ren  (sram_ren),
    .rdata(sram_rdata),
    .free (sram_free)
  );

  // ---------------------------------------------------- column registers
  logic  stored_q, store_q, fetch_q;
  word_t [EW-1:0] bottom_q, upper_q;

  assign sram_ren   = (state_q == S_XFER) && stored_q && (beat_q < EBW'(EW));
  assign sram_wen   = (state_q == S_XFER) && store_q  && (beat_q < EBW'(EW));
  assign sram_wdata = bottom_q[beat_q[EIW-1:0]];

  // Address of word w of the upper neighbours of the current column: line
  // k = w / CFW of the luma plane (MB height 16) or, for the odd words with
  // CHROMA, of the chroma plane (MB height 8) that follows the luma plane.
  logic [ADDR_W-1:0] line_addr;
  logic [31:0]       line_k;
  logic              chroma_word;
  always_comb begin
    line_k      = 32'(line_q) / CFW;
    chroma_word = CHROMA && line_q[0];
    if (chroma_word)
      line_addr = frame_base + ADDR_W'(NCOL * FRAME_H)
                + ADDR_W'((32'(row_q) * (MB_SIZE / 2) - UPPER_LINES + line_k) * NCOL)
                + ADDR_W'(col_q);
    else
      line_addr = frame_base
                + ADDR_W'((32'(row_q) * MB_SIZE - UPPER_LINES + line_k) * NCOL)
                + ADDR_W'(col_q);
  end

  assign col_ready     = (state_q == S_IDLE) && !frame_start;
  assign bus_req_valid = (state_q == S_FREQ);
  assign bus_req_addr  = line_addr;
  assign up_valid      = (state_q == S_RESP);
  assign up_data       = upper_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      col_q     <= '0;
      row_q     <= '0;
      beat_q    <= '0;
      line_q    <= '0;
      pa1_q     <= '0;
      pa2_q     <= '0;
      e_q       <= '0;
      f_q       <= '0;
      stored_q  <= 1'b0;
      store_q   <= 1'b0;
      fetch_q   <= 1'b0;
      bottom_q  <= '0;
      upper_q   <= '0;
      up_need   <= '0;
      up_req    <= '0;
      up_cmp_dbf   <= CMP_HIT;
      up_cmp_intra <= CMP_HIT;
      up_fetched   <= 1'b0;
      up_pred      <= '0;
      up_rule_dbf  <= RULE_AF;
      up_rule_intra<= RULE_AF;
      up_dropped   <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE: begin
          if (frame_start) begin
            col_q <= '0;
            row_q <= '0;
          end else if (col_valid) begin
            // template shift: column j becomes j-1, j-1 becomes j-2
            pa2_q <= pa1_q;
            pa1_q <= hist;
            e_q   <= f_q;
            f_q   <= dtag_raw;
            stored_q  <= stored;
            store_q   <= do_store;
            fetch_q   <= fetch;
            bottom_q  <= col_bottom;
            upper_q   <= '0;
            beat_q    <= '0;
            line_q    <= '0;
            up_need      <= dtag;
            up_req       <= req;
            up_cmp_dbf   <= cmp_dbf;
            up_cmp_intra <= cmp_intra;
            up_fetched   <= fetch;
            up_pred      <= pred;
            up_rule_dbf  <= rule_dbf;
            up_rule_intra<= rule_intra;
            up_dropped   <= want_store && !room;
            if (stored || do_store) state_q <= S_XFER;
            else if (fetch)         state_q <= S_FREQ;
            else                    state_q <= S_RESP;
          end
        end
        S_XFER: begin
          if (stored_q && beat_q != '0) upper_q[EIW'(beat_q - 1'b1)] <= sram_rdata;
          beat_q <= beat_q + 1'b1;
          if (beat_q == EBW'(EW)) begin
            // keep the words only for a unit that uses them
            if (!(up_need.dbf | up_need.intra)) upper_q <= '0;
            state_q <= fetch_q ? S_FREQ : S_RESP;
          end
        end
        S_FREQ: begin
          if (bus_req_ready) state_q <= S_FWAIT;
        end
        S_FWAIT: begin
          if (bus_rsp_valid) begin
            upper_q[line_q[EIW-1:0]] <= bus_rsp_data;
            line_q <= line_q + 1'b1;
            state_q <= (line_q == EBW'(EW-1)) ? S_RESP : S_FREQ;
          end
        end
        S_RESP: begin
          if (up_ready) begin
            state_q <= S_IDLE;
            if (col_q == CIDXW'(NCOL-1)) begin
              col_q <= '0;
              row_q <= (row_q == RIDXW'(NROW-1)) ? '0 : row_q + 1'b1;
            end else begin
              col_q <= col_q + 1'b1;
            end
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // A bus request stays up until it is taken.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 bus_req_valid && !bus_req_ready |=> bus_req_valid);
  // No read response arrives without an outstanding request.
  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n)
                                   bus_rsp_valid |-> state_q == S_FWAIT);

endmodule

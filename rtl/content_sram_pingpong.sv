// content_sram_pingpong -- content SRAM between the decoding ALUs and the
// deblocking filter, organised as two single-port macroblock banks used in
// ping-pong.
//
// The producer (reconstruction ALUs) fills one bank with a macroblock while
// the consumer (deblocking filter) reads the other, so reading and writing
// go on at the same time without bubbles although each bank has a single
// port. A bank is handed over by a pulse: wr_done marks the bank just
// written full and moves the producer to the other bank; rd_done marks the
// bank just read empty and moves the consumer on. wr_ready is low while the
// producer's bank still holds an unread macroblock; rd_avail is high while
// the consumer's bank holds one. Read data appear one cycle after rd_en.
// The two-macroblock ping-pong structure follows the published design; the bank
// size (one 4:2:0 macroblock of 8-bit samples, 384 bytes = 96 words) and the
// handshake are this design's choices.
module content_sram_pingpong
  import lpl_pkg::*;
#(
  parameter int unsigned MB_WORDS = 96
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // producer side
  output logic                        wr_ready,
  input  logic                        wr_en,
  input  logic [$clog2(MB_WORDS)-1:0] wr_addr,
  input  word_t                       wr_data,
  input  logic                        wr_done,
  // consumer side
  output logic                        rd_avail,
  input  logic                        rd_en,
  input  logic [$clog2(MB_WORDS)-1:0] rd_addr,
  output word_t                       rd_data,
  input  logic                        rd_done,
  output logic                        wbank,     // bank the producer uses
  output logic                        rbank      // bank the consumer uses
);

  word_t bank0 [MB_WORDS];
  word_t bank1 [MB_WORDS];
  logic  [1:0] full_q;
  logic  wsel_q, rsel_q;

  assign wr_ready = !full_q[wsel_q];
  assign rd_avail =  full_q[rsel_q];
  assign wbank    = wsel_q;
  assign rbank    = rsel_q;

  // Each bank has one port: it is written or read in a cycle, never both.
  always_ff @(posedge clk) begin
    if (wr_en && wr_ready && !wsel_q) bank0[wr_addr] <= wr_data;
    else if (rd_en && rd_avail && !rsel_q) rd_data <= bank0[rd_addr];
    if (wr_en && wr_ready && wsel_q) bank1[wr_addr] <= wr_data;
    else if (rd_en && rd_avail && rsel_q) rd_data <= bank1[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full_q <= '0;
      wsel_q <= 1'b0;
      rsel_q <= 1'b0;
    end else begin
      if (wr_done && wr_ready) begin
        full_q[wsel_q] <= 1'b1;
        wsel_q         <= !wsel_q;
      end
      if (rd_done && rd_avail) begin
        full_q[rsel_q] <= 1'b0;
        rsel_q         <= !rsel_q;
      end
    end
  end

  a_wr_when_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                    wr_en |-> wr_ready);
  a_rd_when_avail: assert property (@(posedge clk) disable iff (!rst_n)
                                    rd_en |-> rd_avail);

endmodule

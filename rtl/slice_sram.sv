// slice_sram -- reduced slice SRAM of the line-pixel-lookahead.
//
// Keeps the upper-neighbour pixels of only those columns whose TAG
// predicted a use, written under `wen` by the TAG generation. Pixels are
// written during one macroblock row in column order and read back in the
// same column order during the next row, so the SRAM is organised as a
// circular buffer of DEPTH 32-bit words: a write pointer for the row being
// decoded and a read pointer for the row above. A write and a read may
// happen in the same cycle (one write port, one read port). Read data
// appear one cycle after `ren` (registered read, as in a synchronous SRAM).
// `free` tells the writer how many words are left; writing when full or
// reading when empty is a caller error and flagged by assertions.
// The 32-bit port follows the published design; the circular organisation and the
// depth are this design's choices (the published design gives no reduced size for
// 1080HD).
module slice_sram
  import lpl_pkg::*;
#(
  parameter int unsigned DEPTH = 480
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     flush,   // empty the buffer (new frame)
  input  logic                     wen,
  input  word_t                    wdata,
  input  logic                     ren,
  output word_t                    rdata,
  output logic [$clog2(DEPTH+1)-1:0] free
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  word_t          mem [DEPTH];
  logic [AW-1:0]  wptr_q, rptr_q;
  logic [CW-1:0]  count_q;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  assign free = CW'(DEPTH) - count_q;

  always_ff @(posedge clk) begin
    if (wen) mem[wptr_q] <= wdata;
    if (ren) rdata <= mem[rptr_q];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr_q  <= '0;
      rptr_q  <= '0;
      count_q <= '0;
    end else if (flush) begin
      wptr_q  <= '0;
      rptr_q  <= '0;
      count_q <= '0;
    end else begin
      if (wen) wptr_q <= inc(wptr_q);
      if (ren) rptr_q <= inc(rptr_q);
      count_q <= count_q + CW'(wen) - CW'(ren);
    end
  end

  // A write needs a free word unless a read frees one in the same cycle.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n || flush)
                                   wen |-> (count_q < CW'(DEPTH)) || ren);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n || flush)
                                   ren |-> (count_q != '0));

endmodule

// lpl_tag_predict -- TAG prediction step of the line-pixel-lookahead.
//
// Produces the decoding TAG pair D.TAG = F(pre_mode, bS) of one 4-pixel
// column at a macroblock-row boundary: a bit is 1 when that unit really
// reads the upper neighbouring pixels of the column.
//   * Deblocking filter: the horizontal macroblock edge is filtered unless
//     its boundary strength is 0 ("SKIP mode" of the filter).
//   * Intra prediction: the block needs its upper neighbours unless it is
//     inter coded or uses a near-horizontal mode (intra 4x4 horizontal or
//     horizontal-up, intra 16x16 horizontal).
// The caller masks the pair in the first macroblock row, where no upper
// neighbour exists; the unmasked pair still feeds the TAG template.
// The rule "needs upper pixels -> 1" follows the published design; which
// mode numbers count as near-horizontal is this design's reading of the
// H.264/AVC mode list.
//
// Interface: purely combinational, blk_info in, dtag out.
module lpl_tag_predict
  import lpl_pkg::*;
(
  input  blk_info_t blk_info,   // mode and edge strength of the column
  output tag_pair_t dtag        // decoding TAG pair
);

  logic intra_needs_upper;

  always_comb begin
    unique case (blk_info.ptype)
      PRED_INTRA4X4:
        intra_needs_upper = (blk_info.mode != I4_HORIZONTAL) &&
                            (blk_info.mode != I4_HORIZONTAL_UP);
      PRED_INTRA16X16:
        intra_needs_upper = (blk_info.mode != I16_HORIZONTAL);
      default:
        intra_needs_upper = 1'b0;
    endcase
    dtag.dbf   = (blk_info.bs_top != 3'd0);
    dtag.intra = intra_needs_upper;
  end

endmodule

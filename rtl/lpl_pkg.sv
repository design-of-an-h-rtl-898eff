// lpl_pkg -- shared types and constants of the H.264/AVC decoder memory
// hierarchy with line-pixel-lookahead (LPL).
//
// The slice SRAM and the LPL logic work on "columns": a 4-pixel wide strip
// of luma at a macroblock-row boundary. Each column carries one TAG pair,
// one bit for the deblocking filter and one for intra prediction. The types
// below describe the per-column decoding information and the TAG pair.
// Pixel data move as 32-bit words of four 8-bit pixels, matching the 32-bit
// port of the slice SRAM.
package lpl_pkg;

  // Pixel depth and word size (4:2:0, 8 bits per pixel; 32-bit SRAM port).
  localparam int unsigned PIX_W       = 8;
  localparam int unsigned WORD_W      = 32;
  localparam int unsigned PIX_PER_WORD = WORD_W / PIX_W;
  // Upper-neighbour lines kept per column: the deblocking filter needs the
  // upper four pixels of each column at a 16x16 macroblock boundary.
  localparam int unsigned UPPER_LINES = 4;
  localparam int unsigned MB_SIZE     = 16;

  typedef logic [WORD_W-1:0] word_t;

  // Prediction type of the 4x4 sub-block that sits on the upper edge of a
  // macroblock.
  typedef enum logic [1:0] {
    PRED_INTER      = 2'd0,
    PRED_INTRA4X4   = 2'd1,
    PRED_INTRA16X16 = 2'd2
  } pred_type_e;

  // Intra mode numbers of H.264/AVC that take no upper neighbour.
  localparam logic [3:0] I4_HORIZONTAL    = 4'd1;
  localparam logic [3:0] I4_HORIZONTAL_UP = 4'd8;
  localparam logic [3:0] I16_HORIZONTAL   = 4'd1;

  // Decoding information of one column, the "pre_mode" and "bS" inputs of
  // the TAG prediction step.
  typedef struct packed {
    pred_type_e  ptype;
    logic [3:0]  mode;     // intra prediction mode number
    logic [2:0]  bs_top;   // boundary strength of the horizontal MB edge
  } blk_info_t;

  // One TAG per consumer of upper pixels.
  typedef struct packed {
    logic dbf;    // in-loop (deblocking) filter
    logic intra;  // intra prediction
  } tag_pair_t;

  // Which row of the decision table chose the prediction.
  typedef enum logic [1:0] {
    RULE_AF   = 2'd0,  // a == f  -> x = f
    RULE_AG   = 2'd1,  // a == g  -> x = e
    RULE_CG   = 2'd2,  // c == g  -> x = g
    RULE_MAJ  = 2'd3   // otherwise x = maj(e, f, g)
  } rule_e;

  // Outcome of comparing N.TAG with D.TAG.
  typedef enum logic [1:0] {
    CMP_HIT          = 2'd0,
    CMP_MISS_PENALTY = 2'd1,  // N.TAG = 0, D.TAG = 1: data must be fetched
    CMP_MISS_FREE    = 2'd2   // N.TAG = 1, D.TAG = 0: stored but unused
  } cmp_e;

endpackage

// slice_syntax_sram -- slice SRAM rows of upper-neighbour syntax elements.
//
// Besides pixels, decoding a macroblock row refers to syntax elements of
// the row above: motion-vector flags and the CAVLC nC of each 4x4 column,
// and the CBP / MB_Type flags CABAC uses for each macroblock. This module
// keeps one row of each, for the whole frame width:
//   * block row : FRAME_W/4 entries of MV_W + NC_W bits (2 x 10 + 5);
//   * MB row    : FRAME_W/16 entries of MBF_W bits (10 x 16).
// The entry sizes are those of the published slice-SRAM organisation; at
// 1920 pixels the two rows hold 12,000 + 19,200 = 31,200 bits. The TAG
// lookahead does not apply to these rows: every entry is kept.
//
// Each row is a synchronous single-port RAM used read-before-write: an
// access at column c returns, one cycle later, the entry the row above left
// there and stores the current row's entry in its place. Columns are visited
// in decoding order, so no address arithmetic is needed beyond the column.
// The single port, read-before-write timing and field packing are this
// design's choices.
module slice_syntax_sram #(
  parameter int unsigned FRAME_W = 1920,
  parameter int unsigned MV_W    = 20,    // 2 x 10-bit motion-vector flags
  parameter int unsigned NC_W    = 5,     // CAVLC nC
  parameter int unsigned MBF_W   = 160,   // CBP, MB_Type etc. for CABAC
  localparam int unsigned NBLK   = FRAME_W / 4,
  localparam int unsigned NMB    = FRAME_W / 16,
  localparam int unsigned BLK_W  = MV_W + NC_W
) (
  input  logic                    clk,
  // 4x4-column row
  input  logic                    blk_en,
  input  logic [$clog2(NBLK)-1:0] blk_col,
  input  logic [BLK_W-1:0]        blk_wdata,  // {mv flags, nC} of this row
  output logic [BLK_W-1:0]        blk_rdata,  // same column, row above
  // macroblock row
  input  logic                    mb_en,
  input  logic [$clog2(NMB)-1:0]  mb_col,
  input  logic [MBF_W-1:0]        mb_wdata,
  output logic [MBF_W-1:0]        mb_rdata
);

  logic [BLK_W-1:0] blk_mem [NBLK];
  logic [MBF_W-1:0] mb_mem  [NMB];

  always_ff @(posedge clk) begin
    if (blk_en) begin
      blk_rdata        <= blk_mem[blk_col];
      blk_mem[blk_col] <= blk_wdata;
    end
    if (mb_en) begin
      mb_rdata       <= mb_mem[mb_col];
      mb_mem[mb_col] <= mb_wdata;
    end
  end

endmodule

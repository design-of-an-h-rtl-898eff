// h264_mem_hier_top -- on-chip part of the three-level memory hierarchy of
// an H.264/AVC decoder: level 1 (content SRAM and the reduced slice SRAM with
// line-pixel-lookahead) between the level-0 registers/ALUs and the level-2
// frame DRAM.
//
// * Content SRAM (content_sram_pingpong): two macroblock banks in ping-pong
//   between the reconstruction ALUs and the deblocking filter.
// * Slice SRAM with LPL (lpl_unit): keeps the upper-neighbour pixels of the
//   previous macroblock row only for the columns the TAG prediction expects
//   to be used, and fetches the others from frame DRAM on a miss.
// * Slice SRAM syntax rows (slice_syntax_sram): upper-neighbour motion-vector
//   flags, nC and CBP / MB_Type flags, kept in full for the frame width.
// The ALUs, register files, I/O bridge and frame DRAM are outside this
// module; their signals are the ports below. The system-bus port carries
// single-word reads of frame DRAM (see lpl_unit for the protocol and the
// packing of col_bottom / up_data: EW = 8 words with CHROMA, 4 without).
// The structure follows the published design's hierarchy; the port protocols are
// this design's choices.
module h264_mem_hier_top
  import lpl_pkg::*;
#(
  parameter int unsigned FRAME_W     = 1920,
  parameter int unsigned FRAME_H     = 1088,
  parameter int unsigned SLICE_DEPTH = 480,
  parameter bit          CHROMA      = 1'b1,
  parameter int unsigned MB_WORDS    = 96,
  parameter int unsigned ADDR_W      = 24,
  // words per column: four upper lines of luma (and chroma)
  localparam int unsigned EW         = UPPER_LINES * (CHROMA ? 2 : 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // slice SRAM / LPL: decoder column port
  input  logic                        frame_start,
  input  logic [ADDR_W-1:0]           frame_base,
  input  logic                        col_valid,
  output logic                        col_ready,
  input  blk_info_t                   col_info,
  input  word_t [EW-1:0]              col_bottom,
  output logic                        up_valid,
  input  logic                        up_ready,
  output word_t [EW-1:0]              up_data,
  output tag_pair_t                   up_need,
  output tag_pair_t                   up_req,
  output cmp_e                        up_cmp_dbf,
  output cmp_e                        up_cmp_intra,
  output logic                        up_fetched,
  output tag_pair_t                   up_pred,
  output rule_e                       up_rule_dbf,
  output rule_e                       up_rule_intra,
  output logic                        up_dropped,
  // system bus towards the I/O bridge and frame DRAM
  output logic                        bus_req_valid,
  input  logic                        bus_req_ready,
  output logic [ADDR_W-1:0]           bus_req_addr,
  input  logic                        bus_rsp_valid,
  input  word_t                       bus_rsp_data,
  // content SRAM: ALU side
  output logic                        cs_wr_ready,
  input  logic                        cs_wr_en,
  input  logic [$clog2(MB_WORDS)-1:0] cs_wr_addr,
  input  word_t                       cs_wr_data,
  input  logic                        cs_wr_done,
  // content SRAM: deblocking-filter side
  output logic                        cs_rd_avail,
  input  logic                        cs_rd_en,
  input  logic [$clog2(MB_WORDS)-1:0] cs_rd_addr,
  output word_t                       cs_rd_data,
  input  logic                        cs_rd_done,
  output logic                        cs_wbank,
  output logic                        cs_rbank,
  // slice SRAM: syntax-element rows (read row above, write current row)
  input  logic                        ss_blk_en,
  input  logic [$clog2(FRAME_W/4)-1:0]  ss_blk_col,
  input  logic [24:0]                 ss_blk_wdata,
  output logic [24:0]                 ss_blk_rdata,
  input  logic                        ss_mb_en,
  input  logic [$clog2(FRAME_W/16)-1:0] ss_mb_col,
  input  logic [159:0]                ss_mb_wdata,
  output logic [159:0]                ss_mb_rdata
);

  lpl_unit #(
    .FRAME_W    (FRAME_W),
    .FRAME_H    (FRAME_H),
    .SLICE_DEPTH(SLICE_DEPTH),
    .CHROMA     (CHROMA),
    .ADDR_W     (ADDR_W)
  ) u_lpl (
    .clk, .rst_n,
    .frame_start, .frame_base,
    .col_valid, .col_ready, .col_info, .col_bottom,
    .up_valid, .up_ready, .up_data, .up_need, .up_req,
    .up_cmp_dbf, .up_cmp_intra, .up_fetched, .up_pred,
    .up_rule_dbf, .up_rule_intra, .up_dropped,
    .bus_req_valid, .bus_req_ready, .bus_req_addr,
    .bus_rsp_valid, .bus_rsp_data
  );

  content_sram_pingpong #(.MB_WORDS(MB_WORDS)) u_content (
    .clk, .rst_n,
    .wr_ready(cs_wr_ready), .wr_en(cs_wr_en), .wr_addr(cs_wr_addr),
    .wr_data (cs_wr_data),  .wr_done(cs_wr_done),
    .rd_avail(cs_rd_avail), .rd_en(cs_rd_en), .rd_addr(cs_rd_addr),
    .rd_data (cs_rd_data),  .rd_done(cs_rd_done),
    .wbank   (cs_wbank),    .rbank(cs_rbank)
  );

  slice_syntax_sram #(.FRAME_W(FRAME_W)) u_syntax (
    .clk,
    .blk_en(ss_blk_en), .blk_col(ss_blk_col),
    .blk_wdata(ss_blk_wdata), .blk_rdata(ss_blk_rdata),
    .mb_en(ss_mb_en), .mb_col(ss_mb_col),
    .mb_wdata(ss_mb_wdata), .mb_rdata(ss_mb_rdata)
  );

endmodule

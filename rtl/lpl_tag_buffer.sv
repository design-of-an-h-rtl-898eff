// lpl_tag_buffer -- TAG row buffer of one consumer of upper pixels.
//
// Holds 2*NCOL bits, NCOL being the number of 4-pixel TAG columns across
// the frame:
//   * hist[j] : the decoding TAG (D.TAG) of column j in the previous TAG
//               row, the upper row (a, b, c, d) of the 4x3 template;
//   * ntag[j] : the TAG predicted for column j of the row now decoded, read
//               back as N.TAG and compared with that row's D.TAG.
// Two such buffers (deblocking filter, intra prediction) make the two
// 2W-bit TAG buffers of the LPL scheme. One column is visited per access:
// its old contents are read combinationally and, when `we` is high, the new
// row's values are written at the clock edge, so both rows share one index.
// The reset clears both rows (the frame's first TAG row has no history).
module lpl_tag_buffer #(
  parameter int unsigned NCOL = 480
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [$clog2(NCOL)-1:0] col,       // column visited
  input  logic                    we,        // write the new row's values
  input  logic                    hist_wr,   // D.TAG of this row, column col
  input  logic                    ntag_wr,   // prediction for the next row
  output logic                    hist_rd,   // D.TAG of previous row
  output logic                    ntag_rd    // N.TAG for this row
);

  logic [NCOL-1:0] hist_q;
  logic [NCOL-1:0] ntag_q;

  assign hist_rd = hist_q[col];
  assign ntag_rd = ntag_q[col];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist_q <= '0;
      ntag_q <= '0;
    end else if (we) begin
      hist_q[col] <= hist_wr;
      ntag_q[col] <= ntag_wr;
    end
  end

endmodule

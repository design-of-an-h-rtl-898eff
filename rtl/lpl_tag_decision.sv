// lpl_tag_decision -- decision table of the multi-dimensional TAG
// prediction (4x3 TAG template).
//
// The template holds the TAGs of the two last TAG rows around the column
// being decoded (raster order a..g):
//        a b c d      <- row above   (columns j-2 .. j+1)
//        e f g        <- current row (columns j-2 .. j)
//            x        <- next row, column j: the TAG to predict
// The table is the published design's:
//   a == f -> x = f;  a == g -> x = e;  c == g -> x = g;  else x = maj(e,f,g)
// Rows are tried from the top, the first that matches wins (the published design
// lists them in this order without saying how overlaps resolve). TAG d is
// part of the template but enters no rule, so it is no input here.
//
// Interface: purely combinational; rule reports the table row used.
module lpl_tag_decision
  import lpl_pkg::*;
(
  input  logic  a,
  input  logic  c,
  input  logic  e,
  input  logic  f,
  input  logic  g,
  output logic  x,     // predicted TAG of the next row
  output rule_e rule   // table row that decided
);

  always_comb begin
    if (a == f) begin
      x    = f;
      rule = RULE_AF;
    end else if (a == g) begin
      x    = e;
      rule = RULE_AG;
    end else if (c == g) begin
      x    = g;
      rule = RULE_CG;
    end else begin
      x    = (e & f) | (e & g) | (f & g);
      rule = RULE_MAJ;
    end
  end

endmodule

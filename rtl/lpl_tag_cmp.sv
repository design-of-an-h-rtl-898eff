// lpl_tag_cmp -- TAG compare unit of the line-pixel-lookahead.
//
// For each consumer of upper pixels (deblocking filter, intra prediction)
// it compares the neighbouring TAG N.TAG, stored one row earlier, with the
// decoding TAG D.TAG of the column now decoded. A difference raises that
// unit's request (a prediction miss). Following the miss/hit table of the
// document, a miss costs cycles only when N.TAG = 0 and D.TAG = 1: the
// pixels are needed but were not kept, so they must come from frame DRAM.
//
// The pixels of a column are written once for both units, under the OR of
// the two N.TAGs (the slice-SRAM write enable of one row earlier). `fetch`
// is therefore raised only when some unit needs the pixels and neither
// N.TAG is set; sharing one stored copy is this design's choice.
//
// Interface: purely combinational.
module lpl_tag_cmp
  import lpl_pkg::*;
(
  input  tag_pair_t ntag,     // neighbouring TAGs (prediction, one row old)
  input  tag_pair_t dtag,     // decoding TAGs (actual need)
  output tag_pair_t req,      // per-unit miss request (N.TAG != D.TAG)
  output cmp_e      cmp_dbf,  // classification, deblocking filter
  output cmp_e      cmp_intra,// classification, intra prediction
  output logic      fetch     // upper pixels must be fetched from DRAM
);

  function automatic cmp_e classify(input logic n, input logic d);
    if (n == d)  return CMP_HIT;
    else if (d)  return CMP_MISS_PENALTY;
    else         return CMP_MISS_FREE;
  endfunction

  always_comb begin
    req.dbf   = ntag.dbf   ^ dtag.dbf;
    req.intra = ntag.intra ^ dtag.intra;
    cmp_dbf   = classify(ntag.dbf,   dtag.dbf);
    cmp_intra = classify(ntag.intra, dtag.intra);
    fetch     = (dtag.dbf | dtag.intra) & ~(ntag.dbf | ntag.intra);
  end

endmodule

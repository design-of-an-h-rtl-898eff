// tb_lpl_tag_cmp -- exhaustive check of the TAG compare unit against the
// miss/hit table: N.TAG/D.TAG 0/0 hit, 0/1 miss with cycle penalty,
// 1/0 miss without penalty, 1/1 hit; and of the DRAM fetch decision (some
// unit needs the pixels and neither N.TAG kept them).
module tb_lpl_tag_cmp;
  import lpl_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  tag_pair_t ntag, dtag, req;
  cmp_e cmp_dbf, cmp_intra;
  logic fetch;

  lpl_tag_cmp dut (.ntag, .dtag, .req, .cmp_dbf, .cmp_intra, .fetch);

  // table indexed by {N.TAG, D.TAG}
  localparam cmp_e TABLE [4] = '{CMP_HIT, CMP_MISS_PENALTY, CMP_MISS_FREE, CMP_HIT};

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp_fetch;
      {ntag, dtag} = 4'(v);
      @(negedge clk);
      exp_fetch = (ntag == 2'b00) && (dtag != 2'b00);
      checks++;
      if (cmp_dbf   != TABLE[{ntag.dbf,   dtag.dbf}]   ||
          cmp_intra != TABLE[{ntag.intra, dtag.intra}] ||
          req.dbf   != (cmp_dbf != CMP_HIT)            ||
          req.intra != (cmp_intra != CMP_HIT)          ||
          fetch     != exp_fetch) begin
        failures++;
        $display("FAIL n=%b d=%b: req=%b cmp=%0d/%0d fetch=%0d", ntag, dtag, req,
                 cmp_dbf, cmp_intra, fetch);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

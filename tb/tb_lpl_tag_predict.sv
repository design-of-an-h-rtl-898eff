// tb_lpl_tag_predict -- exhaustive check of the TAG prediction step.
// Every prediction type, intra mode 0..15 and boundary strength 0..7 is
// applied; the expected TAG pair comes from a table of the H.264/AVC modes
// that read the upper neighbours (intra 4x4: all but horizontal and
// horizontal-up; intra 16x16: all but horizontal; inter: none) and from
// "bS = 0 means the edge is not filtered".
module tb_lpl_tag_predict;
  import lpl_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  blk_info_t blk_info;
  tag_pair_t dtag;

  lpl_tag_predict dut (.blk_info, .dtag);

  // modes that use the row above, one bit per mode number
  localparam logic [15:0] I4_USES_UPPER  = 16'b1111_1110_1111_1101;
  localparam logic [15:0] I16_USES_UPPER = 16'b1111_1111_1111_1101;

  initial begin
    for (int t = 0; t < 3; t++)
      for (int m = 0; m < 16; m++)
        for (int bs = 0; bs < 8; bs++) begin
          logic exp_i;
          blk_info.ptype  = pred_type_e'(t);
          blk_info.mode   = 4'(m);
          blk_info.bs_top = 3'(bs);
          @(negedge clk);
          exp_i = (t == 1) ? I4_USES_UPPER[m] : (t == 2) ? I16_USES_UPPER[m] : 1'b0;
          checks++;
          if (dtag.dbf !== (bs != 0) || dtag.intra !== exp_i) begin
            failures++;
            $display("FAIL type %0d mode %0d bs %0d: got %b", t, m, bs, dtag);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

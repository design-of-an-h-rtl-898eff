// tb_lpl_workloads -- the LPL unit at the frame sizes of the published miss
// rate study, QCIF (176 x 144) and CIF (352 x 288), and a sweep of slice
// SRAM depths at QCIF, from a full row of upper lines (44 columns x 8 words
// = 352 words of luma and chroma) down to two columns.
//
// Every instance is a full self-checking lpl_harness. The QCIF instances
// share one mode stream, so they differ only in the SRAM depth; this bench
// checks across them that
//   * the template mispredicts the same columns in every instance,
//   * a full-row SRAM never drops a prediction, and smaller ones do,
//   * DRAM fetches do not decrease as the SRAM shrinks.
// It prints, per instance, the SRAM size in bits, the TAG miss rate
// (misses / TAGs compared) and the 32-bit words read from DRAM per frame.
// The mode streams are synthetic, so the rates show the trade-off, not the
// values for real video.
module tb_lpl_workloads;
  localparam int NQ = 5;
  localparam int unsigned QDEPTH [NQ] = '{352, 176, 88, 40, 16};
  localparam int unsigned NFR = 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic q_done [NQ];
  int   q_checks [NQ], q_fail [NQ], q_tags [NQ], q_miss [NQ];
  int   q_fetch [NQ], q_drop [NQ], q_pm [NQ];
  logic c_done [2];
  int   c_checks [2], c_fail [2], c_tags [2], c_miss [2];
  int   c_fetch [2], c_drop [2], c_pm [2];

  for (genvar i = 0; i < NQ; i++) begin : g_qcif
    lpl_harness #(
      .FRAME_W(176), .FRAME_H(144), .SLICE_DEPTH(QDEPTH[i]), .NFRAMES(NFR),
      .SEED(32'hACE1_2468)
    ) u_h (
      .clk, .done(q_done[i]), .checks(q_checks[i]), .failures(q_fail[i]),
      .n_tags(q_tags[i]), .n_miss(q_miss[i]), .n_fetch(q_fetch[i]),
      .n_drop(q_drop[i]), .n_predmiss(q_pm[i])
    );
  end

  localparam int unsigned CDEPTH [2] = '{704, 88};
  for (genvar i = 0; i < 2; i++) begin : g_cif
    lpl_harness #(
      .FRAME_W(352), .FRAME_H(288), .SLICE_DEPTH(CDEPTH[i]), .NFRAMES(NFR),
      .SEED(32'h0BAD_F00D)
    ) u_h (
      .clk, .done(c_done[i]), .checks(c_checks[i]), .failures(c_fail[i]),
      .n_tags(c_tags[i]), .n_miss(c_miss[i]), .n_fetch(c_fetch[i]),
      .n_drop(c_drop[i]), .n_predmiss(c_pm[i])
    );
  end

  int checks = 0, failures = 0;

  task automatic chk(input logic ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic bit all_done();
    for (int i = 0; i < NQ; i++) if (!q_done[i]) return 0;
    for (int i = 0; i < 2; i++) if (!c_done[i]) return 0;
    return 1;
  endfunction

  initial begin
    #20;
    while (!all_done()) @(posedge clk);
    for (int i = 0; i < NQ; i++) begin
      checks += q_checks[i]; failures += q_fail[i];
      $display("QCIF slice SRAM %5d bits: miss rate %0.4f, DRAM words/frame %0d, drops %0d",
               QDEPTH[i] * 32, real'(q_miss[i]) / real'(q_tags[i]),
               8 * q_fetch[i] / NFR, q_drop[i]);
      chk(q_pm[i] == q_pm[0], $sformatf("QCIF %0d: mode stream differs", i));
      if (i > 0) chk(q_fetch[i] >= q_fetch[i-1],
                     $sformatf("QCIF depth %0d fetches %0d < %0d", QDEPTH[i], q_fetch[i], q_fetch[i-1]));
    end
    chk(q_drop[0] == 0, "full-row SRAM dropped a prediction");
    chk(q_drop[NQ-1] > 0, "smallest SRAM never dropped a prediction");
    for (int i = 0; i < 2; i++) begin
      checks += c_checks[i]; failures += c_fail[i];
      $display("CIF  slice SRAM %5d bits: miss rate %0.4f, DRAM words/frame %0d, drops %0d",
               CDEPTH[i] * 32, real'(c_miss[i]) / real'(c_tags[i]),
               8 * c_fetch[i] / NFR, c_drop[i]);
    end
    chk(c_drop[0] == 0, "full-row CIF SRAM dropped a prediction");
    chk(c_fetch[1] >= c_fetch[0], "CIF fetches fell with a smaller SRAM");
    chk(c_pm[0] == c_pm[1], "CIF mode stream differs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_slice_syntax_sram -- check of the syntax-element row store at its
// default size (1920 pixels: 480 block entries, 120 MB entries). Three
// "rows" are decoded: every column is visited in order, as a decoder
// would, and the entry read back must be the one written at that column a
// row earlier. A fourth pass visits random columns with random gaps and is
// checked against plain model arrays.
module tb_slice_syntax_sram;
  localparam int unsigned NBLK = 480, NMB = 120;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic blk_en = 1'b0, mb_en = 1'b0;
  logic [8:0]   blk_col = '0;
  logic [6:0]   mb_col = '0;
  logic [24:0]  blk_wdata = '0, blk_rdata;
  logic [159:0] mb_wdata = '0, mb_rdata;

  slice_syntax_sram dut (.*);

  logic [24:0]  m_blk [NBLK];
  logic [159:0] m_mb  [NMB];
  bit           v_blk [NBLK];
  bit           v_mb  [NMB];

  function automatic logic [159:0] wide_rand();
    logic [159:0] v;
    for (int i = 0; i < 5; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

  task automatic access(input bit do_blk, input int bc, input bit do_mb, input int mc);
    logic [24:0]  eb;
    logic [159:0] em;
    bit           cb, cm;
    blk_en = do_blk; blk_col = 9'(bc); blk_wdata = 25'($urandom);
    mb_en  = do_mb;  mb_col  = 7'(mc); mb_wdata  = wide_rand();
    eb = m_blk[bc]; cb = do_blk && v_blk[bc];
    em = m_mb[mc];  cm = do_mb && v_mb[mc];
    if (do_blk) begin m_blk[bc] = blk_wdata; v_blk[bc] = 1'b1; end
    if (do_mb)  begin m_mb[mc]  = mb_wdata;  v_mb[mc]  = 1'b1; end
    @(negedge clk);
    blk_en = 1'b0; mb_en = 1'b0;
    if (cb) begin
      checks++;
      if (blk_rdata != eb) begin failures++; $display("FAIL blk col %0d", bc); end
    end
    if (cm) begin
      checks++;
      if (mb_rdata != em) begin failures++; $display("FAIL mb col %0d", mc); end
    end
  endtask

  initial begin
    for (int i = 0; i < NBLK; i++) v_blk[i] = 1'b0;
    for (int i = 0; i < NMB; i++) v_mb[i] = 1'b0;
    @(negedge clk);
    for (int row = 0; row < 3; row++)
      for (int c = 0; c < NBLK; c++) access(1'b1, c, (c % 4) == 0, c / 4);
    for (int i = 0; i < 3000; i++) begin
      access(($urandom % 3) != 0, $urandom % NBLK, ($urandom % 2) == 0, $urandom % NMB);
      repeat ($urandom % 2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_content_sram_pingpong -- check of the ping-pong content SRAM.
// A producer writes macroblocks (96 words each, in a random address order)
// and a consumer reads them back at a random pace; every word read must be
// the one written for that macroblock, in macroblock order. Checked too:
// the producer is held off (wr_ready low) while both banks are full, the
// consumer sees rd_avail low while both are empty, and the two sides work
// on different banks whenever both are active.
module tb_content_sram_pingpong;
  import lpl_pkg::*;
  localparam int unsigned MB_WORDS = 96;
  localparam int unsigned NMB      = 24;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_ready, wr_en = 1'b0, wr_done = 1'b0;
  logic [$clog2(MB_WORDS)-1:0] wr_addr = '0, rd_addr = '0;
  word_t wr_data = '0, rd_data;
  logic rd_avail, rd_en = 1'b0, rd_done = 1'b0;
  logic wbank, rbank;

  content_sram_pingpong #(.MB_WORDS(MB_WORDS)) dut (.*);

  function automatic word_t mb_word(input int mb, input int a);
    return word_t'((mb << 16) ^ (a * 32'h0101_0101) ^ 32'h5A00_0000);
  endfunction

  int n_wr_stall = 0, n_rd_wait = 0, n_overlap = 0;

  task automatic chk(input logic ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  // producer
  initial begin
    int perm [MB_WORDS];
    @(posedge rst_n);
    for (int mb = 0; mb < NMB; mb++) begin
      for (int a = 0; a < MB_WORDS; a++) perm[a] = a;
      for (int a = MB_WORDS - 1; a > 0; a--) begin
        int k, t;
        k = $urandom % (a + 1); t = perm[a]; perm[a] = perm[k]; perm[k] = t;
      end
      @(negedge clk); #1;
      while (!wr_ready) begin n_wr_stall++; @(negedge clk); #1; end
      for (int a = 0; a < MB_WORDS; a++) begin
        wr_en = 1'b1; wr_addr = 7'(perm[a]); wr_data = mb_word(mb, perm[a]);
        @(negedge clk);
      end
      wr_en = 1'b0;
      wr_done = 1'b1;
      @(negedge clk);
      wr_done = 1'b0;
    end
  end

  // consumer, slower in the first half so that the producer must wait
  initial begin
    @(posedge rst_n);
    for (int mb = 0; mb < NMB; mb++) begin
      @(negedge clk); #1;
      while (!rd_avail) begin n_rd_wait++; @(negedge clk); #1; end
      for (int a = 0; a < MB_WORDS; a++) begin
        rd_en = 1'b1; rd_addr = 7'(a);
        @(negedge clk);
        rd_en = 1'b0;
        chk(rd_data == mb_word(mb, a), $sformatf("mb %0d word %0d: %h", mb, a, rd_data));
        if (mb < NMB / 2) repeat ($urandom % 3) @(negedge clk);
      end
      rd_done = 1'b1;
      @(negedge clk);
      rd_done = 1'b0;
    end
    chk(n_wr_stall > 0, "producer never held off");
    chk(n_rd_wait > 0, "consumer never waited");
    chk(n_overlap > 0, "banks never used at the same time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    if (wr_en && rd_en) begin
      n_overlap <= n_overlap + 1;
      if (wbank == rbank) begin
        failures <= failures + 1;
        $display("FAIL: both sides on bank %0d", wbank);
      end
    end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

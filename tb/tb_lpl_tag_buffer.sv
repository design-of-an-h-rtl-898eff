// tb_lpl_tag_buffer -- random check of the TAG row buffer at its full size
// (480 columns, one 1080HD row of 4-pixel columns). Random columns are
// read and written; the expected values come from two plain arrays. The
// reset value (all zero) is checked first.
module tb_lpl_tag_buffer;
  localparam int unsigned NCOL = 480;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [$clog2(NCOL)-1:0] col = '0;
  logic we = 1'b0, hist_wr = 1'b0, ntag_wr = 1'b0;
  logic hist_rd, ntag_rd;
  logic m_hist [NCOL];
  logic m_ntag [NCOL];

  lpl_tag_buffer #(.NCOL(NCOL)) dut (.*);

  task automatic chk(input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL col %0d: %b%b", col, hist_rd, ntag_rd);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < NCOL; j++) begin
      m_hist[j] = 1'b0; m_ntag[j] = 1'b0;
      col = 9'(j);
      #1 chk(hist_rd == 1'b0 && ntag_rd == 1'b0);
    end
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      col     = 9'($urandom % NCOL);
      we      = ($urandom % 2) == 1;
      hist_wr = 1'($urandom);
      ntag_wr = 1'($urandom);
      #1 chk(hist_rd == m_hist[col] && ntag_rd == m_ntag[col]);
      if (we) begin m_hist[col] = hist_wr; m_ntag[col] = ntag_wr; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

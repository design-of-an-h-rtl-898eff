// tb_slice_sram -- random check of the circular slice SRAM. Writes and
// reads are issued at random, never past full or empty (a write is allowed
// on a full buffer only together with a read); a queue models the contents.
// Checked: read data one cycle after ren, the free-word count, flush, and
// that the buffer was driven to full and to empty at least once.
module tb_slice_sram;
  import lpl_pkg::*;
  localparam int unsigned DEPTH = 12;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic flush = 1'b0, wen = 1'b0, ren = 1'b0;
  word_t wdata = '0, rdata;
  logic [$clog2(DEPTH+1)-1:0] free;

  slice_sram #(.DEPTH(DEPTH)) dut (.*);

  word_t q[$];
  word_t exp_rd;
  logic  rd_pend = 1'b0;
  int n_full = 0, n_empty = 0, n_both = 0;

  task automatic chk(input logic ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (rd_pend) chk(rdata == exp_rd, $sformatf("rdata %h exp %h", rdata, exp_rd));
      chk(int'(free) == int'(DEPTH) - q.size(), $sformatf("free %0d q %0d", free, q.size()));
      if (q.size() == DEPTH) n_full++;
      if (q.size() == 0) n_empty++;
      if (i == 2000) begin
        flush = 1'b1; wen = 1'b0; ren = 1'b0; rd_pend = 1'b0;
        q.delete();
        @(negedge clk);
        flush = 1'b0;
        chk(int'(free) == int'(DEPTH), "free after flush");
        continue;
      end
      // phases bias the buffer towards full, then towards empty
      ren = (q.size() > 0) && (($urandom % 100) < (((i / 300) % 2) ? 70 : 30));
      wen = ((q.size() < DEPTH) || ren) && (($urandom % 100) < (((i / 300) % 2) ? 30 : 70));
      if (wen && ren) n_both++;
      wdata = $urandom;
      rd_pend = ren;
      if (ren) exp_rd = q.pop_front();
      if (wen) q.push_back(wdata);
    end
    chk(n_full > 0, "never full");
    chk(n_empty > 0, "never empty");
    chk(n_both > 0, "never read and written together");
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

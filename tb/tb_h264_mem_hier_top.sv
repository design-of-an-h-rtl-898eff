// tb_h264_mem_hier_top -- end-to-end testbench of the memory hierarchy at
// its default size: one 1920 x 1088 frame (68 macroblock rows of 480 TAG
// columns) through the slice SRAM with line-pixel-lookahead, while
// macroblocks stream through the ping-pong content SRAM and three rows of
// upper-neighbour syntax elements pass through the slice SRAM syntax rows.
//
// A decoder model streams frames column by column with spatially correlated
// block modes; a frame-DRAM model answers bus reads with a pixel word that
// is a fixed function of the address. A reference model, written apart from
// the RTL, keeps the full TAG history, applies the 4x3 template decision,
// the miss/hit table and the slice-SRAM occupancy, and predicts every
// output of every column: TAGs, requests, miss classes, decision rule,
// dropped predictions, the four upper-neighbour words and the latency of
// columns served without DRAM (1 cycle with nothing to move, 10 with a
// slice-SRAM transfer). The design runs with its default parameters; the
// slice SRAM (480 words, 60 of the 480 columns) is small enough that
// predictions are dropped for lack of room. Each mechanism -- hit, miss with
// and without penalty, DRAM fetch, slice-SRAM store and use, dropped
// prediction, each row of the decision table, bus and consumer
// back-pressure, content-SRAM bank swap and producer hold-off, syntax-row
// read of the row above -- is counted
// and must happen at least once.
module tb_h264_mem_hier_top;
  import lpl_pkg::*;

  localparam int unsigned FRAME_W     = 1920;  // the top's defaults
  localparam int unsigned FRAME_H     = 1088;
  localparam int unsigned SLICE_DEPTH = 480;
  localparam int unsigned ADDR_W      = 24;
  localparam int unsigned MB_WORDS    = 96;
  localparam int unsigned NFRAMES     = 1;
  localparam int unsigned NCOL        = FRAME_W / 4;
  localparam int unsigned EW          = 8;   // words per column: luma + 4:2:0 chroma
  localparam int unsigned NROW        = FRAME_H / 16;
  localparam int unsigned DRAM_LAT    = 3;
  localparam int unsigned WATCHDOG    = 2000000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;

  // DUT signals
  logic                    frame_start = 1'b0;
  logic [ADDR_W-1:0]       frame_base = '0;
  logic                    col_valid = 1'b0;
  logic                    col_ready;
  blk_info_t               col_info = '0;
  word_t [EW-1:0]          col_bottom = '0;
  logic                    up_valid;
  logic                    up_ready = 1'b0;
  word_t [EW-1:0]          up_data;
  tag_pair_t               up_need, up_req, up_pred;
  cmp_e                    up_cmp_dbf, up_cmp_intra;
  logic                    up_fetched, up_dropped;
  rule_e                   up_rule_dbf, up_rule_intra;
  logic                    bus_req_valid;
  logic                    bus_req_ready;
  logic [ADDR_W-1:0]       bus_req_addr;
  logic                    bus_rsp_valid;
  word_t                   bus_rsp_data;

  // content SRAM ports
  logic cs_wr_ready, cs_wr_en = 1'b0, cs_wr_done = 1'b0;
  logic [$clog2(MB_WORDS)-1:0] cs_wr_addr = '0, cs_rd_addr = '0;
  word_t cs_wr_data = '0, cs_rd_data;
  logic cs_rd_avail, cs_rd_en = 1'b0, cs_rd_done = 1'b0;
  logic cs_wbank, cs_rbank;

  // slice SRAM syntax-element rows
  logic ss_blk_en = 1'b0, ss_mb_en = 1'b0;
  logic [$clog2(FRAME_W/4)-1:0]  ss_blk_col = '0;
  logic [$clog2(FRAME_W/16)-1:0] ss_mb_col = '0;
  logic [24:0]  ss_blk_wdata = '0, ss_blk_rdata;
  logic [159:0] ss_mb_wdata = '0, ss_mb_rdata;

  h264_mem_hier_top dut (.*);

  // ------------------------------------------------ frame contents / DRAM
  function automatic word_t pix_word(input logic [ADDR_W-1:0] addr);
    return 32'(addr) * 32'd2654435761 + 32'h1234_5678;
  endfunction

  function automatic logic [ADDR_W-1:0] word_addr(input int unsigned base,
                                                  input int unsigned line,
                                                  input int unsigned col);
    return ADDR_W'(base + line * NCOL + col);
  endfunction

  // Word w of a column: w = 2k is luma line k, w = 2k+1 chroma line k, of
  // the four lines above MB row r (upper) or the four bottom lines of MB
  // row r. Luma plane first, the chroma plane (MB height 8) after it.
  function automatic logic [ADDR_W-1:0] col_word_addr(input int unsigned base,
      input int unsigned r, input int unsigned j, input int unsigned w, input bit upper);
    int unsigned k;
    k = w / 2;
    if (w % 2 == 0) return word_addr(base, upper ? 16*r - 4 + k : 16*r + 12 + k, j);
    else            return word_addr(base + NCOL * FRAME_H, upper ? 8*r - 4 + k : 8*r + 4 + k, j);
  endfunction

  int unsigned bus_reads = 0, bus_stalls = 0;
  logic [ADDR_W-1:0] pend_addr;
  int unsigned       pend_cnt;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_req_ready <= 1'b0;
      bus_rsp_valid <= 1'b0;
      bus_rsp_data  <= '0;
      pend_cnt      <= 0;
      pend_addr     <= '0;
    end else begin
      bus_rsp_valid <= 1'b0;
      bus_req_ready <= ($urandom % 4) != 0;
      if (bus_req_valid && !bus_req_ready) bus_stalls <= bus_stalls + 1;
      if (bus_req_valid && bus_req_ready) begin
        pend_addr <= bus_req_addr;
        pend_cnt  <= DRAM_LAT;
        bus_reads <= bus_reads + 1;
      end else if (pend_cnt > 0) begin
        pend_cnt <= pend_cnt - 1;
        if (pend_cnt == 1) begin
          bus_rsp_valid <= 1'b1;
          bus_rsp_data  <= pix_word(pend_addr);
        end
      end
    end
  end

  // ---------------------------------------------------- reference model
  function automatic tag_pair_t ref_need(input blk_info_t b);
    tag_pair_t t;
    t.dbf = b.bs_top != 0;
    case (b.ptype)
      PRED_INTRA4X4:   t.intra = !(b.mode == 4'd1 || b.mode == 4'd8);
      PRED_INTRA16X16: t.intra = b.mode != 4'd1;
      default:         t.intra = 1'b0;
    endcase
    return t;
  endfunction

  // decision table, written as a lookup of the four rows
  function automatic logic [2:0] ref_decide(input logic a, c, e, f, g);
    // returns {rule[1:0], x}
    logic maj;
    maj = (int'(e) + int'(f) + int'(g)) >= 2;
    if (!(a ^ f))      return {2'd0, f};
    else if (!(a ^ g)) return {2'd1, e};
    else if (!(c ^ g)) return {2'd2, g};
    else               return {2'd3, maj};
  endfunction

  tag_pair_t prevD [NCOL];
  tag_pair_t curD  [NCOL];
  tag_pair_t NT    [NCOL];
  blk_info_t lastinfo [NCOL];
  int        occ;

  // mechanism counters
  int n_hit_dbf, n_hit_intra, n_pen, n_free, n_fetch, n_drop, n_store, n_slice_use;
  int n_rule [4];
  int n_upstall;

  function automatic blk_info_t gen_info(input int unsigned j);
    blk_info_t b;
    if (($urandom % 100) < 70) b = lastinfo[j];
    else begin
      b.ptype  = pred_type_e'($urandom % 3);
      b.mode   = 4'($urandom % 9);
      b.bs_top = (($urandom % 3) == 0) ? 3'd0 : 3'($urandom % 5);
    end
    if (b.ptype == PRED_INTRA16X16 && b.mode > 3) b.mode = 4'($urandom % 4);
    return b;
  endfunction

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  task automatic run_column(input int unsigned fbase, input int unsigned r,
                            input int unsigned j);
    blk_info_t   b;
    tag_pair_t   g, nt, need, x, pred, req;
    logic [2:0]  dd, di;
    logic        a_d, a_i, c_d, c_i, e_d, e_i, f_d, f_i;
    logic        stored, want, room, dostore, fetch, dropped;
    cmp_e        ecd, eci;
    word_t [EW-1:0] exp_up;
    int unsigned t_acc, lat;

    b = gen_info(j);
    lastinfo[j] = b;
    g = ref_need(b);
    c_d = r > 0 ? prevD[j].dbf   : 1'b0;  c_i = r > 0 ? prevD[j].intra   : 1'b0;
    a_d = (r > 0 && j >= 2) ? prevD[j-2].dbf   : 1'b0;
    a_i = (r > 0 && j >= 2) ? prevD[j-2].intra : 1'b0;
    e_d = j >= 2 ? curD[j-2].dbf : 1'b0;  e_i = j >= 2 ? curD[j-2].intra : 1'b0;
    f_d = j >= 1 ? curD[j-1].dbf : 1'b0;  f_i = j >= 1 ? curD[j-1].intra : 1'b0;
    dd = ref_decide(a_d, c_d, e_d, f_d, g.dbf);
    di = ref_decide(a_i, c_i, e_i, f_i, g.intra);
    x.dbf = dd[0];  x.intra = di[0];
    need = (r > 0) ? g : '0;
    nt   = (r > 0) ? NT[j] : '0;
    stored  = nt.dbf | nt.intra;
    fetch   = (need.dbf | need.intra) && !stored;
    want    = (x.dbf | x.intra) && (r != NROW - 1);
    room    = (int'(SLICE_DEPTH) - occ + (stored ? EW : 0)) >= EW;
    dostore = want && room;
    dropped = want && !room;
    pred.dbf   = x.dbf   && dostore;
    pred.intra = x.intra && dostore;
    req.dbf   = nt.dbf   ^ need.dbf;
    req.intra = nt.intra ^ need.intra;
    ecd = (nt.dbf == need.dbf)     ? CMP_HIT : (need.dbf   ? CMP_MISS_PENALTY : CMP_MISS_FREE);
    eci = (nt.intra == need.intra) ? CMP_HIT : (need.intra ? CMP_MISS_PENALTY : CMP_MISS_FREE);
    for (int w = 0; w < EW; w++)
      exp_up[w] = (need.dbf | need.intra) ? pix_word(col_word_addr(fbase, r, j, w, 1'b1)) : '0;
    occ = occ - (stored ? EW : 0) + (dostore ? EW : 0);
    NT[j]   = pred;
    curD[j] = g;

    // drive the column
    col_info  = b;
    for (int w = 0; w < EW; w++) col_bottom[w] = pix_word(col_word_addr(fbase, r, j, w, 1'b0));
    col_valid = 1'b1;
    #1;
    while (!col_ready) begin @(negedge clk); #1; end
    t_acc = cyc;
    @(negedge clk);
    col_valid = 1'b0;
    #1;
    while (!up_valid) begin @(negedge clk); #1; end
    lat = cyc - t_acc;

    chk(up_need == need, $sformatf("need r%0d c%0d", r, j));
    chk(up_req == req, $sformatf("req r%0d c%0d", r, j));
    chk(up_cmp_dbf == ecd && up_cmp_intra == eci, $sformatf("cmp r%0d c%0d", r, j));
    chk(up_fetched == fetch, $sformatf("fetch r%0d c%0d", r, j));
    chk(up_pred == pred, $sformatf("pred r%0d c%0d got %b exp %b", r, j, up_pred, pred));
    chk(up_dropped == dropped, $sformatf("dropped r%0d c%0d", r, j));
    chk(up_rule_dbf == rule_e'(dd[2:1]) && up_rule_intra == rule_e'(di[2:1]),
        $sformatf("rule r%0d c%0d", r, j));
    chk(up_data == exp_up, $sformatf("data r%0d c%0d", r, j));
    if (!fetch) chk(lat == ((stored || dostore) ? EW + 2 : 1),
                    $sformatf("latency %0d r%0d c%0d", lat, r, j));
    else        chk(lat > EW + 2, $sformatf("fetch latency %0d", lat));

    if (need.dbf && nt.dbf) n_hit_dbf++;
    if (need.intra && nt.intra) n_hit_intra++;
    if (ecd == CMP_MISS_PENALTY || eci == CMP_MISS_PENALTY) n_pen++;
    if (ecd == CMP_MISS_FREE || eci == CMP_MISS_FREE) n_free++;
    if (fetch) n_fetch++;
    if (dropped) n_drop++;
    if (dostore) n_store++;
    if (stored && (need.dbf | need.intra)) n_slice_use++;
    n_rule[dd[2:1]]++;
    n_rule[di[2:1]]++;

    // consumer back-pressure
    if (($urandom % 4) == 0) begin
      n_upstall++;
      repeat ($urandom % 3 + 1) @(negedge clk);
    end
    up_ready = 1'b1;
    @(negedge clk);
    up_ready = 1'b0;
  endtask

  // -------------------------------------------- content SRAM traffic
  localparam int unsigned NMB = 64;
  int n_cs_stall = 0, n_cs_swap = 0;
  bit cs_done = 1'b0;

  function automatic word_t mb_word(input int mb, input int a);
    return word_t'((mb << 12) + a * 7 + 32'hC0DE_0000);
  endfunction

  initial begin : cs_producer
    @(posedge rst_n);
    for (int mb = 0; mb < NMB; mb++) begin
      @(negedge clk); #1;
      while (!cs_wr_ready) begin n_cs_stall++; @(negedge clk); #1; end
      for (int a = 0; a < MB_WORDS; a++) begin
        cs_wr_en = 1'b1; cs_wr_addr = 7'(a); cs_wr_data = mb_word(mb, a);
        @(negedge clk);
      end
      cs_wr_en = 1'b0; cs_wr_done = 1'b1;
      @(negedge clk);
      cs_wr_done = 1'b0;
    end
  end

  initial begin : cs_consumer
    @(posedge rst_n);
    for (int mb = 0; mb < NMB; mb++) begin
      @(negedge clk); #1;
      while (!cs_rd_avail) begin @(negedge clk); #1; end
      for (int a = MB_WORDS - 1; a >= 0; a--) begin
        cs_rd_en = 1'b1; cs_rd_addr = 7'(a);
        @(negedge clk);
        cs_rd_en = 1'b0;
        chk(cs_rd_data == mb_word(mb, a), $sformatf("content SRAM mb %0d word %0d", mb, a));
        repeat ($urandom % 3) @(negedge clk);
      end
      cs_rd_done = 1'b1;
      n_cs_swap++;
      @(negedge clk);
      cs_rd_done = 1'b0;
    end
    cs_done = 1'b1;
  end

  // -------------------------------------------- syntax-element rows
  // Three macroblock rows of upper-neighbour syntax traffic in decoding
  // order; from the second row on, each read must return the entry the row
  // above wrote at that column.
  int n_ss_reads = 0;
  bit ss_done = 1'b0;

  function automatic logic [24:0] blk_entry(input int row, input int c);
    return 25'((row * 7919 + c * 31) ^ 25'h0A5A5A5);
  endfunction
  function automatic logic [159:0] mb_entry(input int row, input int m);
    return {5{32'((row << 16) + m * 13 + 32'h5EED_0000)}};
  endfunction

  initial begin : ss_traffic
    @(posedge rst_n);
    @(negedge clk);
    for (int row = 0; row < 3; row++)
      for (int c = 0; c < FRAME_W / 4; c++) begin
        ss_blk_en = 1'b1; ss_blk_col = ($clog2(FRAME_W/4))'(c);
        ss_blk_wdata = blk_entry(row, c);
        ss_mb_en = (c % 4) == 0; ss_mb_col = ($clog2(FRAME_W/16))'(c / 4);
        ss_mb_wdata = mb_entry(row, c / 4);
        @(negedge clk);
        ss_blk_en = 1'b0; ss_mb_en = 1'b0;
        if (row > 0) begin
          n_ss_reads++;
          chk(ss_blk_rdata == blk_entry(row - 1, c),
              $sformatf("syntax row %0d block column %0d", row, c));
          if ((c % 4) == 0)
            chk(ss_mb_rdata == mb_entry(row - 1, c / 4),
                $sformatf("syntax row %0d MB column %0d", row, c / 4));
        end
      end
    ss_done = 1'b1;
  end

  task automatic expect_seen(input int n, input string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    int unsigned fbase;
    int unsigned bus_reads_exp;
    for (int j = 0; j < NCOL; j++) begin
      lastinfo[j] = '0; prevD[j] = '0; curD[j] = '0; NT[j] = '0;
    end
    for (int k = 0; k < 4; k++) n_rule[k] = 0;
    n_hit_dbf = 0; n_hit_intra = 0; n_pen = 0; n_free = 0; n_fetch = 0;
    n_drop = 0; n_store = 0; n_slice_use = 0; n_upstall = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int unsigned fr = 0; fr < NFRAMES; fr++) begin
      fbase = fr * NCOL * FRAME_H * 2 + 7;
      frame_base  = ADDR_W'(fbase);
      frame_start = 1'b1;
      @(negedge clk);
      frame_start = 1'b0;
      occ = 0;
      for (int unsigned r = 0; r < NROW; r++) begin
        for (int unsigned j = 0; j < NCOL; j++) run_column(fbase, r, j);
        for (int j = 0; j < NCOL; j++) prevD[j] = curD[j];
      end
    end
    wait (cs_done);
    wait (ss_done);
    bus_reads_exp = EW * n_fetch;
    chk(bus_reads == bus_reads_exp, $sformatf("bus reads %0d exp %0d", bus_reads, bus_reads_exp));
    expect_seen(n_hit_dbf,   "hit, deblocking TAG");
    expect_seen(n_hit_intra, "hit, intra TAG");
    expect_seen(n_pen,       "miss with cycle penalty");
    expect_seen(n_free,      "miss without penalty");
    expect_seen(n_fetch,     "fetch from frame DRAM");
    expect_seen(n_drop,      "prediction dropped, slice SRAM full");
    expect_seen(n_store,     "slice SRAM write");
    expect_seen(n_slice_use, "upper pixels served from slice SRAM");
    expect_seen(n_rule[0],   "rule a==f");
    expect_seen(n_rule[1],   "rule a==g");
    expect_seen(n_rule[2],   "rule c==g");
    expect_seen(n_rule[3],   "rule majority");
    expect_seen(bus_stalls,  "bus back-pressure");
    expect_seen(n_upstall,   "consumer back-pressure");
    expect_seen(n_cs_swap,   "content SRAM bank swap");
    expect_seen(n_cs_stall,  "content SRAM producer held off");
    expect_seen(n_ss_reads,  "syntax-element row read from the row above");
    $display("columns: hits dbf=%0d intra=%0d, penalty misses=%0d, free misses=%0d, fetches=%0d, stores=%0d, drops=%0d, rules=%0d/%0d/%0d/%0d",
             n_hit_dbf, n_hit_intra, n_pen, n_free, n_fetch, n_store, n_drop,
             n_rule[0], n_rule[1], n_rule[2], n_rule[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

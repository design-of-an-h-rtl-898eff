// lpl_harness -- self-checking test harness of one lpl_unit instance.
//
// Same decoder model, frame-DRAM model and reference model as tb_lpl_unit,
// packaged as a module so that several frame sizes and slice-SRAM depths
// can run side by side. Block modes come from a xorshift generator seeded
// by SEED, so instances with the same seed and frame size see the same
// mode stream whatever their SRAM depth; only the handshake back-pressure
// uses $urandom. When `done` rises the counters are final:
//   n_tags     TAGs compared (two per column below the first row)
//   n_miss     TAG misses (N.TAG != D.TAG), both kinds, both units
//   n_fetch    columns fetched from frame DRAM (8 words each)
//   n_drop     predictions dropped because the slice SRAM was full
//   n_predmiss columns where the template itself mispredicted a needed
//              column (x = 0, need = 1), whether or not a drop added to it
module lpl_harness #(
  parameter int unsigned FRAME_W     = 176,
  parameter int unsigned FRAME_H     = 144,
  parameter int unsigned SLICE_DEPTH = 352,
  parameter int unsigned NFRAMES     = 2,
  parameter logic [31:0] SEED        = 32'h1234_5678
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_tags,
  output int   n_miss,
  output int   n_fetch,
  output int   n_drop,
  output int   n_predmiss
);
  import lpl_pkg::*;

  localparam int unsigned ADDR_W      = 24;
  localparam int unsigned NCOL        = FRAME_W / 4;
  localparam int unsigned EW          = 8;   // words per column: luma + 4:2:0 chroma
  localparam int unsigned NROW        = FRAME_H / 16;
  localparam int unsigned DRAM_LAT    = 3;

  logic rst_n = 1'b0;

  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;


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

  lpl_unit #(
    .FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .SLICE_DEPTH(SLICE_DEPTH), .ADDR_W(ADDR_W)
  ) dut (.*);

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
  int n_hit_dbf, n_hit_intra, n_pen, n_free, n_store, n_slice_use;
  int n_rule [4];
  int n_upstall;

  logic [31:0] rng = SEED;
  function automatic int unsigned rnd();
    rng ^= rng << 13;
    rng ^= rng >> 17;
    rng ^= rng << 5;
    return rng;
  endfunction

  function automatic blk_info_t gen_info(input int unsigned j);
    blk_info_t b;
    if ((rnd() % 100) < 70) b = lastinfo[j];
    else begin
      b.ptype  = pred_type_e'(rnd() % 3);
      b.mode   = 4'(rnd() % 9);
      b.bs_top = ((rnd() % 3) == 0) ? 3'd0 : 3'(rnd() % 5);
    end
    if (b.ptype == PRED_INTRA16X16 && b.mode > 3) b.mode = 4'(rnd() % 4);
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

    if (r > 0) n_tags += 2;
    if (req.dbf) n_miss++;
    if (req.intra) n_miss++;
    if ((need.dbf | need.intra) && !(x.dbf | x.intra)) n_predmiss++;
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
    checks = 0; failures = 0; done = 1'b0;
    n_tags = 0; n_miss = 0; n_predmiss = 0;
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
    bus_reads_exp = EW * n_fetch;
    chk(bus_reads == bus_reads_exp, $sformatf("bus reads %0d exp %0d", bus_reads, bus_reads_exp));
    done = 1'b1;
  end

endmodule

// tb_l1d_cache: self-checking test of the write-through L1 data cache on its own.
//
// The decay inputs are driven directly by the testbench (which lines are expired, whether
// the set history allows an invalidation). Behind the cache sits the l2_model. Expected
// load data come from a reference copy of memory kept in the testbench (write-through:
// memory always holds the latest value). Checked: data of every load, the 3-cycle load hit
// latency, miss/hit classification, write-through of every store with no allocation on a
// store miss, pseudo-LRU eviction in a full set, GLOBAL invalidation of all expired ways,
// LOCAL invalidation of only the lowest expired way and its refusal when the history does
// not allow it, extra-miss detection from the kept tag, and parity-error refetch after an
// injected bit flip. A last phase models strikes on the decay logic itself: 'line_expired'
// and 'hist_allow' are randomised every cycle under random loads and stores in both
// invalidating modes. Such upsets may only cause early or late invalidations, so every load
// must still return the right data.
module tb_l1d_cache;
  import decay_pkg::*;
  localparam int unsigned LB = 64, WAYS = 8, SETS = 64, NL = 512;

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready;
  cpu_req_t req;
  logic resp_valid, resp_is_store;
  logic [WORD_W-1:0] resp_rdata;
  logic l2_req_valid, l2_req_ready, l2_req_we, l2_resp_valid;
  logic [ADDR_W-1:0] l2_req_addr;
  logic [WORD_W-1:0] l2_req_wdata;
  logic [WORD_BYTES-1:0] l2_req_be;
  logic [LB*8-1:0] l2_resp_line;
  inv_mode_e mode = INV_OFF;
  logic [NL-1:0] line_expired = '0;
  logic [5:0] lookup_set;
  logic hist_allow = 1, hist_upd, hist_upd_bit, touch;
  logic [8:0] touch_idx;
  logic inj_valid = 0;
  logic [5:0] inj_set = 0;
  logic [2:0] inj_way = 0;
  logic [8:0] inj_bit = 0;
  logic ev_hit, ev_miss, ev_extra_miss, ev_decay_inv, ev_inv_refused, ev_parity_err;
  int unsigned n_l2_reads, n_l2_writes;

  int checks = 0, failures = 0;
  bit scramble = 0;   // phase 9: random decay inputs every cycle
  int c_hit = 0, c_miss = 0, c_extra = 0, c_inv = 0, c_ref = 0, c_perr = 0;

  l1d_cache dut (
    .clk, .rst_n, .req_valid, .req_ready, .req, .resp_valid, .resp_is_store, .resp_rdata,
    .l2_req_valid, .l2_req_ready, .l2_req_we, .l2_req_addr, .l2_req_wdata, .l2_req_be,
    .l2_resp_valid, .l2_resp_line, .mode, .line_expired, .lookup_set, .hist_allow,
    .hist_upd, .hist_upd_bit, .touch, .touch_idx, .inj_valid, .inj_set, .inj_way, .inj_bit,
    .ev_hit, .ev_miss, .ev_extra_miss, .ev_decay_inv, .ev_inv_refused, .ev_parity_err);

  l2_model #(.LINE_BYTES(LB), .LATENCY(12)) u_l2 (
    .clk, .req_valid(l2_req_valid), .req_ready(l2_req_ready), .req_we(l2_req_we),
    .req_addr(l2_req_addr), .req_wdata(l2_req_wdata), .req_be(l2_req_be),
    .resp_valid(l2_resp_valid), .resp_line(l2_resp_line),
    .n_reads(n_l2_reads), .n_writes(n_l2_writes));

  always #5 clk = ~clk;

  always @(negedge clk) if (scramble) begin
    for (int i = 0; i < NL / 32; i++) line_expired[i*32 +: 32] = $urandom & $urandom;
    hist_allow = $urandom_range(1, 0) == 1;
  end

  always @(posedge clk) if (rst_n) begin
    c_hit   += int'(ev_hit);
    c_miss  += int'(ev_miss);
    c_extra += int'(ev_extra_miss);
    c_inv   += int'(ev_decay_inv);
    c_ref   += int'(ev_inv_refused);
    c_perr  += int'(ev_parity_err);
  end

  // ---- reference memory (same initial contents as the L2 model) --------------------
  logic [WORD_W-1:0] refmem [logic [ADDR_W-1:0]];
  function automatic logic [WORD_W-1:0] ref_word(input logic [ADDR_W-1:0] a);
    logic [ADDR_W-1:0] wa;
    wa = {a[ADDR_W-1:3], 3'b000};
    return refmem.exists(wa) ? refmem[wa] : {wa ^ 32'h5A5A_0000, ~wa * 32'd2654435761};
  endfunction

  function automatic logic [ADDR_W-1:0] mk_addr(input int tag, input int set, input int word);
    return ADDR_W'((tag << 12) | (set << 6) | (word << 3));
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Issues one request and waits for its response; 'lat' is the number of cycles from the
  // accepting edge to the edge that samples resp_valid.
  task automatic access(input bit we, input logic [ADDR_W-1:0] a, input logic [WORD_W-1:0] wd,
                        input logic [7:0] be, output logic [WORD_W-1:0] rd, output int lat);
    @(negedge clk);
    req_valid = 1;
    req.we = we; req.addr = a; req.wdata = wd; req.be = be;
    @(posedge clk iff req_ready);
    @(negedge clk);
    req_valid = 0;
    lat = 1;
    while (!resp_valid) begin
      @(negedge clk);
      lat++;
    end
    rd = resp_rdata;
    check(resp_is_store == we, "response kind");
    if (we) begin
      logic [WORD_W-1:0] w;
      w = ref_word(a);
      for (int b = 0; b < 8; b++) if (be[b]) w[b*8 +: 8] = wd[b*8 +: 8];
      refmem[{a[ADDR_W-1:3], 3'b000}] = w;
    end
  endtask

  task automatic load_expect(input logic [ADDR_W-1:0] a, input int exp_lat, input string what);
    logic [WORD_W-1:0] rd;
    int lat;
    access(0, a, '0, '0, rd, lat);
    check(rd == ref_word(a), $sformatf("%s: data at %h = %h, expected %h", what, a, rd, ref_word(a)));
    if (exp_lat >= 0) check(lat == exp_lat, $sformatf("%s: latency %0d expected %0d", what, lat, exp_lat));
    else              check(lat > 3, $sformatf("%s: miss latency %0d", what, lat));
  endtask

  task automatic store(input logic [ADDR_W-1:0] a, input logic [WORD_W-1:0] wd, input logic [7:0] be);
    logic [WORD_W-1:0] rd;
    int lat;
    int w0;
    w0 = n_l2_writes;
    access(1, a, wd, be, rd, lat);
    check(n_l2_writes == w0 + 1, "store written through to L2");
  endtask

  initial begin
    int h0, m0, e0, i0, r0, p0, rd0;
    logic [ADDR_W-1:0] A, B;
    req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. miss then 3-cycle hit
    A = mk_addr(5, 3, 2);
    m0 = c_miss; h0 = c_hit;
    load_expect(A, -1, "first load");
    check(c_miss == m0 + 1, "first load is a miss");
    load_expect(A, 3, "second load");
    check(c_hit == h0 + 1, "second load hits");
    load_expect(mk_addr(5, 3, 7), 3, "other word of the same line");

    // 2. store hit, partial bytes
    store(A, 64'hDEAD_BEEF_0123_4567, 8'b0011_1100);
    load_expect(A, 3, "load after store hit");

    // 3. store miss does not allocate
    B = mk_addr(9, 10, 0);
    store(B, 64'h1111_2222_3333_4444, 8'hFF);
    m0 = c_miss;
    load_expect(B, -1, "load after store miss");
    check(c_miss == m0 + 1, "store miss did not allocate");

    // 4. fill one set with 9 lines, all data correct afterwards
    for (int t = 0; t < 9; t++) load_expect(mk_addr(100 + t, 20, t % 8), -1, "fill set 20");
    m0 = c_miss;
    for (int t = 1; t < 9; t++) load_expect(mk_addr(100 + t, 20, 0), 3, "set 20 resident");
    check(c_miss == m0, "lines 1..8 resident");
    load_expect(mk_addr(100, 20, 0), -1, "pseudo-LRU victim was line 0");

    // 5. random traffic over a small footprint
    for (int k = 0; k < 400; k++) begin
      logic [ADDR_W-1:0] a;
      a = mk_addr($urandom % 24, $urandom % 4, $urandom % 8);
      if ($urandom % 3 == 0) store(a, {$urandom, $urandom}, 8'($urandom));
      else begin
        logic [WORD_W-1:0] rd;
        int lat;
        access(0, a, '0, '0, rd, lat);
        check(rd == ref_word(a), $sformatf("random load %h", a));
        check(lat == 3 || lat > 12, "random load latency is a hit or a miss");
      end
    end

    // 6. GLOBAL: every expired way of the set goes, the reloaded line is an extra miss
    mode = INV_GLOBAL;
    A = mk_addr(7, 40, 1);
    B = mk_addr(8, 40, 1);
    load_expect(A, -1, "A fill");   // way 0 of empty set 40
    load_expect(B, -1, "B fill");   // way 1
    line_expired[40*8 +: 8] = 8'hFF;
    i0 = c_inv; e0 = c_extra;
    load_expect(A, -1, "A after expiry");
    check(c_inv == i0 + 1, "one invalidation event");
    check(c_extra == e0 + 1, "extra miss counted for A");
    line_expired = '0;
    load_expect(B, -1, "B also invalidated in GLOBAL mode");
    check(c_extra == e0 + 2, "extra miss counted for B");
    load_expect(B, 3, "B refilled");

    // 7. LOCAL: refusal, then only the lowest expired way
    mode = INV_LOCAL;
    A = mk_addr(7, 41, 0);
    B = mk_addr(8, 41, 0);
    load_expect(A, -1, "A fill set 41");
    load_expect(B, -1, "B fill set 41");
    line_expired[41*8 +: 8] = 8'hFF;
    hist_allow = 0;
    r0 = c_ref; i0 = c_inv;
    load_expect(B, 3, "refused invalidation keeps B");
    check(c_ref == r0 + 1 && c_inv == i0, "refusal reported");
    hist_allow = 1;
    load_expect(B, 3, "B hits while A (way 0) is invalidated");
    check(c_inv == i0 + 1, "one way invalidated in LOCAL mode");
    line_expired = '0;
    e0 = c_extra;
    load_expect(A, -1, "A misses after local invalidation");
    check(c_extra == e0 + 1, "extra miss for A");
    // a store to an invalidated line is not an extra miss, and keeps the kept tag
    line_expired[41*8 +: 8] = 8'hFF;
    load_expect(B, 3, "B access invalidates A (lowest expired way) again");
    line_expired = '0;
    e0 = c_extra;
    store(A, 64'h55, 8'h01);
    check(c_extra == e0, "store is not an extra miss");
    load_expect(A, -1, "A reload after store");
    check(c_extra == e0 + 1, "kept tag still gives the extra miss");

    // 8. parity: flip a data bit of a resident line, the load refetches it
    mode = INV_OFF;
    A = mk_addr(3, 50, 4);
    load_expect(A, -1, "fill set 50");
    @(negedge clk);
    inj_valid = 1; inj_set = 50; inj_way = 0; inj_bit = 9'(4 * 64 + 13);
    @(negedge clk);
    inj_valid = 0;
    p0 = c_perr; rd0 = n_l2_reads;
    load_expect(A, -1, "load after strike");
    check(c_perr == p0 + 1, "parity error detected");
    check(n_l2_reads == rd0 + 1, "line refetched");
    load_expect(A, 3, "clean after refetch");
    // a flip in a word not read stays latent until that word is read
    @(negedge clk);
    inj_valid = 1; inj_set = 50; inj_way = 0; inj_bit = 9'(1 * 64 + 0);
    @(negedge clk);
    inj_valid = 0;
    p0 = c_perr;
    load_expect(A, 3, "other word unaffected");
    load_expect(mk_addr(3, 50, 1), -1, "struck word refetched");
    check(c_perr == p0 + 1, "second parity error");

    // 9. strikes on the decay logic: random expired flags and history answers (about a
    //    quarter of the lines expired at any time) over a small footprint, 24 tags in 4 sets
    i0 = c_inv; r0 = c_ref;
    scramble = 1;
    for (int k = 0; k < 1500; k++) begin
      logic [WORD_W-1:0] rd;
      int lat;
      A = mk_addr($urandom_range(23, 0), 60 + $urandom_range(3, 0), $urandom_range(7, 0));
      mode = ((k / 250) % 2 != 0) ? INV_GLOBAL : INV_LOCAL;
      if ($urandom_range(3, 0) == 0) access(1, A, {$urandom, $urandom}, 8'($urandom), rd, lat);
      else begin
        access(0, A, '0, '0, rd, lat);
        check(rd == ref_word(A), $sformatf("scrambled decay: data at %h = %h, expected %h",
                                           A, rd, ref_word(A)));
      end
    end
    scramble = 0;
    @(negedge clk);
    line_expired = '0;
    hist_allow = 1;
    check(c_inv > i0 && c_ref > r0, "scrambled decay inputs caused invalidations and refusals");

    check(c_hit > 0 && c_miss > 0 && c_extra > 0 && c_inv > 0 && c_ref > 0 && c_perr > 0,
          "every mechanism exercised");
    $display("hits=%0d misses=%0d extra=%0d inv=%0d refused=%0d parity=%0d",
             c_hit, c_miss, c_extra, c_inv, c_ref, c_perr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

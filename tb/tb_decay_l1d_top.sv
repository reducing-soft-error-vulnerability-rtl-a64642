// tb_decay_l1d_top: end-to-end test of the decaying L1 data cache at its full size
// (32 KB, 8 ways, 10 000-cycle global interval, max/min 256/128 extra misses), with the
// behavioural L2 (12-cycle latency) behind it. The top keeps all its default parameters.
//
// Phases:
//   1. INV_LOCAL, inv_threshold = 1000, history limit 1 (10%):
//      - a hot line used every ~40 cycles must never be invalidated;
//      - a line left idle 700 cycles must still hit (its counter cannot have reached 7);
//      - a line left idle 1100 cycles must miss as an extra miss (it has);
//      - a set whose lines keep expiring must see refusals from its history;
//   2. INV_GLOBAL, starting at 1000: a stream revisiting 300 lines with long gaps makes
//      more than 256 extra misses per interval, so the threshold must double; a short
//      re-use loop afterwards makes fewer than 128, so it must halve;
//   2b. INV_GLOBAL restarted at 1000, with the one-bit round-robin scan instead of the
//      counters: a line idle
//      400 cycles still hits, one idle 1100 cycles is gone, a line in steady use stays;
//   3. INV_OFF: nothing may be invalidated.
// A particle strike is injected once and must be caught by parity. Every load is checked
// against a reference memory; every hit must take 3 cycles. Each mechanism (hit, miss,
// extra miss, decay invalidation, refusal, parity error, tick, interval end, threshold
// growth and shrink, mode switch, scan tracking) is counted and must have happened.
module tb_decay_l1d_top;
  import decay_pkg::*;
  localparam int unsigned LB = 64;

  logic clk = 0, rst_n = 0;
  inv_mode_e cfg_mode = INV_OFF;
  logic [TH_W-1:0] cfg_inv_threshold = TH_W'(1000);
  logic [4:0] cfg_hist_limit = 5'd1;
  logic cfg_scan_bit = 1'b0;
  logic req_valid = 0, req_ready;
  cpu_req_t req;
  logic resp_valid, resp_is_store;
  logic [WORD_W-1:0] resp_rdata;
  logic l2_req_valid, l2_req_ready, l2_req_we, l2_resp_valid;
  logic [ADDR_W-1:0] l2_req_addr;
  logic [WORD_W-1:0] l2_req_wdata;
  logic [WORD_BYTES-1:0] l2_req_be;
  logic [LB*8-1:0] l2_resp_line;
  logic inj_valid = 0;
  logic [5:0] inj_set = 0;
  logic [2:0] inj_way = 0;
  logic [8:0] inj_bit = 0;
  logic [TH_W-1:0] cur_th;
  logic [15:0] glob_extra;
  logic ev_hit, ev_miss, ev_extra_miss, ev_decay_inv, ev_inv_refused, ev_parity_err;
  logic ev_decay_tick, ev_interval_end, ev_th_grow, ev_th_shrink;
  int unsigned n_l2_reads, n_l2_writes;

  int checks = 0, failures = 0;
  int c_hit = 0, c_miss = 0, c_extra = 0, c_inv = 0, c_ref = 0, c_perr = 0;
  int c_tick = 0, c_iend = 0, c_grow = 0, c_shrink = 0, c_mode = 0, c_scan = 0;

  decay_l1d_top dut (
    .clk, .rst_n, .cfg_mode, .cfg_inv_threshold, .cfg_hist_limit, .cfg_scan_bit,
    .req_valid, .req_ready, .req, .resp_valid, .resp_is_store, .resp_rdata,
    .l2_req_valid, .l2_req_ready, .l2_req_we, .l2_req_addr, .l2_req_wdata, .l2_req_be,
    .l2_resp_valid, .l2_resp_line, .inj_valid, .inj_set, .inj_way, .inj_bit,
    .cur_inv_threshold(cur_th), .ev_hit, .ev_miss, .ev_extra_miss, .ev_decay_inv,
    .ev_inv_refused, .ev_parity_err, .ev_decay_tick, .glob_extra_misses(glob_extra),
    .ev_interval_end, .ev_th_grow, .ev_th_shrink);

  l2_model #(.LINE_BYTES(LB), .LATENCY(12)) u_l2 (
    .clk, .req_valid(l2_req_valid), .req_ready(l2_req_ready), .req_we(l2_req_we),
    .req_addr(l2_req_addr), .req_wdata(l2_req_wdata), .req_be(l2_req_be),
    .resp_valid(l2_resp_valid), .resp_line(l2_resp_line),
    .n_reads(n_l2_reads), .n_writes(n_l2_writes));

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    c_hit    += int'(ev_hit);
    c_miss   += int'(ev_miss);
    c_extra  += int'(ev_extra_miss);
    c_inv    += int'(ev_decay_inv);
    c_ref    += int'(ev_inv_refused);
    c_perr   += int'(ev_parity_err);
    c_tick   += int'(ev_decay_tick);
    c_iend   += int'(ev_interval_end);
    c_grow   += int'(ev_th_grow);
    c_shrink += int'(ev_th_shrink);
  end

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
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  // One access; checks load data and that a hit takes exactly 3 cycles. Returns whether
  // the access hit.
  task automatic access(input bit we, input logic [ADDR_W-1:0] a, output bit was_hit);
    int lat, h0, p0;
    logic [WORD_W-1:0] wd;
    logic [7:0] be;
    wd = {$urandom, $urandom};
    be = 8'($urandom) | 8'h01;
    @(negedge clk);
    req_valid = 1;
    req.we = we; req.addr = a; req.wdata = wd; req.be = be;
    @(posedge clk iff req_ready);
    h0 = c_hit;
    p0 = c_perr;
    @(negedge clk);
    req_valid = 0;
    lat = 1;
    while (!resp_valid) begin
      @(negedge clk);
      lat++;
    end
    was_hit = (c_hit != h0);
    if (we) begin
      logic [WORD_W-1:0] w;
      w = ref_word(a);
      for (int b = 0; b < 8; b++) if (be[b]) w[b*8 +: 8] = wd[b*8 +: 8];
      refmem[{a[ADDR_W-1:3], 3'b000}] = w;
    end else begin
      check(resp_rdata == ref_word(a), $sformatf("load %h data %h expected %h", a, resp_rdata, ref_word(a)));
      if (was_hit && c_perr == p0) check(lat == 3, $sformatf("hit latency %0d", lat));
    end
  endtask

  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic set_mode(input inv_mode_e m);
    if (m != cfg_mode) c_mode++;
    @(negedge clk);
    cfg_mode = m;
  endtask

  initial begin
    bit h;
    int e0, m0, i0, hot_miss;
    req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---------------- phase 1: LocalInvalidation ----------------
    set_mode(INV_LOCAL);
    check(cur_th == TH_W'(1000), "local threshold");
    // idle-time checks on set 1 (no other traffic)
    access(0, mk_addr(1, 1, 0), h);
    idle(700);
    access(0, mk_addr(1, 1, 1), h);
    check(h, "line idle 700 cycles still hits");
    e0 = c_extra;
    idle(1100);
    access(0, mk_addr(1, 1, 2), h);
    check(!h, "line idle 1100 cycles was invalidated");
    check(c_extra == e0 + 1, "its reload is an extra miss");
    // hot line in set 2 used every ~40 cycles while set 3 lines expire over and over
    hot_miss = 0;
    for (int t = 0; t < 8; t++) access(0, mk_addr(10 + t, 3, 0), h);
    access(0, mk_addr(2, 2, 0), h);
    for (int k = 0; k < 400; k++) begin
      access(k % 5 == 0, mk_addr(2, 2, k % 8), h);
      if (!h && k > 0 && k % 5 != 0) hot_miss++;
      idle(35);
      if (k % 30 == 29) begin
        // touch one line of set 3; the others have expired meanwhile
        access(0, mk_addr(10 + (k / 30) % 8, 3, 1), h);
      end
    end
    check(hot_miss == 0, $sformatf("hot line never invalidated (%0d misses)", hot_miss));
    check(c_ref > 0, "history refused some invalidations in set 3");

    // a strike on the hot line is caught by parity and repaired from L2
    @(negedge clk);
    inj_valid = 1; inj_set = 2; inj_way = 0; inj_bit = 9'(3 * 64 + 5);
    @(negedge clk);
    inj_valid = 0;
    access(0, mk_addr(2, 2, 3), h);
    check(c_perr == 1, "strike detected by parity");

    // ---------------- phase 2: GlobalInvalidation ----------------
    set_mode(INV_GLOBAL);
    @(negedge clk);
    check(cur_th == TH_W'(1000), "global threshold starts at 1000");
    // stream over 320 lines (5 tags x 64 sets), revisited after long gaps
    for (int pass = 0; pass < 12 && c_grow < 2; pass++)
      for (int i = 0; i < 320; i++) access(0, mk_addr(100 + i / 64, i % 64, i % 8), h);
    check(c_grow > 0, "threshold doubled under many extra misses");
    check(cur_th > TH_W'(1000), $sformatf("threshold grew to %0d", cur_th));
    // tight re-use of a few lines: no extra misses, the threshold comes back down
    for (int k = 0; k < 9000 && c_shrink < 1; k++) access(0, mk_addr(200, k % 4, k % 8), h);
    check(c_shrink > 0, "threshold halved under few extra misses");

    // ---------------- phase 2b: one-bit scan tracking, GlobalInvalidation ----------------
    // leaving and re-entering INV_GLOBAL reloads the threshold with 1000
    set_mode(INV_LOCAL);
    set_mode(INV_GLOBAL);
    @(negedge clk);
    cfg_scan_bit = 1;
    c_scan = 1;
    // a line is marked after two visits of the pointer without a touch: 512 to 1024
    // cycles at threshold 1000 or 500 (one visit every 512 cycles either way)
    access(0, mk_addr(300, 5, 0), h);
    idle(400);
    access(0, mk_addr(300, 5, 1), h);
    check(h, "scan: line idle 400 cycles still hits");
    e0 = c_extra;
    idle(1100);
    access(0, mk_addr(300, 5, 2), h);
    check(!h, "scan: line idle 1100 cycles was invalidated");
    check(c_extra == e0 + 1, "scan: reload is an extra miss");
    for (int k = 0; k < 60; k++) begin
      access(0, mk_addr(301, 6, k % 8), h);
      if (k > 0) check(h, "scan: line used every ~40 cycles stays");
      idle(35);
    end
    @(negedge clk);
    cfg_scan_bit = 0;

    // ---------------- phase 3: no invalidation ----------------
    set_mode(INV_OFF);
    i0 = c_inv;
    access(0, mk_addr(7, 9, 0), h);
    idle(3000);
    access(0, mk_addr(7, 9, 0), h);
    check(h, "no decay with invalidation off");
    check(c_inv == i0, "no invalidations with invalidation off");
    m0 = c_miss;

    $display("cycles=%0d hits=%0d misses=%0d extra=%0d inv=%0d refused=%0d parity=%0d ticks=%0d intervals=%0d grow=%0d shrink=%0d modes=%0d l2r=%0d l2w=%0d",
             cyc, c_hit, c_miss, c_extra, c_inv, c_ref, c_perr, c_tick, c_iend, c_grow,
             c_shrink, c_mode, n_l2_reads, n_l2_writes);
    check(c_hit > 0, "hits happened");
    check(c_miss > 0, "misses happened");
    check(c_extra > 0, "extra misses happened");
    check(c_inv > 0, "decay invalidations happened");
    check(c_ref > 0, "refusals happened");
    check(c_perr > 0, "parity errors happened");
    check(c_tick > 0, "decay ticks happened");
    check(c_iend > 0, "global intervals ended");
    check(c_grow > 0, "threshold grew");
    check(c_shrink > 0, "threshold shrank");
    check(c_mode >= 3, "mode switches happened");
    check(c_scan > 0, "one-bit scan tracking used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

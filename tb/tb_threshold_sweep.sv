// tb_threshold_sweep: runs one synthetic load/store stream through the full-size decaying
// cache under every evaluated configuration and compares them.
//
// Configurations: invalidation off (reference), LocalInvalidation with inv_threshold in
// {50, 125, 250, 500, 1000, 1500, 2000, 2500, 3000, 3500}, first without a per-set limit,
// then with the 10% limit (one '1' in the 10-bit history), and GlobalInvalidation
// (start 1000, 10 000-cycle interval, 256/128 extra misses). The cache is reset before
// each run; the stream comes from a fixed-seed generator, so every run sees the same
// addresses. The stream mixes a small hot working set, a warm set revisited after a few
// thousand cycles and cold one-off lines, with short idle gaps.
// For each run it prints extra misses, invalidations, the slowdown against the run with
// invalidation off and the vulnerability reduction. Vulnerability is counted in line-cycles:
// a line is exposed from the load miss that brings it in until its last load before it
// leaves (after that L2 holds the only copy that will be used). The testbench measures it
// from its own view of the stream (load miss = start of a stay, load hit = extend), so it
// needs no access to the cache internals; stores and write-no-allocate misses are not
// counted. It checks:
//   * every load returns the right data;
//   * with invalidation off nothing is invalidated;
//   * a longer inv_threshold never gives clearly more extra misses (5% + 2 tolerance, to
//     allow for replacement effects);
//   * the 10% limit never gives clearly more extra misses than no limit at the same
//     threshold, and removes some at the shortest threshold;
//   * the shortest threshold gives more extra misses, and removes more vulnerability,
//     than the longest;
//   * every invalidating run is never faster, and every run without the limit removes some
//     vulnerability. With the limit and a short threshold the stream can end up slightly
//     MORE exposed: the extra misses stretch the run, and with it the gaps between loads,
//     while the limit leaves few invalidations to pay for that.
module tb_threshold_sweep;
  import decay_pkg::*;
  localparam int unsigned LB = 64;
  localparam int NACC = 5000;
  localparam int NTH = 10;
  localparam int THS [NTH] = '{50, 125, 250, 500, 1000, 1500, 2000, 2500, 3000, 3500};

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
  logic [TH_W-1:0] cur_th;
  logic [15:0] glob_extra;
  logic ev_hit, ev_miss, ev_extra_miss, ev_decay_inv, ev_inv_refused, ev_parity_err;
  logic ev_decay_tick, ev_interval_end, ev_th_grow, ev_th_shrink;
  int unsigned n_l2_reads, n_l2_writes;

  int checks = 0, failures = 0;
  // vulnerability bookkeeping, per line address: cycle of the filling load miss and of the
  // latest load; 'vuln' sums the closed stays
  int unsigned fill_t [int unsigned];
  int unsigned last_t [int unsigned];
  longint vuln;
  int c_extra = 0, c_inv = 0, c_ref = 0, c_miss = 0, cyc = 0;

  decay_l1d_top dut (
    .clk, .rst_n, .cfg_mode, .cfg_inv_threshold, .cfg_hist_limit, .cfg_scan_bit,
    .req_valid, .req_ready, .req, .resp_valid, .resp_is_store, .resp_rdata,
    .l2_req_valid, .l2_req_ready, .l2_req_we, .l2_req_addr, .l2_req_wdata, .l2_req_be,
    .l2_resp_valid, .l2_resp_line, .inj_valid(1'b0), .inj_set('0), .inj_way('0), .inj_bit('0),
    .cur_inv_threshold(cur_th), .ev_hit, .ev_miss, .ev_extra_miss, .ev_decay_inv,
    .ev_inv_refused, .ev_parity_err, .ev_decay_tick, .glob_extra_misses(glob_extra),
    .ev_interval_end, .ev_th_grow, .ev_th_shrink);

  l2_model #(.LINE_BYTES(LB), .LATENCY(12)) u_l2 (
    .clk, .req_valid(l2_req_valid), .req_ready(l2_req_ready), .req_we(l2_req_we),
    .req_addr(l2_req_addr), .req_wdata(l2_req_wdata), .req_be(l2_req_be),
    .resp_valid(l2_resp_valid), .resp_line(l2_resp_line),
    .n_reads(n_l2_reads), .n_writes(n_l2_writes));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      c_extra += int'(ev_extra_miss);
      c_inv   += int'(ev_decay_inv);
      c_ref   += int'(ev_inv_refused);
      c_miss  += int'(ev_miss);
    end
  end

  logic [WORD_W-1:0] refmem [logic [ADDR_W-1:0]];
  function automatic logic [WORD_W-1:0] ref_word(input logic [ADDR_W-1:0] a);
    logic [ADDR_W-1:0] wa;
    wa = {a[ADDR_W-1:3], 3'b000};
    return refmem.exists(wa) ? refmem[wa] : {wa ^ 32'h5A5A_0000, ~wa * 32'd2654435761};
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // fixed-seed generator, so that every configuration sees the same stream
  int unsigned lcg;
  function automatic int unsigned rnd();
    lcg = lcg * 32'd1664525 + 32'd1013904223;
    return lcg >> 8;
  endfunction

  task automatic access(input bit we, input logic [ADDR_W-1:0] a, input logic [WORD_W-1:0] wd);
    int m0;
    int unsigned ln;
    m0 = c_miss;
    ln = a >> 6;
    @(negedge clk);
    req_valid = 1;
    req.we = we; req.addr = a; req.wdata = wd; req.be = 8'hFF;
    @(posedge clk iff req_ready);
    @(negedge clk);
    req_valid = 0;
    while (!resp_valid) @(negedge clk);
    if (we) refmem[{a[ADDR_W-1:3], 3'b000}] = wd;
    else begin
      check(resp_rdata == ref_word(a), $sformatf("load %h", a));
      if (c_miss != m0 || !fill_t.exists(ln)) begin
        if (fill_t.exists(ln)) vuln += longint'(last_t[ln]) - longint'(fill_t[ln]);
        fill_t[ln] = cyc;
      end
      last_t[ln] = cyc;
    end
  endtask

  function automatic longint close_vuln();
    foreach (fill_t[ln]) vuln += longint'(last_t[ln]) - longint'(fill_t[ln]);
    return vuln;
  endfunction

  // One run; returns cycles, extra misses, invalidations, vulnerable line-cycles.
  task automatic run(input inv_mode_e m, input int th, input int lim,
                     output int cycles, output int extra, output int inv, output longint vl);
    int c0, e0, i0;
    @(negedge clk);
    rst_n = 0;
    cfg_mode = m;
    cfg_inv_threshold = TH_W'(th);
    cfg_hist_limit = 5'(lim);
    @(negedge clk);
    rst_n = 1;
    lcg = 32'd12345;
    fill_t.delete();
    last_t.delete();
    vuln = 0;
    c0 = cyc; e0 = c_extra; i0 = c_inv;
    for (int k = 0; k < NACC; k++) begin
      int unsigned r, sel, line, word;
      logic [ADDR_W-1:0] a;
      r = rnd();
      sel = r % 100;
      word = (r >> 8) % 8;
      if (sel < 60)      line = (r >> 12) % 48;               // hot
      else if (sel < 92) line = 1000 + (r >> 12) % 256;       // warm
      else               line = 100000 + k;                   // cold
      a = ADDR_W'(line * 64 + word * 8);
      access((r >> 20) % 8 == 0, a, {r, ~r});
      if ((r >> 24) % 4 == 0) repeat ((r >> 26) % 40) @(negedge clk);
    end
    cycles = cyc - c0;
    extra = c_extra - e0;
    inv = c_inv - i0;
    vl = close_vuln();
  endtask

  function automatic real red(input longint v, input longint b);
    return 100.0 * (1.0 - real'(v) / real'(b));
  endfunction

  initial begin
    int base_cyc, cy, ex, iv;
    longint base_vl, vl;
    int ex_nolim [NTH];
    int ex_lim   [NTH];
    longint vl_nolim [NTH];
    req = '0;
    repeat (3) @(posedge clk);
    run(INV_OFF, 1000, 1, base_cyc, ex, iv, base_vl);
    $display("off        cycles=%0d extra=%0d inv=%0d vulnerable_line_cycles=%0d",
             base_cyc, ex, iv, base_vl);
    check(ex == 0 && iv == 0, "nothing invalidated with invalidation off");
    for (int lim = 0; lim < 2; lim++) begin
      for (int i = 0; i < NTH; i++) begin
        run(INV_LOCAL, THS[i], lim ? 1 : 11, cy, ex, iv, vl);
        if (lim) ex_lim[i] = ex; else begin ex_nolim[i] = ex; vl_nolim[i] = vl; end
        $display("inv-%0d%s cycles=%0d extra=%0d inv=%0d slowdown=%0.2f%% vuln_reduction=%0.1f%%",
                 THS[i], lim ? "_10" : "   ", cy, ex, iv,
                 100.0 * (real'(cy) / real'(base_cyc) - 1.0), red(vl, base_vl));
        check(cy >= base_cyc, $sformatf("inv-%0d not faster than no invalidation", THS[i]));
        if (!lim) check(vl < base_vl, $sformatf("inv-%0d removes some vulnerability", THS[i]));
      end
    end
    for (int i = 0; i + 1 < NTH; i++) begin
      check(ex_nolim[i + 1] <= ex_nolim[i] + ex_nolim[i] / 20 + 2,
            $sformatf("extra misses fall with threshold %0d -> %0d (no limit)", THS[i], THS[i + 1]));
      check(ex_lim[i + 1] <= ex_lim[i] + ex_lim[i] / 20 + 2,
            $sformatf("extra misses fall with threshold %0d -> %0d (10%% limit)", THS[i], THS[i + 1]));
    end
    for (int i = 0; i < NTH; i++)
      check(ex_lim[i] <= ex_nolim[i] + ex_nolim[i] / 20 + 2,
            $sformatf("10%% limit does not add extra misses at %0d", THS[i]));
    check(ex_nolim[0] > ex_nolim[NTH - 1], "short threshold gives more extra misses");
    check(ex_lim[0] < ex_nolim[0], "the 10% limit removes extra misses at threshold 50");
    check(vl_nolim[0] < vl_nolim[NTH - 1], "short threshold removes more vulnerability");
    run(INV_GLOBAL, 1000, 1, cy, ex, iv, vl);
    $display("global     cycles=%0d extra=%0d inv=%0d slowdown=%0.2f%% vuln_reduction=%0.1f%% final_th=%0d",
             cy, ex, iv, 100.0 * (real'(cy) / real'(base_cyc) - 1.0), red(vl, base_vl), cur_th);
    check(cy >= base_cyc, "global not faster than no invalidation");
    check(vl < base_vl, "global removes some vulnerability");
    check(iv > 0, "global invalidates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// decay_l1d_top: L1 data cache that invalidates lines left untouched for inv_threshold
// cycles, to shorten the time their data can be hit by a soft error.
//
// A write-through cache line is only worth protecting until its last use; a line that
// sits unused for a long time is exposed to particle strikes for nothing, since L2 holds a
// correct copy. This top joins:
//   l1d_cache           32 KB, 8-way, write-through, byte parity, 3-cycle load hit
//   line_decay_counters one 3-bit counter per line, cleared on fill/read/write
//   decay_tick_gen      advances the counters every inv_threshold/8 cycles
//   decay_scan_bit      alternative to the counters: one bit per line, scanned
//                       round-robin, one line every inv_threshold/512 cycles
//   set_inv_history     LocalInvalidation: 10-bit history per set, limit on invalidations
//   global_inv_ctrl     GlobalInvalidation: inv_threshold doubled/halved every 10 000
//                       cycles to keep extra misses between 128 and 256
// 'cfg_mode' selects the policy at run time (INV_OFF, INV_LOCAL, INV_GLOBAL). In INV_LOCAL
// the threshold is 'cfg_inv_threshold' (1000 in the chosen configuration) and
// 'cfg_hist_limit' ones in the 10-bit history refuse further invalidations in that set
// (1 = 10%); in INV_GLOBAL the threshold starts at 'cfg_inv_threshold' and adapts, and
// the history is ignored. In INV_OFF the decay counters are held cleared.
// 'cfg_scan_bit' picks how idleness is tracked: 0 = 3-bit counters (the main
// implementation), 1 = the one-bit round-robin scan; the unused tracker is held cleared,
// so switching starts from fresh state. A scanned line expires between one and two
// sweeps after its last use; a sweep is 512 steps of inv_threshold >> 9 cycles (512
// cycles for a threshold of 1000, as the shift truncates).
// Interface and timing are those of l1d_cache (request/response port toward the core,
// line-read / word-write port toward L2, strike injection port); the 'ev_*' outputs
// pulse once per event, 'cur_inv_threshold' shows the threshold in force and
// 'glob_extra_misses' the extra misses counted so far in the current global interval.
module decay_l1d_top
  import decay_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 32768,
  parameter int unsigned WAYS        = 8,
  parameter int unsigned LINE_BYTES  = 64,
  parameter int unsigned HIST_LEN    = 10,
  parameter int unsigned INTERVAL    = 10000,
  parameter int unsigned MAX_TH      = 256,
  parameter int unsigned MIN_TH      = 128,
  localparam int unsigned SETS       = CACHE_BYTES / (WAYS * LINE_BYTES),
  localparam int unsigned NLINES     = SETS * WAYS,
  localparam int unsigned LINE_W     = LINE_BYTES * 8,
  localparam int unsigned HL_W       = $clog2(HIST_LEN + 1) + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // configuration
  input  inv_mode_e             cfg_mode,
  input  logic [TH_W-1:0]       cfg_inv_threshold,
  input  logic [HL_W-1:0]       cfg_hist_limit,
  input  logic                  cfg_scan_bit,
  // CPU side
  input  logic                  req_valid,
  output logic                  req_ready,
  input  cpu_req_t              req,
  output logic                  resp_valid,
  output logic                  resp_is_store,
  output logic [WORD_W-1:0]     resp_rdata,
  // L2 side
  output logic                  l2_req_valid,
  input  logic                  l2_req_ready,
  output logic                  l2_req_we,
  output logic [ADDR_W-1:0]     l2_req_addr,
  output logic [WORD_W-1:0]     l2_req_wdata,
  output logic [WORD_BYTES-1:0] l2_req_be,
  input  logic                  l2_resp_valid,
  input  logic [LINE_W-1:0]     l2_resp_line,
  // strike injection
  input  logic                  inj_valid,
  input  logic [$clog2(SETS)-1:0]   inj_set,
  input  logic [$clog2(WAYS)-1:0]   inj_way,
  input  logic [$clog2(LINE_W)-1:0] inj_bit,
  // observation
  output logic [TH_W-1:0]       cur_inv_threshold,
  output logic                  ev_hit,
  output logic                  ev_miss,
  output logic                  ev_extra_miss,
  output logic                  ev_decay_inv,
  output logic                  ev_inv_refused,
  output logic                  ev_parity_err,
  output logic                  ev_decay_tick,
  output logic [15:0]           glob_extra_misses,
  output logic                  ev_interval_end,
  output logic                  ev_th_grow,
  output logic                  ev_th_shrink
);

  logic [NLINES-1:0]          expired;
  logic [$clog2(SETS)-1:0]    lookup_set;
  logic                       hist_allow, hist_upd, hist_upd_bit;
  logic                       touch;
  logic [$clog2(NLINES)-1:0]  touch_idx;
  logic [TH_W-1:0]            glob_th;
  logic                       decay_on, glob_on;
  logic                       tick, scan_step;
  logic [NLINES-1:0]          cnt_expired, scan_expired;

  assign decay_on = (cfg_mode != INV_OFF);
  assign glob_on  = (cfg_mode == INV_GLOBAL);
  assign cur_inv_threshold = glob_on ? glob_th : cfg_inv_threshold;
  assign ev_decay_tick = cfg_scan_bit ? scan_step : tick;
  assign expired       = cfg_scan_bit ? scan_expired : cnt_expired;

  l1d_cache #(
    .CACHE_BYTES(CACHE_BYTES), .WAYS(WAYS), .LINE_BYTES(LINE_BYTES)
  ) u_cache (
    .clk, .rst_n,
    .req_valid, .req_ready, .req, .resp_valid, .resp_is_store, .resp_rdata,
    .l2_req_valid, .l2_req_ready, .l2_req_we, .l2_req_addr, .l2_req_wdata, .l2_req_be,
    .l2_resp_valid, .l2_resp_line,
    .mode(cfg_mode), .line_expired(expired), .lookup_set,
    .hist_allow, .hist_upd, .hist_upd_bit, .touch, .touch_idx,
    .inj_valid, .inj_set, .inj_way, .inj_bit,
    .ev_hit, .ev_miss, .ev_extra_miss, .ev_decay_inv, .ev_inv_refused, .ev_parity_err
  );

  // 3-bit counters (default) or the one-bit round-robin scan, chosen by cfg_scan_bit
  decay_tick_gen #(.SHIFT(3)) u_tick (
    .clk, .rst_n, .enable(decay_on && !cfg_scan_bit), .inv_threshold(cur_inv_threshold), .tick
  );

  line_decay_counters #(.NLINES(NLINES)) u_counters (
    .clk, .rst_n, .tick, .clear_all(!decay_on || cfg_scan_bit), .touch, .touch_idx,
    .expired(cnt_expired)
  );

  decay_tick_gen #(.SHIFT($clog2(NLINES))) u_scan_tick (
    .clk, .rst_n, .enable(decay_on && cfg_scan_bit), .inv_threshold(cur_inv_threshold),
    .tick(scan_step)
  );

  decay_scan_bit #(.NLINES(NLINES)) u_scan (
    .clk, .rst_n, .step(scan_step), .clear_all(!decay_on || !cfg_scan_bit), .touch, .touch_idx,
    .expired(scan_expired)
  );

  set_inv_history #(.SETS(SETS), .HIST_LEN(HIST_LEN)) u_hist (
    .clk, .rst_n, .limit(cfg_hist_limit), .rd_set(lookup_set), .allow(hist_allow),
    .ones(), .upd(hist_upd), .upd_set(lookup_set), .upd_bit(hist_upd_bit)
  );

  global_inv_ctrl #(.INTERVAL(INTERVAL), .MAX_TH(MAX_TH), .MIN_TH(MIN_TH)) u_global (
    .clk, .rst_n, .enable(glob_on), .init_threshold(cfg_inv_threshold),
    .extra_miss(ev_extra_miss), .inv_threshold(glob_th),
    .extra_miss_count(glob_extra_misses), .interval_end(ev_interval_end),
    .grow(ev_th_grow), .shrink(ev_th_shrink)
  );

endmodule

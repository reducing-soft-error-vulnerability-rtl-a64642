// l1d_cache: write-through, byte-parity-protected L1 data cache with decay invalidation.
//
// Geometry: CACHE_BYTES = 32 KB, WAYS = 8, LINE_BYTES = 64 (64 sets, 512 lines), one
// 64-bit word per access. Data and parity live in two arrays indexed by set*WAYS+way;
// tags, valid bits, a "decayed" flag per line and a tree pseudo-LRU state per set are
// kept in registers.
//
// Decay invalidation. The per-line decay counters sit outside this block and arrive on
// 'line_expired'. Because the cache is write-through, L2 always holds a correct copy and
// an expired line may be invalidated lazily: when a request looks up a set, the expired
// valid lines of that set are invalidated before the hit check, so a line that went
// inv_threshold cycles untouched can no longer hit (its next use becomes a miss exactly as
// if it had been invalidated when it expired). In INV_GLOBAL every expired line of the set
// is invalidated; in INV_LOCAL at most one (the lowest way) and only if the set history
// allows it ('hist_allow'); every lookup reports its outcome on 'hist_upd'/'hist_upd_bit'
// so the history can shift it in. INV_OFF invalidates nothing.
// An invalidated line keeps its tag and gets its "decayed" flag set. A load that misses
// while a decayed line of the set still holds its tag is an extra miss (caused by decay):
// 'ev_extra_miss' pulses, and the refill goes back into that way, which clears the flag.
// Another line's refill may take an invalidated way and so drop its kept tag; a later
// miss to that line is then not counted as extra. Stores do not count: with write-through
// and no write-allocate a store reaches L2 whether the line is there or not.
//
// Parity. Each data byte has an even parity bit, generated when a line is filled or a
// word is stored and checked when a load reads a word. A load that finds a parity error
// drops the line and refetches it from L2 (possible because the cache is write-through);
// 'ev_parity_err' pulses. The inj_* port flips one stored data bit (a modelled particle
// strike) so that this path can be exercised.
//
// Timing and interface. One request at a time (req_valid/req_ready handshake; ready only
// in IDLE). A load hit answers on resp_valid three cycles after the accepting edge
// (IDLE -> TAG -> DATA -> RESP), matching the 3-cycle DL1 hit. A load miss issues one
// line read to L2 (l2_req_valid/l2_req_ready, then l2_resp_valid with the whole line),
// fills the victim (an invalid way, see below, otherwise pseudo-LRU) and answers one cycle after
// the fill. A store updates the line if it hits (no allocation on a miss), is written
// through to L2 as a byte-masked word write and is acknowledged on resp_valid after L2
// accepts it. The blocking, single-port organisation, the line size, write-no-allocate
// and pseudo-LRU replacement are choices of this design.
module l1d_cache
  import decay_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 32768,
  parameter int unsigned WAYS        = 8,
  parameter int unsigned LINE_BYTES  = 64,
  localparam int unsigned SETS       = CACHE_BYTES / (WAYS * LINE_BYTES),
  localparam int unsigned NLINES     = SETS * WAYS,
  localparam int unsigned LINE_W     = LINE_BYTES * 8,
  localparam int unsigned SET_W      = $clog2(SETS),
  localparam int unsigned WAY_W      = $clog2(WAYS),
  localparam int unsigned IDX_W      = $clog2(NLINES),
  localparam int unsigned OFF_W      = $clog2(LINE_BYTES),
  localparam int unsigned WSEL_W     = $clog2(LINE_BYTES / WORD_BYTES),
  localparam int unsigned TAG_W      = ADDR_W - SET_W - OFF_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
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
  // decay logic
  input  inv_mode_e             mode,
  input  logic [NLINES-1:0]     line_expired,
  output logic [SET_W-1:0]      lookup_set,
  input  logic                  hist_allow,
  output logic                  hist_upd,
  output logic                  hist_upd_bit,
  output logic                  touch,
  output logic [IDX_W-1:0]      touch_idx,
  // strike injection (flips data bit inj_bit of line inj_set/inj_way while idle)
  input  logic                  inj_valid,
  input  logic [SET_W-1:0]      inj_set,
  input  logic [WAY_W-1:0]      inj_way,
  input  logic [$clog2(LINE_W)-1:0] inj_bit,
  // events, one-cycle pulses
  output logic                  ev_hit,
  output logic                  ev_miss,
  output logic                  ev_extra_miss,
  output logic                  ev_decay_inv,
  output logic                  ev_inv_refused,
  output logic                  ev_parity_err
);

  typedef enum logic [2:0] {
    S_IDLE, S_TAG, S_DATA, S_RESP, S_MISS_REQ, S_MISS_WAIT, S_WT
  } state_e;

  // ---- storage --------------------------------------------------------------------
  logic [LINE_W-1:0]     data_mem [NLINES];
  logic [LINE_BYTES-1:0] par_mem  [NLINES];
  logic [TAG_W-1:0]      tag_q    [NLINES];
  logic [NLINES-1:0]     valid_q, decayed_q;
  logic [WAYS-2:0]       plru_q   [SETS];

  // ---- request registers ----------------------------------------------------------
  state_e          state_q;
  cpu_req_t        req_q;
  logic [WAY_W-1:0] way_q;
  logic [WORD_W-1:0] word_q;
  logic [WORD_BYTES-1:0] wpar_q;

  logic [SET_W-1:0]  set_r;
  logic [TAG_W-1:0]  tag_r;
  logic [WSEL_W-1:0] wsel_r;
  assign set_r  = req_q.addr[OFF_W +: SET_W];
  assign tag_r  = req_q.addr[ADDR_W-1 -: TAG_W];
  assign wsel_r = req_q.addr[OFF_W-1 -: WSEL_W];
  assign lookup_set = set_r;

  function automatic logic [IDX_W-1:0] lidx(input logic [SET_W-1:0] s, input logic [WAY_W-1:0] w);
    return {s, w};
  endfunction

  // Tree pseudo-LRU: node n has children 2n+1 (bit 0) and 2n+2 (bit 1); a node bit
  // points toward the side to replace next.
  function automatic logic [WAY_W-1:0] plru_victim(input logic [WAYS-2:0] t);
    int unsigned n;
    logic [WAY_W-1:0] w;
    n = 0;
    w = '0;
    for (int l = 0; l < WAY_W; l++) begin
      w = {w[WAY_W-2:0], t[n]};
      n = 2 * n + 1 + int'(t[n]);
    end
    return w;
  endfunction

  function automatic logic [WAYS-2:0] plru_touch(input logic [WAYS-2:0] t, input logic [WAY_W-1:0] w);
    int unsigned n;
    logic [WAYS-2:0] r;
    r = t;
    n = 0;
    for (int l = 0; l < WAY_W; l++) begin
      r[n] = ~w[WAY_W-1-l];
      n = 2 * n + 1 + int'(w[WAY_W-1-l]);
    end
    return r;
  endfunction

  // ---- lookup (state S_TAG) ---------------------------------------------------------
  logic [WAYS-1:0] way_valid, way_decayed, way_match, way_exp, inv_ways, hit_ways, valid_eff;
  logic            hit, extra, refused;
  logic [WAY_W-1:0] hit_way;

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      way_valid[w]   = valid_q[lidx(set_r, WAY_W'(w))];
      way_decayed[w] = decayed_q[lidx(set_r, WAY_W'(w))];
      way_match[w]   = (tag_q[lidx(set_r, WAY_W'(w))] == tag_r);
      way_exp[w]     = way_valid[w] && line_expired[lidx(set_r, WAY_W'(w))];
    end
    inv_ways = '0;
    refused  = 1'b0;
    unique case (mode)
      INV_GLOBAL: inv_ways = way_exp;
      INV_LOCAL: begin
        if (hist_allow) inv_ways = way_exp & (~way_exp + 1'b1);  // lowest expired way
        else            refused  = |way_exp;
      end
      default: ;
    endcase
    valid_eff = way_valid & ~inv_ways;
    hit_ways  = valid_eff & way_match;
    hit       = |hit_ways;
    hit_way   = '0;
    for (int w = 0; w < WAYS; w++) if (hit_ways[w]) hit_way = WAY_W'(w);
    extra     = !hit && !req_q.we && |((way_decayed | inv_ways) & ~valid_eff & way_match);
  end

  // ---- victim (state S_MISS_WAIT) ---------------------------------------------------
  // Priority: the invalidated way that still holds this line's tag (the line returns to
  // its own way), then a never-used or parity-dropped way, then another invalidated way
  // (its kept tag is lost), then the pseudo-LRU choice. Lowest way first within a class.
  logic [WAY_W-1:0] victim;
  always_comb begin
    logic found;
    victim = plru_victim(plru_q[set_r]);
    found  = 1'b0;
    for (int w = 0; w < WAYS; w++)
      if (!found && !valid_q[lidx(set_r, WAY_W'(w))] && decayed_q[lidx(set_r, WAY_W'(w))] &&
          tag_q[lidx(set_r, WAY_W'(w))] == tag_r) begin
        victim = WAY_W'(w); found = 1'b1;
      end
    for (int w = 0; w < WAYS; w++)
      if (!found && !valid_q[lidx(set_r, WAY_W'(w))] && !decayed_q[lidx(set_r, WAY_W'(w))]) begin
        victim = WAY_W'(w); found = 1'b1;
      end
    for (int w = 0; w < WAYS; w++)
      if (!found && !valid_q[lidx(set_r, WAY_W'(w))]) begin
        victim = WAY_W'(w); found = 1'b1;
      end
  end

  // ---- parity ---------------------------------------------------------------------
  logic [WORD_BYTES-1:0] word_par_chk, store_par;
  logic [LINE_BYTES-1:0] fill_par;
  logic                  perr;
  byte_parity #(.NBYTES(WORD_BYTES)) u_par_chk  (.data(word_q),             .par(word_par_chk));
  byte_parity #(.NBYTES(WORD_BYTES)) u_par_st   (.data(req_q.wdata),        .par(store_par));
  byte_parity #(.NBYTES(LINE_BYTES)) u_par_fill (.data(l2_resp_line),       .par(fill_par));
  assign perr = (word_par_chk != wpar_q);

  logic fill_now;
  assign fill_now = (state_q == S_MISS_WAIT) && l2_resp_valid;

  // ---- control --------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      req_q     <= '0;
      way_q     <= '0;
      word_q    <= '0;
      wpar_q    <= '0;
      valid_q   <= '0;
      decayed_q <= '0;
      for (int s = 0; s < SETS; s++) plru_q[s] <= '0;
      for (int i = 0; i < NLINES; i++) tag_q[i] <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (req_valid) begin
          req_q   <= req;
          state_q <= S_TAG;
        end
        S_TAG: begin
          for (int w = 0; w < WAYS; w++) begin
            if (inv_ways[w]) begin
              valid_q[lidx(set_r, WAY_W'(w))]   <= 1'b0;
              decayed_q[lidx(set_r, WAY_W'(w))] <= 1'b1;
            end
          end
          way_q <= hit_way;
          if (hit) begin
            plru_q[set_r] <= plru_touch(plru_q[set_r], hit_way);
            state_q <= S_DATA;
          end else begin
            state_q <= req_q.we ? S_WT : S_MISS_REQ;
          end
        end
        S_DATA: begin
          word_q  <= data_mem[lidx(set_r, way_q)][wsel_r*WORD_W +: WORD_W];
          wpar_q  <= par_mem[lidx(set_r, way_q)][wsel_r*WORD_BYTES +: WORD_BYTES];
          state_q <= req_q.we ? S_WT : S_RESP;
        end
        S_RESP: begin
          if (!req_q.we && perr) begin
            valid_q[lidx(set_r, way_q)]   <= 1'b0;
            decayed_q[lidx(set_r, way_q)] <= 1'b0;
            state_q <= S_MISS_REQ;
          end else begin
            state_q <= S_IDLE;
          end
        end
        S_MISS_REQ: if (l2_req_ready) state_q <= S_MISS_WAIT;
        S_MISS_WAIT: if (l2_resp_valid) begin
          tag_q[lidx(set_r, victim)]     <= tag_r;
          valid_q[lidx(set_r, victim)]   <= 1'b1;
          decayed_q[lidx(set_r, victim)] <= 1'b0;
          plru_q[set_r] <= plru_touch(plru_q[set_r], victim);
          way_q   <= victim;
          word_q  <= l2_resp_line[wsel_r*WORD_W +: WORD_W];
          wpar_q  <= fill_par[wsel_r*WORD_BYTES +: WORD_BYTES];
          state_q <= S_RESP;
        end
        S_WT: if (l2_req_ready) state_q <= S_RESP;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // ---- data and parity arrays -------------------------------------------------------
  always_ff @(posedge clk) begin
    if (fill_now) begin
      data_mem[lidx(set_r, victim)] <= l2_resp_line;
      par_mem[lidx(set_r, victim)]  <= fill_par;
    end else if (state_q == S_DATA && req_q.we) begin
      for (int b = 0; b < WORD_BYTES; b++) begin
        if (req_q.be[b]) begin
          data_mem[lidx(set_r, way_q)][(wsel_r*WORD_BYTES + b)*8 +: 8] <= req_q.wdata[b*8 +: 8];
          par_mem[lidx(set_r, way_q)][wsel_r*WORD_BYTES + b]           <= store_par[b];
        end
      end
    end else if (state_q == S_IDLE && inj_valid) begin
      data_mem[lidx(inj_set, inj_way)][inj_bit] <= ~data_mem[lidx(inj_set, inj_way)][inj_bit];
    end
  end

  // ---- outputs --------------------------------------------------------------------
  assign req_ready     = (state_q == S_IDLE);
  assign resp_valid    = (state_q == S_RESP) && (req_q.we || !perr);
  assign resp_is_store = req_q.we;
  assign resp_rdata    = word_q;

  assign l2_req_valid  = (state_q == S_MISS_REQ) || (state_q == S_WT);
  assign l2_req_we     = (state_q == S_WT);
  assign l2_req_addr   = (state_q == S_WT) ? {req_q.addr[ADDR_W-1:3], 3'b000}
                                           : {req_q.addr[ADDR_W-1:OFF_W], OFF_W'(0)};
  assign l2_req_wdata  = req_q.wdata;
  assign l2_req_be     = req_q.be;

  assign hist_upd      = (state_q == S_TAG);
  assign hist_upd_bit  = |inv_ways;
  assign touch         = ((state_q == S_TAG) && hit) || fill_now;
  assign touch_idx     = fill_now ? lidx(set_r, victim) : lidx(set_r, hit_way);

  assign ev_hit        = (state_q == S_TAG) && hit;
  assign ev_miss       = (state_q == S_TAG) && !hit;
  assign ev_extra_miss = (state_q == S_TAG) && extra;
  assign ev_decay_inv  = (state_q == S_TAG) && |inv_ways;
  assign ev_inv_refused= (state_q == S_TAG) && refused;
  assign ev_parity_err = (state_q == S_RESP) && !req_q.we && perr;

  // A response is only ever given for a request that was accepted.
  a_resp_after_req: assert property (@(posedge clk) disable iff (!rst_n)
    resp_valid |-> (state_q == S_RESP));
  a_l2_stable: assert property (@(posedge clk) disable iff (!rst_n)
    l2_req_valid && !l2_req_ready |=> l2_req_valid && $stable(l2_req_addr));

endmodule

// decay_pkg: shared sizes, types and helper functions for the decaying L1 data cache.
//
// The cache geometry (32 KB, 8 ways) is the data cache of the evaluated processor
// configuration. Line size (64 bytes), word size (64 bits) and address width (32 bits)
// are choices of this design; the reference configuration does not state them.
// The decay constants (3-bit counters, 10-entry set history, 10 000-cycle interval,
// max_th = 256, min_th = 128, starting threshold 1000) follow the described scheme.
package decay_pkg;

  // ---- cache geometry -------------------------------------------------------------
  localparam int unsigned ADDR_W      = 32;   // byte address width (design choice)
  localparam int unsigned WORD_BYTES  = 8;    // one CPU access is up to 64 bits
  localparam int unsigned WORD_W      = WORD_BYTES * 8;

  // ---- decay mechanism ------------------------------------------------------------
  localparam int unsigned DECAY_W     = 3;    // per-line counter, expires at all ones
  localparam int unsigned TH_W        = 20;   // width of the inv_threshold register

  // Invalidation policy selected at run time.
  typedef enum logic [1:0] {
    INV_OFF    = 2'd0,  // no decay invalidation (plain write-through cache)
    INV_LOCAL  = 2'd1,  // fixed inv_threshold, per-set history limits invalidations
    INV_GLOBAL = 2'd2   // inv_threshold adapted from the extra-miss count
  } inv_mode_e;

  // One CPU request: load or store of up to WORD_BYTES bytes inside one aligned word.
  typedef struct packed {
    logic                  we;     // 1 = store, 0 = load
    logic [ADDR_W-1:0]     addr;   // byte address; the low 3 bits are ignored
    logic [WORD_W-1:0]     wdata;  // store data, aligned to the word
    logic [WORD_BYTES-1:0] be;     // store byte enables
  } cpu_req_t;

  // Even parity of each byte: bit i is the XOR of byte i.
  function automatic logic [WORD_BYTES-1:0] word_parity(input logic [WORD_W-1:0] w);
    logic [WORD_BYTES-1:0] p;
    for (int i = 0; i < WORD_BYTES; i++) p[i] = ^w[i*8 +: 8];
    return p;
  endfunction

endpackage

// line_decay_counters: one 3-bit "not touched" counter per cache line.
//
// A counter is cleared when its line is filled or when a word of it is read or written
// (the moments the parity is checked or generated), and it advances by one on every
// decay tick (every inv_threshold/8 cycles). It saturates at all ones; a line whose
// counter is all ones has gone about inv_threshold cycles untouched and is reported in
// 'expired'. The cache then invalidates it on the next access to its set.
// Interface: 'touch' with 'touch_idx' (line = set*WAYS + way) clears one counter; a touch
// wins over a tick in the same cycle. 'clear_all' clears every counter (used when decay
// is switched off). 'expired' is a registered-state decode, valid in the same cycle.
module line_decay_counters
  import decay_pkg::*;
#(
  parameter int unsigned NLINES = 512
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      tick,
  input  logic                      clear_all,
  input  logic                      touch,
  input  logic [$clog2(NLINES)-1:0] touch_idx,
  output logic [NLINES-1:0]         expired
);
  localparam int unsigned IDXW = $clog2(NLINES);
  localparam logic [DECAY_W-1:0] ALL_ONES = '1;

  logic [DECAY_W-1:0] cnt_q [NLINES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NLINES; i++) cnt_q[i] <= '0;
    end else begin
      for (int i = 0; i < NLINES; i++) begin
        if (clear_all || (touch && touch_idx == IDXW'(i))) cnt_q[i] <= '0;
        else if (tick && cnt_q[i] != ALL_ONES)     cnt_q[i] <= cnt_q[i] + 1'b1;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NLINES; i++) expired[i] = (cnt_q[i] == ALL_ONES);
  end
endmodule

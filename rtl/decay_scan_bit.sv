// decay_scan_bit: one-bit-per-line alternative to the 3-bit decay counters.
//
// Each line has a single "scanned" bit. A pointer walks the lines round-robin, one line per
// 'step'. When it reaches a line whose bit is clear it sets the bit; when the bit is
// already set, the line has not been read, written or filled since the previous visit,
// and it is marked expired. A touch (fill, read or write) clears both the bit and the
// expired mark of its line, and wins over a visit to the same line in the same cycle.
// With one step every inv_threshold/NLINES cycles the pointer sweeps all lines once per
// inv_threshold cycles, so an untouched line is marked between one and two sweeps after
// its last use; the exact step rate is set by whoever drives 'step'.
// Interface matches line_decay_counters: 'expired' is read from registers, so it is valid
// in the same cycle; 'clear_all' clears every bit, mark and the pointer.
// The round-robin scan with one bit per line is the described alternative; the sticky
// expired mark (so the lookup that follows sees it) is this design's choice.
module decay_scan_bit #(
  parameter int unsigned NLINES = 512
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      step,
  input  logic                      clear_all,
  input  logic                      touch,
  input  logic [$clog2(NLINES)-1:0] touch_idx,
  output logic [NLINES-1:0]         expired
);
  localparam int unsigned IDXW = $clog2(NLINES);

  logic [NLINES-1:0] scanned_q, expired_q;
  logic [IDXW-1:0]   ptr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scanned_q <= '0;
      expired_q <= '0;
      ptr_q     <= '0;
    end else if (clear_all) begin
      scanned_q <= '0;
      expired_q <= '0;
      ptr_q     <= '0;
    end else begin
      if (step) begin
        ptr_q <= (ptr_q == IDXW'(NLINES - 1)) ? '0 : ptr_q + 1'b1;
        if (!(touch && touch_idx == ptr_q)) begin
          if (scanned_q[ptr_q]) expired_q[ptr_q] <= 1'b1;
          else                  scanned_q[ptr_q] <= 1'b1;
        end
      end
      if (touch) begin
        scanned_q[touch_idx] <= 1'b0;
        expired_q[touch_idx] <= 1'b0;
      end
    end
  end

  assign expired = expired_q;
endmodule

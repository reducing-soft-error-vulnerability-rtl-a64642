// decay_tick_gen: prescaler that pulses 'tick' once every inv_threshold/8 cycles.
//
// Each cache line's decay counter advances by one on every tick, so a counter that
// reaches all ones (7) has not been touched for about inv_threshold cycles.
// SHIFT = 3 (the default) gives the 1/8 step of the 3-bit counters; the one-bit scan
// alternative uses SHIFT = log2(lines) so that one sweep of all lines takes about
// inv_threshold cycles.
// The period is inv_threshold >> SHIFT (the shift truncates: with SHIFT = 3, 1000
// gives a period of 125 cycles and 50 gives 6); a period below 1 is raised to 1.
// Interface: 'enable' low holds the prescaler at zero. 'tick' is a one-cycle pulse,
// registered. A new inv_threshold takes effect at once: if the count is already past the
// new period, the next cycle ticks.
module decay_tick_gen
  import decay_pkg::*;
#(
  parameter int unsigned SHIFT = 3
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            enable,
  input  logic [TH_W-1:0] inv_threshold,
  output logic            tick
);
  logic [TH_W-1:0] period, cnt_q;

  always_comb begin
    period = inv_threshold >> SHIFT;
    if (period == '0) period = TH_W'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      tick  <= 1'b0;
    end else if (!enable) begin
      cnt_q <= '0;
      tick  <= 1'b0;
    end else if (cnt_q >= period - 1'b1) begin
      cnt_q <= '0;
      tick  <= 1'b1;
    end else begin
      cnt_q <= cnt_q + 1'b1;
      tick  <= 1'b0;
    end
  end
endmodule

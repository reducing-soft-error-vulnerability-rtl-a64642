// global_inv_ctrl: adaptive inv_threshold for GlobalInvalidation.
//
// Instead of limiting invalidations per set, the whole cache is held to a band of extra
// misses (misses to a line that decay had invalidated). A counter collects the extra
// misses over an interval of INTERVAL cycles. At the end of each interval two comparators
// check the count: above MAX_TH the scheme is too aggressive and inv_threshold is doubled;
// below MIN_TH it is not aggressive enough and inv_threshold is halved; in between it is
// kept. Doubling and halving are one-bit shifts. The count then restarts.
// Defaults follow the evaluated configuration: 10 000-cycle interval, max_th = 256,
// min_th = 128, start value 1000 (INIT_TH after reset, then 'init_threshold' whenever
// the controller is disabled).
// Design choices: the threshold is kept between TH_FLOOR and TH_CEIL (a doubling that
// would pass TH_CEIL or a halving below TH_FLOOR is skipped); the extra-miss counter
// saturates; while 'enable' is low the controller holds inv_threshold at init_threshold
// and the interval at zero, so switching to this mode starts from the initial value.
// Interface: 'extra_miss' is a one-cycle pulse per extra miss. 'interval_end', 'grow'
// and 'shrink' pulse in the cycle the decision is taken; inv_threshold changes at the
// following edge.
module global_inv_ctrl
  import decay_pkg::*;
#(
  parameter int unsigned INTERVAL = 10000,
  parameter int unsigned MAX_TH   = 256,
  parameter int unsigned MIN_TH   = 128,
  parameter int unsigned INIT_TH  = 1000,
  parameter int unsigned TH_FLOOR = 8,
  parameter int unsigned TH_CEIL  = 512000
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            enable,
  input  logic [TH_W-1:0] init_threshold,
  input  logic            extra_miss,
  output logic [TH_W-1:0] inv_threshold,
  output logic [15:0]     extra_miss_count,
  output logic            interval_end,
  output logic            grow,
  output logic            shrink
);
  localparam int unsigned IW = $clog2(INTERVAL);

  logic [IW-1:0] icnt_q;
  logic [15:0]   miss_q;
  logic [TH_W-1:0] th_q;

  assign interval_end     = enable && (icnt_q == IW'(INTERVAL - 1));
  assign grow             = interval_end && (miss_q > 16'(MAX_TH)) &&
                            ({1'b0, th_q} << 1) <= (TH_W+1)'(TH_CEIL);
  assign shrink           = interval_end && (miss_q < 16'(MIN_TH)) &&
                            (th_q >> 1) >= TH_W'(TH_FLOOR);
  assign inv_threshold    = th_q;
  assign extra_miss_count = miss_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      icnt_q <= '0;
      miss_q <= '0;
      th_q   <= TH_W'(INIT_TH);
    end else if (!enable) begin
      icnt_q <= '0;
      miss_q <= '0;
      th_q   <= init_threshold;
    end else begin
      if (interval_end) begin
        icnt_q <= '0;
        miss_q <= extra_miss ? 16'd1 : 16'd0;  // a miss in this cycle opens the next interval
        if (grow)        th_q <= th_q << 1;
        else if (shrink) th_q <= th_q >> 1;
      end else begin
        icnt_q <= icnt_q + 1'b1;
        if (extra_miss && miss_q != 16'hFFFF) miss_q <= miss_q + 1'b1;
      end
    end
  end
endmodule

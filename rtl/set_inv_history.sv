// set_inv_history: per-set invalidation history for LocalInvalidation.
//
// Each set keeps a HIST_LEN-bit shift register recording whether each of its latest
// accesses invalidated a line (1) or not (0). On every access to a set the oldest bit is
// dropped and the new outcome is shifted in. Before a line of a set is invalidated, the
// history of that set is read: if it already holds 'limit' or more ones, the invalidation
// is refused. With HIST_LEN = 10 and limit = 1, each one stands for 10% of the accesses,
// so at most one access in ten may invalidate a line.
// Interface: 'rd_set' selects the set whose 'allow' is reported (combinational).
// 'upd' with 'upd_set' and 'upd_bit' shifts the outcome of an access in at the clock
// edge. 'limit' is a run-time setting; limit > HIST_LEN never refuses.
module set_inv_history #(
  parameter int unsigned SETS     = 64,
  parameter int unsigned HIST_LEN = 10
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [$clog2(HIST_LEN+1):0] limit,
  input  logic [$clog2(SETS)-1:0]    rd_set,
  output logic                       allow,
  output logic [$clog2(HIST_LEN+1)-1:0] ones,
  input  logic                       upd,
  input  logic [$clog2(SETS)-1:0]    upd_set,
  input  logic                       upd_bit
);
  logic [HIST_LEN-1:0] hist_q [SETS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) hist_q[s] <= '0;
    end else if (upd) begin
      hist_q[upd_set] <= {hist_q[upd_set][HIST_LEN-2:0], upd_bit};
    end
  end

  always_comb begin
    ones = '0;
    for (int i = 0; i < HIST_LEN; i++) ones = ones + hist_q[rd_set][i];
    allow = ({1'b0, ones} < limit);
  end
endmodule

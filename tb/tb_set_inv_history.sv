// tb_set_inv_history: random accesses to 4 sets with random outcomes; a reference queue
// of the last 10 outcomes per set predicts 'allow' for limits 1 (10%), 3 and 11 (never
// refuses).
module tb_set_inv_history;
  localparam int unsigned SETS = 4, HL = 10;
  logic clk = 0, rst_n = 0;
  logic [$clog2(HL+1):0] limit;
  logic [1:0] rd_set = 0, upd_set = 0;
  logic allow, upd = 0, upd_bit = 0;
  logic [$clog2(HL+1)-1:0] ones;
  bit   hist [SETS][$];
  int checks = 0, failures = 0, n_refused = 0;

  set_inv_history #(.SETS(SETS), .HIST_LEN(HL)) dut (
    .clk, .rst_n, .limit, .rd_set, .allow, .ones, .upd, .upd_set, .upd_bit);

  always #5 clk = ~clk;

  function automatic int ref_ones(int s);
    int n = 0;
    foreach (hist[s][i]) n += hist[s][i];
    return n;
  endfunction

  initial begin
    for (int s = 0; s < SETS; s++) repeat (HL) hist[s].push_back(0);
    repeat (2) @(posedge clk);
    rst_n = 1;
  end

  int lims [3] = '{1, 3, 11};

  initial begin
    @(posedge rst_n);
    for (int phase = 0; phase < 3; phase++) begin
      limit = lims[phase];
      for (int c = 0; c < 1000; c++) begin
        @(negedge clk);
        rd_set  = $urandom % SETS;
        upd_set = rd_set;
        upd     = ($urandom % 4) != 0;
        upd_bit = ($urandom % 5) == 0;
        #1;
        checks += 2;
        if (ones !== ref_ones(rd_set)) begin
          failures++;
          $display("FAIL set %0d ones %0d expected %0d", rd_set, ones, ref_ones(rd_set));
        end
        if (allow !== (ref_ones(rd_set) < lims[phase])) begin
          failures++;
          $display("FAIL set %0d allow %b limit %0d", rd_set, allow, lims[phase]);
        end
        if (!allow) n_refused++;
        @(posedge clk);
        if (upd) begin
          void'(hist[upd_set].pop_front());
          hist[upd_set].push_back(upd_bit);
        end
      end
    end
    checks++;
    if (n_refused == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_global_inv_ctrl: drives a chosen number of extra misses in each interval and checks
// the threshold decision at every interval end: more than MAX_TH doubles, fewer than
// MIN_TH halves, in between keeps; also the floor, the ceiling, the interval length and
// the reload of the start value when the controller is disabled. Small interval and
// thresholds keep the run short; the comparison rule is the same as at full size.
module tb_global_inv_ctrl;
  import decay_pkg::*;
  localparam int unsigned INTERVAL = 200, MAXT = 20, MINT = 10, FLOOR = 8, CEIL = 8000;
  logic clk = 0, rst_n = 0, enable = 0, extra_miss = 0;
  logic [TH_W-1:0] init_th = TH_W'(1000), th;
  logic [15:0] cnt;
  logic iend, grow, shrink;
  int checks = 0, failures = 0, n_grow = 0, n_shrink = 0;
  int cyc = 0;

  global_inv_ctrl #(.INTERVAL(INTERVAL), .MAX_TH(MAXT), .MIN_TH(MINT), .INIT_TH(1000),
                    .TH_FLOOR(FLOOR), .TH_CEIL(CEIL)) dut (
    .clk, .rst_n, .enable, .init_threshold(init_th), .extra_miss,
    .inv_threshold(th), .extra_miss_count(cnt), .interval_end(iend), .grow, .shrink);

  always #5 clk = ~clk;

  // Called at the falling edge inside cycle 0 of an interval: drives 'n' extra misses in
  // the first n cycles, checks that the interval ends after exactly INTERVAL cycles with
  // the count n, checks the threshold after the decision and returns at the falling edge
  // inside cycle 0 of the next interval.
  task automatic run_interval(input int n, input int exp_th_after);
    int c = 0;
    forever begin
      extra_miss = (c < n);
      if (iend) break;
      @(negedge clk);
      c++;
    end
    extra_miss = 0;
    checks += 2;
    if (c != INTERVAL - 1) begin failures++; $display("FAIL interval of %0d cycles", c + 1); end
    if (cnt != 16'(n)) begin failures++; $display("FAIL count %0d expected %0d", cnt, n); end
    if (grow) n_grow++;
    if (shrink) n_shrink++;
    @(posedge clk);
    #1;
    checks++;
    if (th != TH_W'(exp_th_after)) begin
      failures++;
      $display("FAIL after %0d misses threshold %0d expected %0d", n, th, exp_th_after);
    end
    @(negedge clk);
  endtask

  initial begin
    int e;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (th != TH_W'(1000)) failures++;
    enable = 1;
    run_interval(25, 2000);  // more than MAX_TH: double
    run_interval(15, 2000);  // in between: keep
    run_interval(3, 1000);   // fewer than MIN_TH: halve
    run_interval(20, 1000);  // equal to MAX_TH: keep (strictly more is needed)
    run_interval(10, 1000);  // equal to MIN_TH: keep
    // halve down to the floor: 500 250 125 62 31 15, then 7 < FLOOR is refused
    e = 1000;
    for (int k = 0; k < 7; k++) begin
      if ((e >> 1) >= FLOOR) e = e >> 1;
      run_interval(0, e);
    end
    checks++;
    if (e != 15) failures++;
    // disabling reloads the start value
    enable = 0;
    init_th = TH_W'(3000);
    @(negedge clk);
    checks++;
    if (th != TH_W'(3000)) begin failures++; $display("FAIL reload %0d", th); end
    enable = 1;
    run_interval(30, 6000);  // 3000 -> 6000
    run_interval(30, 6000);  // 12000 would pass the ceiling: kept
    checks += 2;
    if (n_grow == 0) failures++;
    if (n_shrink == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

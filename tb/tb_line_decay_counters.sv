// tb_line_decay_counters: drives random ticks and touches on 16 lines and compares the
// 'expired' vector each cycle with a reference count of ticks since each line's last
// touch (expired once that count reaches 7); also checks clear_all.
module tb_line_decay_counters;
  localparam int unsigned N = 16;
  logic clk = 0, rst_n = 0, tick = 0, clear_all = 0, touch = 0;
  logic [$clog2(N)-1:0] touch_idx = '0;
  logic [N-1:0] expired;
  int ref_cnt [N];
  int checks = 0, failures = 0, n_expired_seen = 0;

  line_decay_counters #(.NLINES(N)) dut (.clk, .rst_n, .tick, .clear_all, .touch, .touch_idx, .expired);

  always #5 clk = ~clk;

  task automatic compare();
    for (int i = 0; i < N; i++) begin
      checks++;
      if (expired[i] !== (ref_cnt[i] >= 7)) begin
        failures++;
        $display("FAIL line %0d expired=%b ticks since touch=%0d", i, expired[i], ref_cnt[i]);
      end
      if (expired[i]) n_expired_seen++;
    end
  endtask

  initial begin
    foreach (ref_cnt[i]) ref_cnt[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      compare();
      tick      = ($urandom % 4) == 0;
      touch     = ($urandom % 3) == 0;
      touch_idx = $urandom % N;
      clear_all = (c == 2000);
      @(posedge clk);
      for (int i = 0; i < N; i++) begin
        if (clear_all || (touch && touch_idx == i)) ref_cnt[i] = 0;
        else if (tick) ref_cnt[i]++;
      end
    end
    @(negedge clk);
    compare();
    checks++;
    if (n_expired_seen == 0) begin
      failures++;
      $display("FAIL no line ever expired");
    end
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

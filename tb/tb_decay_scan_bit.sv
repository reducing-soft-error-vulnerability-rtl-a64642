// tb_decay_scan_bit: random scan steps and touches on 16 lines, compared every cycle with
// a reference model of the round-robin one-bit scan (pointer, scanned bit, expired mark);
// also checks clear_all and that some line does get marked.
module tb_decay_scan_bit;
  localparam int unsigned N = 16;
  logic clk = 0, rst_n = 0, step = 0, clear_all = 0, touch = 0;
  logic [$clog2(N)-1:0] touch_idx = '0;
  logic [N-1:0] expired;
  bit ref_scanned [N];
  bit ref_exp [N];
  int ref_ptr = 0;
  int checks = 0, failures = 0, n_marked = 0;

  decay_scan_bit #(.NLINES(N)) dut (.clk, .rst_n, .step, .clear_all, .touch, .touch_idx, .expired);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < N; i++) begin ref_scanned[i] = 0; ref_exp[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        checks++;
        if (expired[i] !== ref_exp[i]) begin
          failures++;
          $display("FAIL cycle %0d line %0d expired=%b expected %b", c, i, expired[i], ref_exp[i]);
        end
        if (expired[i]) n_marked++;
      end
      step      = ($urandom % 2) == 0;
      touch     = ($urandom % 6) == 0;
      touch_idx = $urandom % N;
      clear_all = (c == 3000);
      @(posedge clk);
      if (clear_all) begin
        for (int i = 0; i < N; i++) begin ref_scanned[i] = 0; ref_exp[i] = 0; end
        ref_ptr = 0;
      end else begin
        if (step) begin
          if (!(touch && touch_idx == ref_ptr)) begin
            if (ref_scanned[ref_ptr]) ref_exp[ref_ptr] = 1;
            else ref_scanned[ref_ptr] = 1;
          end
          ref_ptr = (ref_ptr + 1) % N;
        end
        if (touch) begin
          ref_scanned[touch_idx] = 0;
          ref_exp[touch_idx] = 0;
        end
      end
    end
    checks++;
    if (n_marked == 0) begin failures++; $display("FAIL no line was ever marked"); end
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

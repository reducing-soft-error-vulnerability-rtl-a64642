// tb_decay_tick_gen: measures the spacing of decay ticks for several inv_threshold
// values (1000 -> 125 cycles, 1500 -> 187, 50 -> 6, 4 -> 1) and checks that a disabled
// prescaler stays silent.
module tb_decay_tick_gen;
  import decay_pkg::*;
  logic clk = 0, rst_n = 0, enable = 0, tick;
  logic [TH_W-1:0] th;
  int checks = 0, failures = 0;
  int cyc = 0;

  decay_tick_gen dut (.clk, .rst_n, .enable, .inv_threshold(th), .tick);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic measure(input int thv, input int expect_period);
    int last, n;
    th = TH_W'(thv);
    enable = 1;
    // let the new period settle
    repeat (2) @(posedge clk iff tick);
    last = cyc;
    n = 0;
    repeat (5) begin
      @(posedge clk iff tick);
      checks++;
      if (cyc - last != expect_period) begin
        failures++;
        $display("FAIL th=%0d spacing %0d expected %0d", thv, cyc - last, expect_period);
      end
      last = cyc;
    end
  endtask

  initial begin
    th = TH_W'(1000);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // disabled: no tick over 300 cycles
    repeat (300) begin
      @(posedge clk);
      checks++;
      if (tick) failures++;
    end
    measure(1000, 125);
    measure(1500, 187);
    measure(50, 6);
    measure(4, 1);
    measure(1000, 125);
    enable = 0;
    @(posedge clk);
    repeat (200) begin
      @(posedge clk);
      checks++;
      if (tick) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

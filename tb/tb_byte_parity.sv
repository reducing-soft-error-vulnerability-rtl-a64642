// tb_byte_parity: checks the per-byte parity generator against bit counts.
// Random 64-byte lines and walking-one patterns; the expected bit is 1 when a byte holds
// an odd number of ones, counted bit by bit in the testbench.
module tb_byte_parity;
  localparam int unsigned NB = 64;
  logic [NB*8-1:0] data;
  logic [NB-1:0]   par;
  int checks = 0, failures = 0;

  byte_parity #(.NBYTES(NB)) dut (.data, .par);

  function automatic logic odd_ones(input logic [7:0] b);
    int n = 0;
    for (int i = 0; i < 8; i++) if (b[i]) n++;
    return (n % 2) == 1;
  endfunction

  task automatic check_now();
    #1;
    for (int i = 0; i < NB; i++) begin
      checks++;
      if (par[i] !== odd_ones(data[i*8 +: 8])) begin
        failures++;
        $display("FAIL byte %0d data %02h par %b", i, data[i*8 +: 8], par[i]);
      end
    end
  endtask

  initial begin
    data = '0; check_now();
    data = '1; check_now();
    for (int k = 0; k < NB*8; k += 37) begin data = '0; data[k] = 1'b1; check_now(); end
    for (int r = 0; r < 200; r++) begin
      for (int w = 0; w < NB/4; w++) data[w*32 +: 32] = $urandom;
      check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// l2_model: behavioural stand-in for the unified L2 behind the write-through L1.
//
// Not synthesizable logic: a sparse memory of 64-bit words held in an associative array.
// A word never written reads as init_word(addr), a fixed function of its address, so a
// testbench can predict any value without preloading. Requests use a valid/ready
// handshake (ready is always high). A line read returns the whole line on resp_valid
// LATENCY cycles after it is accepted; a word write is applied with its byte enables at
// the accepting edge. It counts the reads and writes it served.
module l2_model
  import decay_pkg::*;
#(
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned LATENCY    = 12
) (
  input  logic                   clk,
  input  logic                   req_valid,
  output logic                   req_ready,
  input  logic                   req_we,
  input  logic [ADDR_W-1:0]      req_addr,
  input  logic [WORD_W-1:0]      req_wdata,
  input  logic [WORD_BYTES-1:0]  req_be,
  output logic                   resp_valid,
  output logic [LINE_BYTES*8-1:0] resp_line,
  output int unsigned            n_reads,
  output int unsigned            n_writes
);
  localparam int unsigned WPL = LINE_BYTES / WORD_BYTES;

  logic [WORD_W-1:0] mem [logic [ADDR_W-1:0]];

  function automatic logic [WORD_W-1:0] init_word(input logic [ADDR_W-1:0] a);
    return {a ^ 32'h5A5A_0000, ~a * 32'd2654435761};
  endfunction

  function automatic logic [WORD_W-1:0] peek(input logic [ADDR_W-1:0] a);
    logic [ADDR_W-1:0] wa;
    wa = {a[ADDR_W-1:3], 3'b000};
    return mem.exists(wa) ? mem[wa] : init_word(wa);
  endfunction

  assign req_ready = 1'b1;

  int unsigned       wait_cnt;
  logic              busy;
  logic [ADDR_W-1:0] rd_addr;

  initial begin
    busy = 0; resp_valid = 0; n_reads = 0; n_writes = 0; wait_cnt = 0; resp_line = '0;
    rd_addr = '0;
  end

  always @(posedge clk) begin
    resp_valid <= 1'b0;
    if (busy) begin
      if (wait_cnt <= 1) begin
        for (int w = 0; w < WPL; w++)
          resp_line[w*WORD_W +: WORD_W] <= peek(rd_addr + ADDR_W'(w * WORD_BYTES));
        resp_valid <= 1'b1;
        busy <= 1'b0;
      end else begin
        wait_cnt <= wait_cnt - 1;
      end
    end
    if (req_valid && req_ready) begin
      if (req_we) begin
        logic [WORD_W-1:0] w;
        w = peek(req_addr);
        for (int b = 0; b < WORD_BYTES; b++) if (req_be[b]) w[b*8 +: 8] = req_wdata[b*8 +: 8];
        mem[{req_addr[ADDR_W-1:3], 3'b000}] = w;
        n_writes <= n_writes + 1;
      end else begin
        busy     <= 1'b1;
        rd_addr  <= req_addr;
        wait_cnt <= LATENCY;
        n_reads  <= n_reads + 1;
      end
    end
  end
endmodule

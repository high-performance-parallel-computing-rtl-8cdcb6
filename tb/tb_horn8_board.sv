// tb_horn8_board: the whole board, end to end, with 7 calculation nodes of
// 16 pixel units each. A host model drives the board's DMA streams:
// it broadcasts the object points and the point count, gives every node its
// own line offset (node k computes lines k-1, k-1+7, ...), broadcasts RUN and
// collects the result and DONE words. Two jobs run:
//   1: N = 20 points, host always ready: must run at one pass per N clocks;
//   2: N = 10 < UNITS points, host often not ready: passes padded with
//      bubbles, ring back-pressure and pipeline stalls.
// Every pixel is checked against the reference. Counted, and required to
// happen at least once: broadcast deliveries, addressed deliveries, bubble
// cycles, stall cycles, ring back-pressure, results sent while a node is
// still computing (transfer hidden behind calculation) and DONE words.
module tb_horn8_board;
  import horn8_pkg::*;
  import horn8_ref_pkg::*;

  localparam int N_CALC = 7;
  localparam int UNITS  = 16;
  localparam int DEPTH  = 1024;
  localparam int WIDTH  = 48;    // pixels per line: 3 segments
  localparam int LINES  = 14;    // 2 lines per node
  localparam int Y0     = 0;
  localparam int SAMPLE = 1;
  localparam int MAX_CYCLES = 400000;
  localparam int JOB1_N = 20, JOB1_PCT = 100;
  localparam int JOB2_N = 10, JOB2_PCT = 20;
  localparam bit CHECK_BUBBLE = 1, CHECK_STALL = 1;

  logic clk = 0, rst_n = 0;
  logic host_in_valid = 0, host_in_ready;
  logic [63:0] host_in_data = '0;
  logic host_out_valid, host_out_ready = 1;
  logic [63:0] host_out_data;
  logic [N_CALC-1:0] node_busy;
  int checks = 0, failures = 0;
  int cycle = 0;

  horn8_board #(.N_CALC(N_CALC), .UNITS(UNITS), .DEPTH(DEPTH)) dut (.*);

`include "horn8_board_host.svh"

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

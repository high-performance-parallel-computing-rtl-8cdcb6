// tb_horn8_board_full: the board at its full size (7 nodes x 640 pixel
// units, 65,536-point memories), end to end. Same host model and checks as
// tb_horn8_board, on a 1,920-pixel-wide hologram strip of 14 lines (each
// node computes two lines of three 640-pixel segments):
//   1: N = 700 points, host always ready: full-rate passes of N clocks;
//   2: N = 12 points, host rarely ready: bubbles, stalls, back-pressure.
module tb_horn8_board_full;
  import horn8_pkg::*;
  import horn8_ref_pkg::*;

  localparam int N_CALC = 7;
  localparam int UNITS  = 640;
  localparam int WIDTH  = 1920;
  localparam int LINES  = 14;
  localparam int Y0     = 0;
  localparam int SAMPLE = 1;
  localparam int MAX_CYCLES = 200000;
  localparam int JOB1_N = 700, JOB1_PCT = 100;
  localparam int JOB2_N = 12, JOB2_PCT = 5;
  localparam bit CHECK_BUBBLE = 1, CHECK_STALL = 1;

  logic clk = 0, rst_n = 0;
  logic host_in_valid = 0, host_in_ready;
  logic [63:0] host_in_data = '0;
  logic host_out_valid, host_out_ready = 1;
  logic [63:0] host_out_data;
  logic [N_CALC-1:0] node_busy;
  int checks = 0, failures = 0;
  int cycle = 0;

  horn8_board dut (.*);

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

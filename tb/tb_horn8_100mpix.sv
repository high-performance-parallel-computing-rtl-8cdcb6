// tb_horn8_100mpix: a slice of the 10^8-pixel workload at full board size:
// 7,877 object points into 9,600-pixel lines (15 segments of 640), for the
// top 14 lines of a 10,800-line hologram, so that the 14-bit Y counter runs
// up to line 10,799 and X wraps from the end of one line to the next. Every
// fifth result word is checked against the reference, and the job must take
// 30 passes x 7,877 clocks plus latency.
module tb_horn8_100mpix;
  import horn8_pkg::*;
  import horn8_ref_pkg::*;

  localparam int N_CALC = 7;
  localparam int UNITS  = 640;
  localparam int WIDTH  = 9600;
  localparam int LINES  = 14;
  localparam int Y0     = 10786;
  localparam int SAMPLE = 5;
  localparam int MAX_CYCLES = 400000;
  localparam int JOB1_N = 7877, JOB1_PCT = 100;
  localparam int JOB2_N = 0, JOB2_PCT = 100;
  localparam bit CHECK_BUBBLE = 0, CHECK_STALL = 0;

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

// tb_horn8_table1: the single-board benchmark workload at full board size:
// 10,000 object points into 1,920-pixel lines, the hologram width and point
// count of the standard LCD benchmark. Seven lines (one per node, three
// 640-pixel segments each) of the 1,080 are computed and every pixel is
// checked; the job must take 3 x 10,000 clocks plus latency, the rate that
// gives 18.5 ms for the whole 1,920 x 1,080 frame at 250 MHz.
module tb_horn8_table1;
  import horn8_pkg::*;
  import horn8_ref_pkg::*;

  localparam int N_CALC = 7;
  localparam int UNITS  = 640;
  localparam int WIDTH  = 1920;
  localparam int LINES  = 7;
  localparam int Y0     = 0;
  localparam int SAMPLE = 1;
  localparam int MAX_CYCLES = 100000;
  localparam int JOB1_N = 10000, JOB1_PCT = 100;
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

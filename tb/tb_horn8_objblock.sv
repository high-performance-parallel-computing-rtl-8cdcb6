// tb_horn8_objblock: one object block at the memory's full capacity,
// 65,536 points, as used when a 10^7-point object is split into blocks of
// about 65,000 points. Each node computes one 640-pixel segment; every fifth
// result word is checked, and the pass must take 65,536 clocks plus latency.
module tb_horn8_objblock;
  import horn8_pkg::*;
  import horn8_ref_pkg::*;

  localparam int N_CALC = 7;
  localparam int UNITS  = 640;
  localparam int WIDTH  = 640;
  localparam int LINES  = 7;
  localparam int Y0     = 0;
  localparam int SAMPLE = 5;
  localparam int MAX_CYCLES = 500000;
  localparam int JOB1_N = 65536, JOB1_PCT = 100;
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

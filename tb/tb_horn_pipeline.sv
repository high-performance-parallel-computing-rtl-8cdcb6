// tb_horn_pipeline: a short pixel pipeline (24 units) against the reference.
// Each pass streams N random object points into the BPU, one per clock, for
// a random segment origin. Every pixel is compared with the closed-form
// reference, and the end of the pass (the last flag leaving the final unit)
// must come exactly UNITS + 2 clocks after the edge that took the last point.
// A second group of passes inserts stall cycles, which must only delay it.
module tb_horn_pipeline;
  import horn8_pkg::*;
  import horn8_ref_pkg::*;

  localparam int UNITS = 24;

  logic clk = 0, rst_n = 0, en = 1;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [13:0] xa = 0, ya = 0;
  obj_point_t  point = '0;
  logic [UNITS-1:0] pix;
  phase_bus_t  tail;
  int checks = 0, failures = 0;
  int cycle = 0;

  horn_pipeline #(.UNITS(UNITS)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    obj_point_t pts[$];
    int n, t_last, stalls;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int pass = 0; pass < 40; pass++) begin
      pts = {};
      stalls = 0;
      n = $urandom_range(30, 1);
      @(negedge clk);
      xa = 14'($urandom_range(16000)); ya = 14'($urandom_range(16000));
      for (int i = 0; i < n; i++) begin
        obj_point_t p;
        p = rand_point(16383, 16383);
        pts.push_back(p);
        en = 1; in_valid = 1; in_first = (i == 0); in_last = (i == n - 1); point = p;
        @(negedge clk);
      end
      t_last = cycle;     // the edge that took the last point is number t_last
      in_valid = 0; in_first = 0; in_last = 0;
      while (!(tail.valid && tail.last)) begin
        if (pass >= 20 && $urandom_range(2) == 0) begin
          en = 0; stalls++;
        end else en = 1;
        @(negedge clk);
      end
      en = 1;
      checks++;
      if (cycle - t_last != 3 + UNITS - 1 + stalls) begin
        failures++;
        $display("pass %0d: latency %0d expected %0d", pass, cycle - t_last,
                 3 + UNITS - 1 + stalls);
      end
      for (int k = 0; k < UNITS; k++) begin
        checks++;
        if (pix[k] !== ref_pixel(xa, ya, k, pts)) begin
          failures++;
          $display("pass %0d pixel %0d: %b expected %b", pass, k, pix[k],
                   ref_pixel(xa, ya, k, pts));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bpu: the basic processing unit against the closed-form phases.
// Random object points and segment origins are streamed in, one per clock,
// with occasional stall cycles. Each output is checked against Theta_1,
// Gamma_1 and 2*Delta computed from the formula, exactly four enabled clocks
// after its input (the unit's latency), and after each pass pixel 1 is
// checked against the reference sum.
module tb_bpu;
  import horn8_pkg::*;
  import horn8_ref_pkg::*;

  localparam int LAT = 4;

  logic clk = 0, rst_n = 0, en = 1;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [13:0] xa = 0, ya = 0;
  obj_point_t  point = '0;
  phase_bus_t  out;
  logic        pix;
  int checks = 0, failures = 0;

  bpu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected outputs, in issue order, with the enabled-cycle number at which
  // they must appear
  typedef struct { int due; logic first, last; logic [20:0] th, ga, d2; } exp_t;
  exp_t exp_q[$];
  int   en_cycles = 0;

  logic en_last = 0;   // the last clock edge was enabled: outputs are new

  always @(posedge clk) begin
    en_last <= en;
    if (rst_n && en) en_cycles++;
  end

  always @(negedge clk) begin
    if (rst_n && en_last && out.valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        exp_t e;
        e = exp_q.pop_front();
        if (e.due != en_cycles) begin
          failures++;
          $display("output at enabled cycle %0d, expected at %0d", en_cycles, e.due);
        end
        if (out.theta !== e.th || out.gamma !== e.ga || out.delta2 !== e.d2 ||
            out.first !== e.first || out.last !== e.last) begin
          failures++;
          $display("mismatch: th %h/%h ga %h/%h d2 %h/%h", out.theta, e.th,
                   out.gamma, e.ga, out.delta2, e.d2);
        end
      end
    end
  end

  initial begin
    obj_point_t pts[$];
    int n;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int pass = 0; pass < 30; pass++) begin
      pts = {};
      n = $urandom_range(25, 1);
      @(negedge clk);
      xa = 14'($urandom); ya = 14'($urandom);
      for (int i = 0; i < n; i++) begin
        obj_point_t p;
        p = (pass < 3) ? rand_point(200, 200) : rand_point(16383, 16383);
        pts.push_back(p);
        while ($urandom_range(4) == 0) begin   // stall
          en = 0; in_valid = 1'b1; point = rand_point(100, 100);
          @(negedge clk);
        end
        en = 1; in_valid = 1; in_first = (i == 0); in_last = (i == n - 1); point = p;
        exp_q.push_back('{due: en_cycles + LAT, first: in_first, last: in_last,
                          th: ref_theta(xa, ya, p, 0), ga: ref_gamma(xa, p),
                          d2: p.delta[30:10]});
        @(negedge clk);
      end
      in_valid = 0;
      repeat (LAT + 1) @(negedge clk);
      checks++;
      if (pix !== ref_pixel(xa, ya, 0, pts)) begin
        failures++;
        $display("pass %0d: pix %b expected %b", pass, pix, ref_pixel(xa, ya, 0, pts));
      end
    end
    repeat (10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d outputs never appeared", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

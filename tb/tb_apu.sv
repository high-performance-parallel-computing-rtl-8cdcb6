// tb_apu: one additional processing unit.
// Random phase buses are applied with occasional stalls; after each enabled
// clock the outgoing bus must hold Theta+Gamma, Gamma+2*Delta, 2*Delta and
// the same flags, and at the end of each pass the pixel must equal the sign
// of the sum of the reference cosines of Theta+Gamma.
module tb_apu;
  import horn8_pkg::*;
  import horn8_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 1;
  phase_bus_t in = '0, out;
  logic pix;
  int checks = 0, failures = 0;

  apu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    phase_bus_t  prev;
    logic [20:0] th;
    logic [17:0] sum;
    int n;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int pass = 0; pass < 100; pass++) begin
      n = $urandom_range(30, 1);
      sum = '0;
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        // a stalled cycle: the output must not move
        if ($urandom_range(3) == 0) begin
          prev = out;
          en = 0; in = phase_bus_t'({$urandom, $urandom, $urandom});
          @(negedge clk);
          checks++;
          if (out !== prev) begin
            failures++;
            $display("output changed during a stall");
          end
        end
        en = 1;
        in.valid = 1; in.first = (i == 0); in.last = (i == n - 1);
        in.theta = 21'($urandom); in.gamma = 21'($urandom); in.delta2 = 21'($urandom);
        th  = in.theta + in.gamma;
        sum = sum + 18'(ref_cos(th[20:15]));
        @(negedge clk);
        checks++;
        if (out.theta !== th || out.gamma !== 21'(in.gamma + in.delta2) ||
            out.delta2 !== in.delta2 || out.valid !== 1'b1 ||
            out.first !== in.first || out.last !== in.last) begin
          failures++;
          $display("pass %0d point %0d: bus mismatch", pass, i);
        end
        in.valid = 0;
      end
      checks++;
      if (pix !== sum[17]) begin
        failures++;
        $display("pass %0d: pix %b expected %b", pass, pix, sum[17]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

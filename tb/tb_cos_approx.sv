// tb_cos_approx: exhaustive check of the 6-bit triangle cosine.
// Every one of the 64 arguments is compared with the closed form
// 31 - 2*min(t, 63 - t), and with 31*cos(2*pi*(t+0.5)/64) to within 7 LSB
// (the largest distance between a triangle and a cosine of equal peak).
module tb_cos_approx;
  import horn8_pkg::*;
  import horn8_ref_pkg::*;

  logic [5:0]        phase;
  logic signed [5:0] value;
  int checks = 0, failures = 0;

  cos_approx dut (.phase, .value);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ideal;
    int  sum = 0;
    for (int t = 0; t < 64; t++) begin
      phase = 6'(t);
      #1;
      checks++;
      if (int'(value) != ref_cos(phase)) begin
        failures++;
        $display("t=%0d value=%0d expected=%0d", t, value, ref_cos(phase));
      end
      ideal = 31.0 * $cos(2.0 * 3.14159265358979 * (real'(t) + 0.5) / 64.0);
      checks++;
      if (real'(value) - ideal > 7.0 || ideal - real'(value) > 7.0) begin
        failures++;
        $display("t=%0d value=%0d far from cosine %f", t, value, ideal);
      end
      sum += int'(value);
    end
    checks++;
    if (sum != 0) begin
      failures++;
      $display("period sum %0d, expected 0", sum);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pixel_acc: random passes through one cosine/accumulator unit.
// Passes of 1..40 points, with random idle and stall cycles, are fed in;
// after every accepted point the sum is compared with a model, and after
// every pass the latched pixel with the model's sign bit.
module tb_pixel_acc;
  import horn8_pkg::*;
  import horn8_ref_pkg::*;

  logic clk = 0, rst_n = 0, en, valid, first, last;
  logic [5:0]  phase;
  logic [17:0] acc;
  logic        pix;
  int checks = 0, failures = 0;
  int cycles = 0;

  pixel_acc dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [17:0] model;
    logic        model_pix;
    int n;
    en = 1; valid = 0; first = 0; last = 0; phase = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    model = '0;
    model_pix = 0;
    for (int pass = 0; pass < 200; pass++) begin
      n = $urandom_range(40, 1);
      for (int i = 0; i < n; i++) begin
        // stall and idle cycles must change nothing
        while ($urandom_range(3) == 0) begin
          @(negedge clk);
          en = 1'($urandom_range(1));
          valid = ~en;                       // a stalled point, or a bubble
          first = $urandom_range(1); last = $urandom_range(1); phase = 6'($urandom);
        end
        @(negedge clk);
        en = 1; valid = 1; first = (i == 0); last = (i == n - 1);
        phase = (pass % 7 == 0) ? 6'd0 : 6'($urandom);   // some coherent passes
        model = first ? 18'(ref_cos(phase)) : model + 18'(ref_cos(phase));
        if (last) model_pix = model[17];
        @(posedge clk); #1;
        checks++;
        if (acc != model) begin
          failures++;
          $display("pass %0d point %0d: acc=%h expected %h", pass, i, acc, model);
        end
      end
      checks++;
      if (pix != model_pix) begin
        failures++;
        $display("pass %0d: pix=%b expected %b", pass, pix, model_pix);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_calc_module: one calculation node (16 pixel units, 256-point memory).
// Ring words are driven straight into the node. Three jobs run:
//   A: N = 5 < UNITS points, 4 passes over two 16-pixel segments per line:
//      every pass must be padded with bubbles to UNITS clocks;
//   B: N = 40 points, 6 passes, host always ready: results must leave one
//      pass every N clocks (the pipeline's full rate) with no stall;
//   C: N = 20 points, 6 passes, host rarely ready: the pipeline must stall
//      and still produce the same pixels.
// Every pixel of every pass is compared with the reference, the segment
// order (X wraps at the line width, Y advances by the line step) is checked
// through the results' pass tags, and each job must end with one DONE word.
module tb_calc_module;
  import horn8_pkg::*;
  import horn8_ref_pkg::*;

  localparam int UNITS = 16;
  localparam int DEPTH = 256;
  localparam logic [2:0] ME = 3'd3;

  logic clk = 0, rst_n = 0;
  logic rx_valid = 0, tx_valid, tx_ready = 1, busy;
  ring_word_t rx_word = '0, tx_word;
  int checks = 0, failures = 0;
  int cycle = 0, stall_cycles = 0, bubble_cycles = 0;

  calc_module #(.UNITS(UNITS), .DEPTH(DEPTH), .NODE_ID(ME)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle++;
    if (!dut.en) stall_cycles++;
    if (dut.pass_active && !dut.issue_valid && dut.en) bubble_cycles++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input ring_op_e op, input logic [15:0] tag, input logic [63:0] data);
    @(negedge clk);
    rx_valid = 1; rx_word = '{op: op, node: ME, tag: tag, data: data};
    @(negedge clk);
    rx_valid = 0;
  endtask

  // run one job and check it; ready_pct = how often the host is ready
  task automatic job(input int n, input int passes, input int width, input int x0,
                     input int y0, input int ystep, input int ready_pct, input bit rate_check);
    obj_point_t pts[$];
    int got = 0, xa, ya, t_prev, t_start;
    bit done = 0;
    for (int i = 0; i < n; i++) begin
      obj_point_t p;
      p = rand_point(300, 300);
      pts.push_back(p);
      send(OP_OBJ, 16'(i), 64'(p));
    end
    send(OP_CFG, CFG_NOBJ, 64'(n));
    send(OP_CFG, CFG_START, {34'd0, 14'(y0), 2'd0, 14'(x0)});
    send(OP_CFG, CFG_GEOM, {32'(passes), 2'd0, 14'(ystep), 1'b0, 15'(width)});
    send(OP_RUN, 16'd0, 64'd0);
    t_start = cycle;
    t_prev = -1;
    xa = x0; ya = y0;
    while (!done) begin
      @(negedge clk);
      tx_ready = ($urandom_range(99) < ready_pct);
      @(posedge clk);
      if (tx_valid && tx_ready) begin
        if (tx_word.op == OP_RES) begin
          checks++;
          if (tx_word.node != ME || int'(tx_word.tag[15:4]) != got || tx_word.tag[3:0] != 0) begin
            failures++;
            $display("result tag %h, expected pass %0d", tx_word.tag, got);
          end
          for (int k = 0; k < 64; k++) begin
            logic e;
            e = (k < UNITS) ? ref_pixel(14'(xa), 14'(ya), k, pts) : 1'b0;
            checks++;
            if (tx_word.data[k] !== e) begin
              failures++;
              $display("n=%0d pass %0d pixel %0d: %b expected %b", n, got, k,
                       tx_word.data[k], e);
            end
          end
          if (rate_check && t_prev >= 0) begin
            checks++;
            if (cycle - t_prev != n) begin
              failures++;
              $display("passes %0d clocks apart, expected %0d", cycle - t_prev, n);
            end
          end
          t_prev = cycle;
          got++;
          xa += UNITS;
          if (xa >= width) begin xa = 0; ya += ystep; end
        end else if (tx_word.op == OP_DONE) begin
          checks++;
          if (got != passes || int'(tx_word.tag) != passes) begin
            failures++;
            $display("DONE after %0d passes, tag %0d, expected %0d", got, tx_word.tag, passes);
          end
          done = 1;
        end
      end
    end
    $display("job n=%0d passes=%0d took %0d clocks", n, passes, cycle - t_start);
    @(negedge clk);
    tx_ready = 1;
    @(negedge clk);
    checks++;
    if (busy) begin
      failures++;
      $display("node still busy after DONE");
    end
  endtask

  initial begin
    int s0, b0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    b0 = bubble_cycles;
    job(5, 4, 32, 0, 5, 3, 100, 0);
    checks++;
    if (bubble_cycles - b0 != 4 * (UNITS - 5)) begin
      failures++;
      $display("bubbles %0d, expected %0d", bubble_cycles - b0, 4 * (UNITS - 5));
    end
    s0 = stall_cycles;
    job(40, 6, 48, 16, 100, 7, 100, 1);
    checks++;
    if (stall_cycles != s0) begin
      failures++;
      $display("unexpected stalls with the host always ready");
    end
    job(20, 6, 16, 0, 9, 2, 4, 0);
    checks++;
    if (stall_cycles == s0) begin
      failures++;
      $display("no stall happened under back-pressure");
    end
    $display("stall cycles %0d, bubble cycles %0d", stall_cycles, bubble_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

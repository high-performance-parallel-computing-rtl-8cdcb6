// Host model and checker shared by the board testbenches. The including
// module declares the board's ports, N_CALC, UNITS, WIDTH, LINES,
// MAX_CYCLES, the two jobs (JOBx_N points, host ready JOBx_PCT percent of
// the clocks; JOB2_N = 0 skips the second) and which mechanisms must occur,
// Y0 (first line), SAMPLE (check every SAMPLE-th result word, 1 = all) and
// instantiates the board as `dut`. WIDTH must be a multiple of UNITS and
// LINES of N_CALC.

  always #2 clk = ~clk;
  always @(posedge clk) cycle++;


  // ---------------------------------------------------------------- events
  int ev_bcast = 0, ev_addr = 0, ev_bubble = 0, ev_stall = 0, ev_ring_bp = 0;
  int ev_overlap = 0, ev_done = 0;
  logic [N_CALC-1:0] node_en, node_bubble, node_rx_b, node_rx_a, node_overlap;

  for (genvar k = 1; k <= N_CALC; k++) begin : g_mon
    assign node_en[k-1]      = dut.g_node[k].u_calc.en;
    assign node_bubble[k-1]  = dut.g_node[k].u_calc.pass_active &&
                               !dut.g_node[k].u_calc.issue_valid && node_en[k-1];
    assign node_rx_b[k-1]    = dut.g_node[k].rx_valid && dut.g_node[k].rx_word.node == 3'd0;
    assign node_rx_a[k-1]    = dut.g_node[k].rx_valid && dut.g_node[k].rx_word.node != 3'd0;
    assign node_overlap[k-1] = dut.g_node[k].tx_valid && dut.g_node[k].tx_ready &&
                               dut.g_node[k].u_calc.pass_active;
  end

  always @(posedge clk) if (rst_n) begin
    ev_bcast   += $countones(node_rx_b);
    ev_addr    += $countones(node_rx_a);
    ev_bubble  += $countones(node_bubble);
    ev_stall   += N_CALC - $countones(node_en);
    ev_overlap += $countones(node_overlap);
    for (int h = 0; h <= N_CALC; h++)
      if (dut.hop_valid[h] && !dut.hop_ready[h]) ev_ring_bp++;
  end

  // ---------------------------------------------------------------- host
  int ready_pct = 100;

  always @(negedge clk) host_out_ready = ($urandom_range(99) < ready_pct);

  task automatic put(input logic [63:0] w);
    @(negedge clk);
    host_in_valid = 1; host_in_data = w;
    @(posedge clk);
    while (!host_in_ready) @(posedge clk);
    @(negedge clk);
    host_in_valid = 0;
  endtask

  function automatic logic [63:0] hdr(input ring_op_e op, input logic [2:0] node,
                                      input logic [15:0] tag, input logic [16:0] count);
    return {op, node, tag, 1'b0, count, 24'd0};
  endfunction

  task automatic run_job(input int n, input int pct);
    obj_point_t pts[$];
    int passes, words_per_pass, got_words, n_done, n_res;
    int t_run;
    logic [63:0] h;
    logic [2:0] src;
    int pass, widx, node_done[int];
    bit hdr_phase;
    passes = (WIDTH / UNITS) * (LINES / N_CALC);
    words_per_pass = (UNITS + 63) / 64;
    for (int i = 0; i < n; i++) begin
      obj_point_t p;
      p = rand_point(WIDTH + 64, LINES + 64);
      p.y = 14'(int'(p.y) + Y0);
      pts.push_back(p);
    end
    // objects, broadcast
    put(hdr(OP_OBJ, 3'd0, 16'd0, 17'(n)));
    foreach (pts[i]) put(64'(pts[i]));
    put(hdr(OP_CFG, 3'd0, CFG_NOBJ, 17'd0));
    put(64'(n));
    // per node segment assignment
    for (int k = 1; k <= N_CALC; k++) begin
      put(hdr(OP_CFG, 3'(k), CFG_START, 17'd0));
      put({34'd0, 14'(Y0 + k - 1), 16'd0});
      put(hdr(OP_CFG, 3'(k), CFG_GEOM, 17'd0));
      put({32'(passes), 2'd0, 14'(N_CALC), 1'b0, 15'(WIDTH)});
    end
    ready_pct = pct;
    put(hdr(OP_RUN, 3'd0, 16'd0, 17'd0));
    t_run = cycle;
    n_done = 0; n_res = 0; hdr_phase = 1;
    while (n_done < N_CALC) begin
      @(posedge clk);
      if (host_out_valid && host_out_ready) begin
        if (hdr_phase) begin
          h = host_out_data;
          src = h[60:58];
          if (ring_op_e'(h[63:61]) == OP_RES) hdr_phase = 0;
          else if (ring_op_e'(h[63:61]) == OP_DONE) begin
            n_done++;
            ev_done++;
            checks++;
            if (int'(h[57:42]) != passes || node_done.exists(int'(src))) begin
              failures++;
              $display("bad DONE from node %0d (%0d passes)", src, h[57:42]);
            end
            node_done[int'(src)] = 1;
          end else begin
            failures++;
            $display("unexpected host word %h", h);
          end
        end else begin
          int xa, ya, seg;
          hdr_phase = 1;
          n_res++;
          pass = int'(h[57:46]);
          widx = int'(h[45:42]);
          seg  = pass * UNITS;
          xa   = seg % WIDTH;
          ya   = Y0 + int'(src) - 1 + N_CALC * (seg / WIDTH);
          if ((pass * words_per_pass + widx) % SAMPLE == 0)
          for (int b = 0; b < 64; b++) begin
            int k;
            logic e;
            k = widx * 64 + b;
            e = (k < UNITS) ? ref_pixel(14'(xa), 14'(ya), k, pts) : 1'b0;
            checks++;
            if (host_out_data[b] !== e) begin
              failures++;
              if (failures < 20)
                $display("node %0d pass %0d pixel (%0d,%0d): %b expected %b", src, pass,
                         xa + k, ya, host_out_data[b], e);
            end
          end
        end
      end
    end
    checks++;
    if (n_res != N_CALC * passes * words_per_pass) begin
      failures++;
      $display("%0d result words, expected %0d", n_res, N_CALC * passes * words_per_pass);
    end
    $display("job N=%0d: %0d pixels in %0d clocks after RUN", n, N_CALC * passes * UNITS,
             cycle - t_run);
    // full rate: with the host always ready and N >= UNITS, a node needs
    // N clocks per pass plus the pipeline and ring latency once
    if (pct == 100 && n >= UNITS) begin
      checks++;
      if (cycle - t_run < passes * n || cycle - t_run > passes * n + UNITS + 20 * N_CALC * ((UNITS + 63) / 64) + 100) begin
        failures++;
        $display("job took %0d clocks, expected %0d plus latency", cycle - t_run, passes * n);
      end
    end
    ready_pct = 100;
  endtask

  task automatic require(input string what, input int count);
    checks++;
    $display("  %-28s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("  mechanism never exercised: %s", what);
    end
  endtask

  task automatic run_all();
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    run_job(JOB1_N, JOB1_PCT);
    if (JOB2_N > 0) run_job(JOB2_N, JOB2_PCT);
    require("broadcast deliveries", ev_bcast);
    require("addressed deliveries", ev_addr);
    require("DONE words", ev_done);
    // a node sends results while computing only if it has more than one pass
    if ((WIDTH / UNITS) * (LINES / N_CALC) > 1)
      require("results during calculation", ev_overlap);
    if (CHECK_BUBBLE) require("bubble cycles", ev_bubble);
    if (CHECK_STALL) begin
      require("stall cycles", ev_stall);
      require("ring back-pressure", ev_ring_bp);
    end
  endtask

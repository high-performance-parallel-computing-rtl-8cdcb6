// tb_bus_ctrl: one ring node (node 2) under random traffic and back-pressure.
// Random host-to-node and node-to-host words arrive from the ring while the
// node's own FPGA offers result words; the next node and the local receiver
// are randomly not ready. Checked: words for node 2 are taken off and not
// passed on, broadcasts are both delivered and passed on, all other words
// are only passed on, nothing is lost, duplicated or reordered per source,
// and an offered output word never changes before it is taken.
module tb_bus_ctrl;
  import horn8_pkg::*;

  localparam logic [2:0] ME = 3'd2;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic rx_valid, rx_ready = 0, tx_valid = 0, tx_ready;
  ring_word_t in_word = '0, out_word, rx_word, tx_word = '0;
  int checks = 0, failures = 0;
  int n_local = 0, n_bcast = 0, n_pass = 0, n_tx = 0, n_bp = 0;

  bus_ctrl #(.NODE_ID(ME), .SINK_ALL(1'b0)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ring_word_t rand_word(input bit down);
    ring_word_t w;
    w.op   = down ? ring_op_e'($urandom_range(3, 1)) : ring_op_e'($urandom_range(5, 4));
    w.node = 3'($urandom_range(7));
    if ($urandom_range(2) == 0) w.node = ME;
    w.tag  = 16'($urandom);
    w.data = {$urandom, $urandom};
    return w;
  endfunction

  ring_word_t q_ring[$], q_tx[$], q_rx[$];
  int n_in = 0, n_tx_sent = 0;

  // stimulus, changed at the negative edge
  always @(negedge clk) if (rst_n) begin
    out_ready = ($urandom_range(3) != 0);
    rx_ready  = ($urandom_range(4) != 0);
    if (!in_valid && n_in < 3000 && $urandom_range(1)) begin
      in_valid = 1; in_word = rand_word($urandom_range(2) != 0);
    end
    if (!tx_valid && n_tx_sent < 600 && $urandom_range(3) == 0) begin
      tx_valid = 1; tx_word = rand_word(0); tx_word.node = ME;
    end
  end

  ring_word_t held;
  logic       was_stuck = 0;

  always @(posedge clk) if (rst_n) begin
    bit down, mine, bcast;
    // output stability
    if (was_stuck) begin
      checks++;
      if (!out_valid || out_word !== held) begin
        failures++;
        $display("output changed while not taken");
      end
    end
    was_stuck <= out_valid && !out_ready;
    held      <= out_word;
    if (out_valid && !out_ready) n_bp++;
    // ring input
    if (in_valid && in_ready) begin
      down  = is_down_op(in_word.op);
      mine  = down && in_word.node == ME;
      bcast = down && in_word.node == 3'd0;
      if (mine || bcast) q_rx.push_back(in_word);
      if (!mine) q_ring.push_back(in_word);
      if (mine) n_local++; else if (bcast) n_bcast++; else n_pass++;
      n_in++;
      in_valid <= 0;
    end
    if (tx_valid && tx_ready) begin
      q_tx.push_back(tx_word);
      n_tx_sent++;
      tx_valid <= 0;
    end
    // local delivery
    if (rx_valid && rx_ready) begin
      checks++;
      if (q_rx.size() == 0 || rx_word !== q_rx[$]) begin
        failures++;
        $display("unexpected local delivery op=%0d node=%0d", rx_word.op, rx_word.node);
      end else void'(q_rx.pop_back());
    end
    // ring output
    if (out_valid && out_ready) begin
      checks++;
      if (q_ring.size() != 0 && out_word === q_ring[0]) void'(q_ring.pop_front());
      else if (q_tx.size() != 0 && out_word === q_tx[0]) void'(q_tx.pop_front());
      else begin
        failures++;
        $display("unexpected ring output op=%0d node=%0d", out_word.op, out_word.node);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (n_in == 3000 && n_tx_sent == 600);
    repeat (20) @(negedge clk);
    out_ready = 1;
    repeat (10) @(posedge clk);
    checks++;
    if (q_ring.size() || q_tx.size() || q_rx.size()) begin
      failures++;
      $display("words lost: ring %0d tx %0d rx %0d", q_ring.size(), q_tx.size(), q_rx.size());
    end
    checks++;
    if (n_local == 0 || n_bcast == 0 || n_pass == 0 || n_bp == 0) begin
      failures++;
      $display("a case never happened");
    end
    $display("local %0d broadcast %0d passed %0d tx %0d backpressure %0d",
             n_local, n_bcast, n_pass, n_tx_sent, n_bp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

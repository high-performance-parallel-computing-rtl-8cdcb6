// tb_interface_ctrl: the host bridge in both directions.
// Host side: random OBJ bursts (1..20 points), CFG and RUN commands and
// ignored op codes are sent; the ring words produced must carry the right
// op, node, incrementing tags and data, in order. Ring side: RES, DONE and
// returning host-to-node words arrive; the host stream must show a header
// and data word per RES, a header per DONE and nothing for the others.
// Both far ends apply random back-pressure.
module tb_interface_ctrl;
  import horn8_pkg::*;

  logic clk = 0, rst_n = 0;
  logic host_in_valid = 0, host_in_ready;
  logic [63:0] host_in_data = '0;
  logic host_out_valid, host_out_ready = 0;
  logic [63:0] host_out_data;
  logic ring_tx_valid, ring_tx_ready = 0;
  ring_word_t ring_tx_word;
  logic ring_rx_valid = 0, ring_rx_ready;
  ring_word_t ring_rx_word = '0;
  int checks = 0, failures = 0;

  interface_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] host_q[$];      // words to send
  ring_word_t  exp_ring[$];
  logic [63:0] exp_host[$];
  ring_word_t  rx_q[$];

  function automatic logic [63:0] hdr(input ring_op_e op, input logic [2:0] node,
                                      input logic [15:0] tag, input logic [16:0] count);
    return {op, node, tag, 1'b0, count, 24'd0};
  endfunction

  initial begin
    for (int c = 0; c < 150; c++) begin
      logic [2:0] node;
      logic [15:0] tag;
      int kind, n;
      node = 3'($urandom_range(7));
      tag  = 16'($urandom);
      kind = $urandom_range(3);
      if (kind == 0) begin
        n = $urandom_range(20, 1);
        host_q.push_back(hdr(OP_OBJ, node, tag, 17'(n)));
        for (int i = 0; i < n; i++) begin
          logic [63:0] d;
          d = {$urandom, $urandom};
          host_q.push_back(d);
          exp_ring.push_back('{op: OP_OBJ, node: node, tag: 16'(tag + 16'(i)), data: d});
        end
      end else if (kind == 1) begin
        logic [63:0] d;
        d = {$urandom, $urandom};
        host_q.push_back(hdr(OP_CFG, node, tag, 17'd0));
        host_q.push_back(d);
        exp_ring.push_back('{op: OP_CFG, node: node, tag: tag, data: d});
      end else if (kind == 2) begin
        host_q.push_back(hdr(OP_RUN, node, tag, 17'd0));
        exp_ring.push_back('{op: OP_RUN, node: node, tag: tag, data: 64'd0});
      end else begin
        host_q.push_back(hdr(OP_RES, node, tag, 17'd5));   // not a host command
      end
    end
    for (int c = 0; c < 300; c++) begin
      ring_word_t w;
      w.op = ring_op_e'($urandom_range(5, 1)); w.node = 3'($urandom_range(7));
      w.tag = 16'($urandom); w.data = {$urandom, $urandom};
      rx_q.push_back(w);
      if (w.op == OP_RES || w.op == OP_DONE) exp_host.push_back({w.op, w.node, w.tag, 42'd0});
      if (w.op == OP_RES) exp_host.push_back(w.data);
    end
  end

  always @(negedge clk) if (rst_n) begin
    ring_tx_ready  = ($urandom_range(3) != 0);
    host_out_ready = ($urandom_range(3) != 0);
    if (!host_in_valid && host_q.size() && $urandom_range(3) != 0) begin
      host_in_valid = 1; host_in_data = host_q.pop_front();
    end
    if (!ring_rx_valid && rx_q.size() && $urandom_range(1)) begin
      ring_rx_valid = 1; ring_rx_word = rx_q.pop_front();
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (host_in_valid && host_in_ready) host_in_valid <= 0;
    if (ring_rx_valid && ring_rx_ready) ring_rx_valid <= 0;
    if (ring_tx_valid && ring_tx_ready) begin
      checks++;
      if (exp_ring.size() == 0 || ring_tx_word !== exp_ring[0]) begin
        failures++;
        $display("ring word op=%0d node=%0d tag=%h unexpected", ring_tx_word.op,
                 ring_tx_word.node, ring_tx_word.tag);
      end
      if (exp_ring.size()) void'(exp_ring.pop_front());
    end
    if (host_out_valid && host_out_ready) begin
      checks++;
      if (exp_host.size() == 0 || host_out_data !== exp_host[0]) begin
        failures++;
        $display("host word %h unexpected", host_out_data);
      end
      if (exp_host.size()) void'(exp_host.pop_front());
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (host_q.size() == 0 && rx_q.size() == 0);
    repeat (50) @(posedge clk);
    checks++;
    if (exp_ring.size() || exp_host.size()) begin
      failures++;
      $display("missing: %0d ring words, %0d host words", exp_ring.size(), exp_host.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

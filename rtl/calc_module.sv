// calc_module: one calculation FPGA of the HORN-8 board.
//
// It holds the object memory, the pixel pipeline (1 BPU + UNITS-1 APUs), the
// X_a/Y_a pixel counters that select which hologram segment a pass computes,
// and a result buffer that sends the finished pixels back over the ring
// while the next pass is already running.
//
// Operation. The host loads object points (OBJ words, tag = address) and
// three configuration registers (CFG words):
//   CFG_NOBJ  N, the number of points of a pass (1..DEPTH),
//   CFG_START first segment's X_a and Y_a,
//   CFG_GEOM  line width W, line step S and number of passes P.
// A RUN word then starts P passes. Each pass streams points 0..N-1 from the
// memory into the pipeline, one per clock, and yields UNITS binary pixels
// X_a .. X_a+UNITS-1 of line Y_a. After a pass, X_a advances by UNITS; when
// it reaches W it returns to 0 and Y_a advances by S, so several nodes can
// share a hologram line by line.
//
// Timing and the three mechanisms that shape it:
//   * rate: a pass issues max(N, UNITS) clocks; for N >= UNITS that is N
//     clocks for UNITS pixels, the ideal N*pixels/(f*UNITS).
//   * bubble: when N < UNITS, idle slots pad the pass to UNITS clocks, so
//     that no pixel of the next pass is latched before the whole current pass
//     has been copied out of the pipeline.
//   * stall: when a pass completes while the previous pass's results are
//     still being sent, the whole pipeline (and the issue counters) freezes
//     until the result buffer is free.
// Results go out as ceil(UNITS/64) RES words per pass, tag = {pass[11:0],
// word[3:0]}, bit i of word w = pixel X_a + 64*w + i. After the last pass a
// DONE word (tag = passes) follows. The object memory read adds one clock
// to the pipeline's own latency, so pixel k of a pass is final 4 + k clock
// edges after the edge that issues its last point, and the result words of
// a pass start two clocks after its last pixel is final.
//
// From the HORN-8 design: one BPU and 639 APUs, 2^16 object points, pixel
// counters feeding the BPU, and result transfer that overlaps computation.
// The register map, the segment order, the bubble and stall rules and the
// result word format are this design's choices.
module calc_module
  import horn8_pkg::*;
#(
  parameter int unsigned UNITS   = 640,
  parameter int unsigned DEPTH   = 65536,
  parameter logic [NODE_W-1:0] NODE_ID = 3'd1
) (
  input  logic       clk,
  input  logic       rst_n,
  // words taken off the ring for this node (always accepted)
  input  logic       rx_valid,
  input  ring_word_t rx_word,
  // words for the host
  output logic       tx_valid,
  input  logic       tx_ready,
  output ring_word_t tx_word,
  output logic       busy
);

  localparam int unsigned AW     = $clog2(DEPTH);
  localparam int unsigned NW     = (UNITS + DATA_W - 1) / DATA_W;
  localparam int unsigned CNT_W  = AW + 2;   // holds DEPTH and UNITS
  localparam int unsigned WIDX_W = (NW > 1) ? $clog2(NW) : 1;

  // ------------------------------------------------------------ registers
  logic [CNT_W-1:0]     n_obj;
  logic [COORD_W-1:0]   x_start, y_start, y_step;
  logic [COORD_W:0]     x_width;
  logic [31:0]          n_pass;

  typedef enum logic [1:0] {S_IDLE, S_FEED, S_DRAIN} state_e;
  state_e               state;
  logic [CNT_W-1:0]     cyc;          // clock within the current pass
  logic [COORD_W-1:0]   xa, ya;       // pixel counters
  logic [31:0]          pass_issued;
  logic [31:0]          pass_done;

  // aligned with the object memory output
  logic                 v_q, f_q, l_q;
  logic [COORD_W-1:0]   xa_q, ya_q;

  logic                 en;
  logic [UNITS-1:0]     pix;
  phase_bus_t           tail;
  obj_point_t           point;
  logic                 tail_last;

  logic [NW*DATA_W-1:0] txbuf;
  logic                 tx_busy;
  logic [WIDX_W-1:0]    widx;
  logic [31:0]          res_pass;

  // ------------------------------------------------------------ issue
  logic [CNT_W-1:0]     plen;
  logic                 pass_active, issue_valid, issue_first, issue_last, pass_end;
  logic [COORD_W:0]     xa_next;

  always_comb begin
    plen        = (n_obj > CNT_W'(UNITS)) ? n_obj : CNT_W'(UNITS);
    pass_active = (state == S_FEED);
    issue_valid = pass_active && (cyc < n_obj);
    issue_first = (cyc == '0);
    issue_last  = (cyc == n_obj - 1'b1);
    pass_end    = pass_active && (cyc == plen - 1'b1);
    xa_next     = {1'b0, xa} + (COORD_W+1)'(UNITS);
  end

  assign tail_last = tail.valid && tail.last;
  assign en        = !(tail_last && tx_busy);   // stall on a full result buffer
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n_obj <= CNT_W'(1); x_start <= '0; y_start <= '0; y_step <= '0;
      x_width <= '0; n_pass <= '0;
      state <= S_IDLE; cyc <= '0; xa <= '0; ya <= '0;
      pass_issued <= '0;
      v_q <= 1'b0; f_q <= 1'b0; l_q <= 1'b0; xa_q <= '0; ya_q <= '0;
    end else begin
      // configuration and start
      if (rx_valid && state == S_IDLE) begin
        unique case (rx_word.op)
          OP_CFG: begin
            if (rx_word.tag == CFG_NOBJ)  n_obj <= rx_word.data[CNT_W-1:0];
            if (rx_word.tag == CFG_START) begin
              x_start <= rx_word.data[13:0];
              y_start <= rx_word.data[29:16];
            end
            if (rx_word.tag == CFG_GEOM) begin
              x_width <= rx_word.data[14:0];
              y_step  <= rx_word.data[29:16];
              n_pass  <= rx_word.data[63:32];
            end
          end
          OP_RUN: begin
            state       <= (n_pass == 0) ? S_DRAIN : S_FEED;
            cyc         <= '0;
            xa          <= x_start;
            ya          <= y_start;
            pass_issued <= '0;
          end
          default: ;
        endcase
      end

      if (en) begin
        v_q  <= issue_valid;
        f_q  <= issue_first;
        l_q  <= issue_last;
        xa_q <= xa;
        ya_q <= ya;
        if (state == S_FEED) begin
          if (pass_end) begin
            cyc         <= '0;
            pass_issued <= pass_issued + 1;
            if (xa_next >= x_width) begin
              xa <= '0;
              ya <= ya + y_step;
            end else begin
              xa <= xa_next[COORD_W-1:0];
            end
            if (pass_issued + 1 == n_pass) state <= S_DRAIN;
          end else begin
            cyc <= cyc + 1'b1;
          end
        end
      end

      // all results and the DONE word sent
      if (state == S_DRAIN && tx_valid && tx_ready && !tx_busy) state <= S_IDLE;
    end
  end

  // ------------------------------------------------------------ datapath
  object_ram #(.DEPTH(DEPTH)) u_ram (
    .clk,
    .we    (rx_valid && rx_word.op == OP_OBJ),
    .waddr (rx_word.tag[AW-1:0]),
    .wdata (rx_word.data[59:0]),
    .re    (en),
    .raddr (cyc[AW-1:0]),
    .rdata (point)
  );

  horn_pipeline #(.UNITS(UNITS)) u_pipe (
    .clk, .rst_n, .en,
    .in_valid (v_q),
    .in_first (f_q),
    .in_last  (l_q),
    .xa       (xa_q),
    .ya       (ya_q),
    .point,
    .pix,
    .tail
  );

  // ------------------------------------------------------------ results
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      txbuf <= '0; tx_busy <= 1'b0; widx <= '0; res_pass <= '0; pass_done <= '0;
    end else begin
      if (rx_valid && rx_word.op == OP_RUN && state == S_IDLE) pass_done <= '0;
      if (tx_busy && tx_ready) begin
        widx <= widx + 1'b1;
        if (widx == WIDX_W'(NW - 1)) tx_busy <= 1'b0;
      end
      if (tail_last && !tx_busy) begin
        txbuf     <= (NW*DATA_W)'(pix);
        tx_busy   <= 1'b1;
        widx      <= '0;
        res_pass  <= pass_done;
        pass_done <= pass_done + 1;
      end
    end
  end

  always_comb begin
    tx_word = '0;
    if (tx_busy) begin
      tx_valid     = 1'b1;
      tx_word.op   = OP_RES;
      tx_word.node = NODE_ID;
      tx_word.tag  = {res_pass[11:0], 4'(widx)};
      tx_word.data = txbuf[widx*DATA_W +: DATA_W];
    end else begin
      tx_valid     = (state == S_DRAIN) && (pass_done == n_pass);
      tx_word.op   = OP_DONE;
      tx_word.node = NODE_ID;
      tx_word.tag  = pass_done[TAG_W-1:0];
    end
  end

endmodule

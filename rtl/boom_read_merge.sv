// boom_read_merge: read data path of the BOOM buffer chip, iDBUS lanes to DBUS.
//
// The N_IDBUS internal data lanes are grouped into SUBRANKS sub-ranks of
// L = N_IDBUS/SUBRANKS lanes. A read makes every lane of one sub-rank deliver a
// burst of B = 16/L words, one word per iDBUS beat (every RATIO clocks). Each lane
// word is pushed into that lane's synchronization queue. The DBUS side sends a
// block as one unbroken burst of 16 beats, taking the lanes in turn for every
// internal beat (lane 0 word 0, lane 1 word 0, lane 0 word 1, ...), which is the
// order the document shows for the 2x case. Blocks leave in the order their
// reads were accepted on the ABUS (order_push / order_sr). A read marked
// order_half is a 64-byte access: each lane delivers B/2 words and the DBUS burst
// is 8 beats, the document's reduced access granularity with LPDDR2 burst 4.
// A burst may start once each lane of the sub-rank holds START words, the
// smallest count that keeps the burst from running dry (boom_pkg::start_words):
// one word when the lanes together are as fast as the DBUS (the queues act as
// plain flip-flops), about two thirds of the block when they are slower, as with
// sub-ranking. Reads to the other sub-rank fill their own queues meanwhile, so
// back-to-back blocks to different sub-ranks keep the DBUS busy. The start rule is
// this design's own; the document gives only the burst shapes.
// Timing: dbus_valid/dbus_data are registered; a new block may follow the last
// beat of the previous one with no gap. underflow pulses if a queue were ever
// empty when its word is due (never, when the lanes follow the iDBUS timing).
module boom_read_merge
  import boom_pkg::*;
#(
  parameter int unsigned N_IDBUS  = 4,
  parameter int unsigned SUBRANKS = 2,
  parameter int unsigned RATIO    = 4,
  parameter int unsigned Q_DEPTH  = 16,
  parameter int unsigned ORDER_DEPTH = 8
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic [N_IDBUS-1:0]               idbus_valid,
  input  logic [N_IDBUS-1:0][LANE_W-1:0]   idbus_data,
  input  logic                             order_push,
  input  logic [1:0]                       order_sr,
  input  logic                             order_half,
  output logic                             dbus_valid,
  output logic [LANE_W-1:0]                dbus_data,
  output logic                             dbus_last,
  output logic                             blk_start,
  output logic                             underflow
);
  localparam int unsigned L     = N_IDBUS / SUBRANKS;
  localparam int unsigned B     = BLOCK_BEATS / L;
  localparam int unsigned START = start_words(L, RATIO, B);
  localparam int unsigned START_H = start_words(L, RATIO, B / 2);
  localparam int unsigned CW    = $clog2(Q_DEPTH + 1);
  localparam int unsigned SRW   = (SUBRANKS > 1) ? $clog2(SUBRANKS) : 1;

  logic [N_IDBUS-1:0]             q_pop, q_empty, q_full;
  logic [N_IDBUS-1:0][LANE_W-1:0] q_head;
  logic [N_IDBUS-1:0][CW-1:0]     q_count;

  for (genvar i = 0; i < N_IDBUS; i++) begin : g_lane
    boom_sync_fifo #(.W(LANE_W), .DEPTH(Q_DEPTH)) u_q (
      .clk, .rst_n,
      .push    (idbus_valid[i]),
      .wr_data (idbus_data[i]),
      .pop     (q_pop[i]),
      .rd_data (q_head[i]),
      .count   (q_count[i]),
      .full    (q_full[i]),
      .empty   (q_empty[i])
    );
  end

  // order of blocks on the DBUS
  logic [2:0] ord_head;
  logic       ord_empty, ord_full, ord_pop;
  logic [$clog2(ORDER_DEPTH+1)-1:0] ord_count;
  boom_sync_fifo #(.W(3), .DEPTH(ORDER_DEPTH)) u_order (
    .clk, .rst_n,
    .push (order_push), .wr_data ({order_half, order_sr}),
    .pop (ord_pop), .rd_data (ord_head),
    .count (ord_count), .full (ord_full), .empty (ord_empty)
  );

  logic           active;
  logic           cur_half;
  logic [SRW-1:0] cur_sr;
  logic [3:0]     beat;
  logic           last_beat, start, ready_next;
  int unsigned    lane_now;
  logic [SRW-1:0] head_sr;

  assign head_sr = (SUBRANKS > 1) ? ord_head[SRW-1:0] : '0;

  assign last_beat = active && (beat == (cur_half ? 4'(HALF_BEATS - 1) : 4'(BLOCK_BEATS - 1)));
  assign lane_now  = int'(cur_sr) * L + int'(beat) % L;

  always_comb begin
    q_pop = '0;
    if (active) q_pop[lane_now] = 1'b1;
  end

  // every lane of the sub-rank at the head of the order queue holds START words
  // (START_H for a 64-byte block), not counting a word popped in this very cycle
  always_comb begin
    int need;
    need       = ord_head[2] ? int'(START_H) : int'(START);
    ready_next = !ord_empty;
    for (int unsigned j = 0; j < L; j++) begin
      if (int'(q_count[int'(head_sr) * L + j]) - int'(q_pop[int'(head_sr) * L + j])
          < need)
        ready_next = 1'b0;
    end
  end

  assign start   = ready_next && (!active || last_beat);
  assign ord_pop = start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active     <= 1'b0;
      cur_sr     <= '0;
      cur_half   <= 1'b0;
      beat       <= '0;
      dbus_valid <= 1'b0;
      dbus_data  <= '0;
      dbus_last  <= 1'b0;
      blk_start  <= 1'b0;
      underflow  <= 1'b0;
    end else begin
      dbus_valid <= active;
      dbus_last  <= last_beat;
      blk_start  <= active && beat == '0;
      underflow  <= active && q_empty[lane_now];
      if (active) dbus_data <= q_head[lane_now];
      if (start) begin
        active <= 1'b1;
        cur_sr <= head_sr;
        cur_half <= ord_head[2];
        beat   <= '0;
      end else if (last_beat) begin
        active <= 1'b0;
      end else if (active) begin
        beat <= beat + 1'b1;
      end
    end
  end

  a_no_lane_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (idbus_valid & q_full) == '0);
  a_no_order_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(order_push && ord_full));
endmodule

// boom_write_split: write data path of the BOOM buffer chip, DBUS to iDBUS lanes.
//
// A write block arrives on the DBUS as 16 beats. Beat j belongs to lane j mod L of
// the target sub-rank (L = N_IDBUS/SUBRANKS lanes), as internal word j div L; this
// is the same lane interleave the read path uses. Each lane has a synchronization
// queue. On every iDBUS beat (ce, once every RATIO clocks) each sub-rank whose
// lanes all hold a word sends one word on all its lanes together, so the DRAM chips
// of a sub-rank see their burst of 16/L words in step. The target sub-rank of each
// block comes from the ABUS in command order (order_push / order_sr); a write
// marked order_half is a 64-byte block of 8 beats.
// Timing: idbus_valid is a one-clock pulse in the ce cycle that follows the word's
// arrival; a whole block leaves in 16/L iDBUS beats (8/L for 64 bytes). The document states only that
// the buffer relays the data and queues it; the rest is this design's choice.
module boom_write_split
  import boom_pkg::*;
#(
  parameter int unsigned N_IDBUS  = 4,
  parameter int unsigned SUBRANKS = 2,
  parameter int unsigned Q_DEPTH  = 16,
  parameter int unsigned ORDER_DEPTH = 8
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             ce,
  input  logic                             dbus_valid,
  input  logic [LANE_W-1:0]                dbus_data,
  input  logic                             order_push,
  input  logic [1:0]                       order_sr,
  input  logic                             order_half,
  output logic [N_IDBUS-1:0]               idbus_valid,
  output logic [N_IDBUS-1:0][LANE_W-1:0]   idbus_data,
  output logic                             orphan_beat
);
  localparam int unsigned L   = N_IDBUS / SUBRANKS;
  localparam int unsigned CW  = $clog2(Q_DEPTH + 1);
  localparam int unsigned SRW = (SUBRANKS > 1) ? $clog2(SUBRANKS) : 1;

  logic [2:0] ord_head;
  logic       ord_empty, ord_full, ord_pop;
  logic [$clog2(ORDER_DEPTH+1)-1:0] ord_count;
  boom_sync_fifo #(.W(3), .DEPTH(ORDER_DEPTH)) u_order (
    .clk, .rst_n,
    .push (order_push), .wr_data ({order_half, order_sr}),
    .pop (ord_pop), .rd_data (ord_head),
    .count (ord_count), .full (ord_full), .empty (ord_empty)
  );

  logic [SRW-1:0] head_sr;
  logic [3:0]     beat;
  int unsigned    lane_in;
  logic [N_IDBUS-1:0]             q_push, q_pop, q_empty, q_full;
  logic [N_IDBUS-1:0][LANE_W-1:0] q_head;
  logic [N_IDBUS-1:0][CW-1:0]     q_count;
  logic [SUBRANKS-1:0]            sr_go;

  assign head_sr = (SUBRANKS > 1) ? ord_head[SRW-1:0] : '0;
  assign lane_in = int'(head_sr) * L + int'(beat) % L;
  assign ord_pop = dbus_valid && !ord_empty &&
                   beat == (ord_head[2] ? 4'(HALF_BEATS - 1) : 4'(BLOCK_BEATS - 1));

  always_comb begin
    q_push = '0;
    if (dbus_valid && !ord_empty) q_push[lane_in] = 1'b1;
  end

  always_comb begin
    for (int unsigned s = 0; s < SUBRANKS; s++) begin
      sr_go[s] = ce;
      for (int unsigned j = 0; j < L; j++)
        if (q_empty[s * L + j]) sr_go[s] = 1'b0;
    end
    for (int unsigned i = 0; i < N_IDBUS; i++) q_pop[i] = sr_go[i / L];
  end

  for (genvar i = 0; i < N_IDBUS; i++) begin : g_lane
    boom_sync_fifo #(.W(LANE_W), .DEPTH(Q_DEPTH)) u_q (
      .clk, .rst_n,
      .push    (q_push[i]),
      .wr_data (dbus_data),
      .pop     (q_pop[i]),
      .rd_data (q_head[i]),
      .count   (q_count[i]),
      .full    (q_full[i]),
      .empty   (q_empty[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beat        <= '0;
      idbus_valid <= '0;
      idbus_data  <= '0;
      orphan_beat <= 1'b0;
    end else begin
      if (ord_pop) beat <= '0;
      else if (dbus_valid && !ord_empty) beat <= beat + 1'b1;
      orphan_beat <= dbus_valid && ord_empty;
      idbus_valid <= q_pop;
      for (int unsigned i = 0; i < N_IDBUS; i++)
        if (q_pop[i]) idbus_data[i] <= q_head[i];
    end
  end

  a_write_has_command: assert property (@(posedge clk) disable iff (!rst_n)
    dbus_valid |-> !ord_empty);
  a_no_lane_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (q_push & q_full) == '0);
endmodule

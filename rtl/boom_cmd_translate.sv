// boom_cmd_translate: one internal address/command bus (iABUS) of the buffer chip.
//
// Commands for the ranks this iABUS serves arrive at the fast external ABUS rate
// and wait in a small queue; one command leaves per iABUS command slot (the slot
// strobe comes every 2*RATIO clocks, the iABUS clock being half the iDBUS data
// rate). On the way the command is translated: its rank number becomes the index
// among this bus's ranks, and a read or write gets the internal burst length
// 16 / LANES_PER_SR, because the sub-rank's lanes share the external burst of 16
// (8 / LANES_PER_SR for a 64-byte access, whose external burst is 8).
// The document names this translation and the one-command-per-iABUS split; the
// queue, its depth and the field layout are this design's choices.
// Timing: a command accepted in cycle t leaves at the first slot after t, as a
// one-clock pulse of out_valid. in_ready is low while the queue is full.
module boom_cmd_translate
  import boom_pkg::*;
#(
  parameter int unsigned RANKS_PER_IABUS = 1,
  parameter int unsigned LANES_PER_SR    = 2,
  parameter int unsigned QDEPTH          = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     slot,
  input  logic     in_valid,
  input  ext_cmd_t in_cmd,
  output logic     in_ready,
  output logic     out_valid,
  output int_cmd_t out_cmd
);
  localparam int unsigned BURST = BLOCK_BEATS / LANES_PER_SR;

  int_cmd_t                      xlat, head;
  logic                          full, empty;
  logic [$clog2(QDEPTH+1)-1:0]   count;
  logic                          pop;

  always_comb begin
    xlat.op      = in_cmd.op;
    xlat.rank    = 3'(in_cmd.rank % RANKS_PER_IABUS);
    xlat.subrank = in_cmd.subrank;
    xlat.bank    = in_cmd.bank;
    xlat.row     = in_cmd.row;
    xlat.col     = in_cmd.col;
    xlat.burst   = (in_cmd.op == CMD_RD || in_cmd.op == CMD_WR) ? (in_cmd.half ? 5'(BURST / 2) : 5'(BURST)) : 5'd0;
  end

  assign in_ready = !full;
  assign pop      = slot && !empty;

  boom_sync_fifo #(.W($bits(int_cmd_t)), .DEPTH(QDEPTH)) u_q (
    .clk, .rst_n,
    .push    (in_valid && !full && in_cmd.op != CMD_NOP),
    .wr_data (xlat),
    .pop     (pop),
    .rd_data (head),
    .count   (count),
    .full    (full),
    .empty   (empty)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_cmd   <= '0;
    end else begin
      out_valid <= pop;
      if (pop) out_cmd <= head;
    end
  end
endmodule

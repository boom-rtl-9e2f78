// boom_mc_ecc_tx: memory-controller write path with the BOOM data/ECC layout.
//
// Takes a 128-byte block, splits it into four strips of 32 bytes (strip s holds
// bytes 32s..32s+31 as D0..D31), adds four RS check symbols to each strip
// (boom_rs_encoder) and sends the block as 16 beats of 72 bits, strip after
// strip, each strip's symbols scattered over its four beats so that every 8-bit
// symbol is one nibble of one x8 chip over two internal beats (boom_ecc_pkg).
// Timing: blk_ready is high when idle; a block accepted in cycle t appears on
// dbus_valid/dbus_data in cycles t+1..t+16 with no gap. The layout follows the
// document; the byte order within the block is this design's choice.
// With blk_half set only the lower 64 bytes (strips 0 and 1) are sent, as 8
// beats in t+1..t+8: the 64-byte access of the document's LPDDR2 burst-4 mode.
module boom_mc_ecc_tx
  import boom_pkg::*;
  import boom_ecc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  blk_valid,
  input  logic [BLOCK_BITS-1:0] blk,
  input  logic                  blk_half,
  output logic                  blk_ready,
  output logic                  dbus_valid,
  output logic [LANE_W-1:0]     dbus_data
);
  sym_t [STRIPS-1:0][RS_K-1:0]    data;
  sym_t [STRIPS-1:0][RS_NSYM-1:0] ecc;
  logic [BLOCK_BEATS-1:0][LANE_W-1:0] beats, shreg;
  logic [4:0] left;

  for (genvar s = 0; s < STRIPS; s++) begin : g_strip
    for (genvar i = 0; i < RS_K; i++) begin : g_sym
      assign data[s][i] = blk[(s * RS_K + i) * 8 +: 8];
    end
    boom_rs_encoder u_enc (.data(data[s]), .ecc(ecc[s]));
  end

  always_comb begin
    cw_t          cw;
    strip_beats_t sb;
    for (int unsigned s = 0; s < STRIPS; s++) begin
      for (int unsigned j = 0; j < RS_NSYM; j++) cw[pos_of_e(j)] = ecc[s][j];
      for (int unsigned i = 0; i < RS_K; i++)    cw[pos_of_d(i)] = data[s][i];
      sb = cw_to_strip(cw);
      for (int unsigned t = 0; t < STRIP_BEATS; t++) beats[s * STRIP_BEATS + t] = sb[t];
    end
  end

  assign blk_ready = (left == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left       <= '0;
      shreg      <= '0;
      dbus_valid <= 1'b0;
      dbus_data  <= '0;
    end else begin
      if (blk_valid && blk_ready) begin
        shreg      <= beats >> LANE_W;
        dbus_data  <= beats[0];
        dbus_valid <= 1'b1;
        left       <= blk_half ? 5'(HALF_BEATS - 1) : 5'(BLOCK_BEATS - 1);
      end else if (left != '0) begin
        dbus_data  <= shreg[0];
        shreg      <= shreg >> LANE_W;
        dbus_valid <= 1'b1;
        left       <= left - 1'b1;
      end else begin
        dbus_valid <= 1'b0;
      end
    end
  end
endmodule

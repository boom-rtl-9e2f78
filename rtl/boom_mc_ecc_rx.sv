// boom_mc_ecc_rx: memory-controller read path with the BOOM data/ECC layout.
//
// Gathers the 16 beats of a block from the DBUS, rebuilds the four strip
// codewords, corrects each with boom_rs_decoder and classifies what was corrected
// with boom_fail_classify. The block summary class is the worst strip class in the
// order uncorrectable, pin, chip, two unrelated symbols, one symbol, none; chip
// and pin name the failed part of the first strip showing that class.
// Timing: the block's 16th beat is marked by dbus_last; blk_valid pulses two
// cycles after it with the corrected block. Blocks may follow each other with no
// gap. A burst that ends (dbus_last) on its 8th beat is a 64-byte block: only
// strips 0 and 1 are decoded, blk_half is set, the upper half of blk is zero and
// the classes of strips 2 and 3 are none. A burst ending on any other beat than
// the 8th or 16th, or running past 16, raises framing_error.
// Erasure mode: while erase_valid is high, the chip named by erase_chip (as
// reported earlier on chip) is taken as dead. Each strip is then decoded by
// boom_rs_erasure_decoder, which rebuilds that chip's two symbols and flags any
// further damage as uncorrectable instead of attempting a correction; a strip
// whose dead chip read wrong is classed as a chip failure of erase_chip. The decision order of the summary is this design's choice; that the
// controller acts differently on pin and chip failures follows the document.
module boom_mc_ecc_rx
  import boom_pkg::*;
  import boom_ecc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  dbus_valid,
  input  logic [LANE_W-1:0]     dbus_data,
  input  logic                  dbus_last,
  input  logic                  erase_valid,
  input  logic [4:0]            erase_chip,
  output logic                  blk_valid,
  output logic [BLOCK_BITS-1:0] blk,
  output logic                  blk_half,
  output fail_e [STRIPS-1:0]    strip_cls,
  output fail_e                 cls,
  output logic [4:0]            chip,
  output logic [6:0]            pin,
  output logic                  framing_error
);
  logic [BLOCK_BEATS-1:0][LANE_W-1:0] buf_q;
  logic [3:0] beat;
  logic       done, half_q;

  cw_t  [STRIPS-1:0]            rx_cw, fix_cw;
  logic [STRIPS-1:0][1:0]       n_err;
  logic [STRIPS-1:0][1:0][5:0]  err_pos;
  sym_t [STRIPS-1:0][1:0]       err_mag;
  logic [STRIPS-1:0]            unc;
  fail_e [STRIPS-1:0]           s_cls;
  logic [STRIPS-1:0][4:0]       s_chip;
  logic [STRIPS-1:0][6:0]       s_pin;
  cw_t  [STRIPS-1:0]            era_cw;
  sym_t [STRIPS-1:0][1:0]       era_mag;
  logic [STRIPS-1:0]            era_unc;
  logic [1:0][5:0]              era_pos;
  cw_t  [STRIPS-1:0]            out_cw;
  fail_e [STRIPS-1:0]           o_cls;
  logic [STRIPS-1:0][4:0]       o_chip;

  // codeword positions of the erased chip: D2c, D2c+1 for data chip c, E2l, E2l+1
  // for the check chip of lane l (chip numbers 16 + l)
  always_comb begin
    if (erase_chip >= 5'd16) begin
      era_pos[0] = 6'(pos_of_e(2 * (int'(erase_chip) - 16)));
      era_pos[1] = 6'(pos_of_e(2 * (int'(erase_chip) - 16) + 1));
    end else begin
      era_pos[0] = 6'(pos_of_d(2 * int'(erase_chip)));
      era_pos[1] = 6'(pos_of_d(2 * int'(erase_chip) + 1));
    end
  end

  for (genvar s = 0; s < STRIPS; s++) begin : g_strip
    strip_beats_t sb;
    for (genvar t = 0; t < STRIP_BEATS; t++) begin : g_b
      assign sb[t] = buf_q[s * STRIP_BEATS + t];
    end
    assign rx_cw[s] = strip_to_cw(sb);
    boom_rs_decoder u_dec (
      .rx (rx_cw[s]), .corrected (fix_cw[s]), .n_err (n_err[s]),
      .err_pos (err_pos[s]), .err_mag (err_mag[s]), .uncorrectable (unc[s])
    );
    boom_fail_classify u_cls (
      .n_err (n_err[s]), .err_pos (err_pos[s]), .err_mag (err_mag[s]),
      .uncorrectable (unc[s]), .cls (s_cls[s]), .chip (s_chip[s]), .pin (s_pin[s])
    );
    boom_rs_erasure_decoder u_era (
      .rx (rx_cw[s]), .ep (era_pos), .corrected (era_cw[s]), .err_mag (era_mag[s]),
      .uncorrectable (era_unc[s])
    );
    always_comb begin
      if (erase_valid) begin
        out_cw[s] = era_cw[s];
        o_chip[s] = erase_chip;
        if (era_unc[s])                o_cls[s] = FAIL_UNCORR;
        else if (era_mag[s] != '0)     o_cls[s] = FAIL_CHIP;
        else                           o_cls[s] = FAIL_NONE;
      end else begin
        out_cw[s] = fix_cw[s];
        o_chip[s] = s_chip[s];
        o_cls[s]  = s_cls[s];
      end
    end
  end

  function automatic int unsigned rank_of(fail_e c);
    case (c)
      FAIL_UNCORR: return 5;
      FAIL_PIN:    return 4;
      FAIL_CHIP:   return 3;
      FAIL_MULTI:  return 2;
      FAIL_SINGLE: return 1;
      default:     return 0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beat          <= '0;
      done          <= 1'b0;
      half_q        <= 1'b0;
      blk_half      <= 1'b0;
      buf_q         <= '0;
      blk_valid     <= 1'b0;
      blk           <= '0;
      strip_cls     <= {STRIPS{FAIL_NONE}};
      cls           <= FAIL_NONE;
      chip          <= '0;
      pin           <= '0;
      framing_error <= 1'b0;
    end else begin
      done          <= dbus_valid && dbus_last;
      framing_error <= dbus_valid && (dbus_last ? (beat != 4'(HALF_BEATS - 1) &&
                                                   beat != 4'(BLOCK_BEATS - 1))
                                                : (beat == 4'(BLOCK_BEATS - 1)));
      if (dbus_valid && dbus_last) half_q <= (beat == 4'(HALF_BEATS - 1));
      if (dbus_valid) begin
        buf_q[beat] <= dbus_data;
        beat        <= dbus_last ? '0 : beat + 1'b1;
      end
      blk_valid <= done;
      if (done) begin
        fail_e       worst;
        logic [4:0]  w_chip;
        logic [6:0]  w_pin;
        fail_e [STRIPS-1:0] used_cls;
        worst    = FAIL_NONE;
        w_chip   = '0;
        w_pin    = '0;
        used_cls = o_cls;
        for (int unsigned s = 0; s < STRIPS; s++) begin
          if (half_q && s >= STRIPS / 2) used_cls[s] = FAIL_NONE;
          for (int unsigned i = 0; i < RS_K; i++)
            blk[(s * RS_K + i) * 8 +: 8] <= (half_q && s >= STRIPS / 2) ? 8'h00
                                                                       : out_cw[s][pos_of_d(i)];
          if (rank_of(used_cls[s]) > rank_of(worst)) begin
            worst  = s_cls[s];
            w_chip = o_chip[s];
            w_pin  = s_pin[s];
          end
        end
        strip_cls <= used_cls;
        blk_half  <= half_q;
        cls       <= worst;
        chip      <= w_chip;
        pin       <= w_pin;
      end
    end
  end
endmodule

// boom_fail_classify: tells a failed DRAM chip from a failed external bus pin.
//
// In the BOOM layout a chip fault and a pin fault each spoil two symbols of a
// strip, but different pairs: a chip holds the two nibbles (symbols D2g, D2g+1, or
// for lane l's check chip E2l, E2l+1) of one chip, while a pin spoils the same
// nibble of the same chip slot in lane 0 and in lane 1 (for example D10 and D26),
// and there only the two bits that this pin carried in the strip's two beats.
// From the decoder's corrected positions and error values this combinational block
// returns the failure class and, for a chip, the chip number (0..15 data chips,
// 16/17 the check chips of lane 0/1) or, for a pin, the DBUS pin (0..71), so the
// controller can retire the channel or ask for the DIMM to be replaced. The pair
// patterns follow the document; the bit test for a pin and the encodings are this
// design's own.
module boom_fail_classify
  import boom_ecc_pkg::*;
(
  input  logic [1:0]      n_err,
  input  logic [1:0][5:0] err_pos,
  input  sym_t [1:0]      err_mag,
  input  logic            uncorrectable,
  output fail_e           cls,
  output logic [4:0]      chip,
  output logic [6:0]      pin
);
  typedef struct packed {
    logic       lane;
    logic [3:0] slot;    // chip slot in the lane, 8 = check chip
    logic       nibble;
  } sym_loc_t;

  function automatic sym_loc_t locate(logic [5:0] pos);
    sym_loc_t    r;
    int unsigned i;
    if (pos < 6'(RS_NSYM)) begin
      r.lane   = pos[1];
      r.slot   = 4'd8;
      r.nibble = pos[0];
    end else begin
      i        = int'(pos) - RS_NSYM;
      r.lane   = 1'((i / 2) / 8);
      r.slot   = 4'((i / 2) % 8);
      r.nibble = 1'(i % 2);
    end
    return r;
  endfunction

  sym_loc_t a, b;
  assign a = locate(err_pos[0]);
  assign b = locate(err_pos[1]);

  always_comb begin
    logic       pin_bits;
    logic [1:0] k;
    cls  = FAIL_NONE;
    chip = '0;
    pin  = '0;
    pin_bits = 1'b0;
    k = '0;
    for (int unsigned j = 0; j < 4; j++) begin
      if ((err_mag[0] & ~(8'h11 << j)) == '0 && (err_mag[1] & ~(8'h11 << j)) == '0) begin
        pin_bits = 1'b1;
        k = 2'(j);
      end
    end
    if (uncorrectable) begin
      cls = FAIL_UNCORR;
    end else if (n_err == 2'd1) begin
      cls = FAIL_SINGLE;
    end else if (n_err == 2'd2) begin
      if (a.lane == b.lane && a.slot == b.slot) begin
        cls  = FAIL_CHIP;
        chip = (a.slot == 4'd8) ? 5'(16 + a.lane) : 5'(a.lane * 8 + a.slot);
      end else if (a.lane != b.lane && a.slot == b.slot && a.nibble == b.nibble && pin_bits) begin
        cls = FAIL_PIN;
        pin = 7'(a.slot * 8 + a.nibble * 4 + k);
      end else begin
        cls = FAIL_MULTI;
      end
    end
  end
endmodule

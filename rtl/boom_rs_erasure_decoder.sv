// boom_rs_erasure_decoder: RS(36,32) decoding of one strip around a known dead chip.
//
// Once the controller has found a failed chip it can treat that chip's two
// symbols in every strip as erasures: their positions are known, so two of the
// four check symbols suffice to rebuild them, and the other two are left to
// detect any further failure (a second chip, a pin, a single symbol) instead of
// risking a wrong correction. The document describes this use of a remembered
// failed chip (one check symbol corrects the erasure, the rest detect a further
// error); applying it to the two-symbol chip pairs of this layout is this
// design's choice.
// Method (combinational): syndromes S0..S3 = r(a^j). With erasure locators
// X1 = a^p1, X2 = a^p2 the modified syndromes T_j = S_(j+2) + (X1+X2)*S_(j+1) +
// X1*X2*S_j (j = 0, 1) cancel the erasures; any other error leaves them non-zero,
// which sets uncorrectable. Otherwise the erasure values are
// Y1 = (S1 + X2*S0) / (X1 + X2) and Y2 = S0 + Y1.
// Interface: ep[0], ep[1] are the two erased codeword positions (distinct).
// err_mag gives the value added at each of them (zero where the chip happened
// to read correctly).
module boom_rs_erasure_decoder
  import boom_ecc_pkg::*;
(
  input  cw_t             rx,
  input  logic [1:0][5:0] ep,
  output cw_t             corrected,
  output sym_t [1:0]      err_mag,
  output logic            uncorrectable
);
  localparam cw_t APOW = alpha_table();   // a^i for each position

  sym_t [RS_NSYM-1:0] s;

  always_comb begin
    for (int unsigned j = 0; j < RS_NSYM; j++) begin
      s[j] = '0;
      for (int i = RS_N - 1; i >= 0; i--) s[j] = gf_mul(s[j], APOW[j]) ^ rx[i];
    end
  end

  always_comb begin
    sym_t x1, x2, g1, g2, t0, t1, y1, y2;
    x1 = APOW[ep[0]];
    x2 = APOW[ep[1]];
    g1 = x1 ^ x2;
    g2 = gf_mul(x1, x2);
    t0 = s[2] ^ gf_mul(g1, s[1]) ^ gf_mul(g2, s[0]);
    t1 = s[3] ^ gf_mul(g1, s[2]) ^ gf_mul(g2, s[1]);
    y1 = gf_mul(s[1] ^ gf_mul(x2, s[0]), gf_inv(g1));
    y2 = s[0] ^ y1;
    uncorrectable = (t0 != '0) || (t1 != '0);
    corrected     = rx;
    err_mag       = '0;
    if (!uncorrectable) begin
      corrected[ep[0]] = rx[ep[0]] ^ y1;
      corrected[ep[1]] = rx[ep[1]] ^ y2;
      err_mag[0]       = y1;
      err_mag[1]       = y2;
    end
  end
endmodule

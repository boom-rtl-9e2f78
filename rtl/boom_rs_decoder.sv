// boom_rs_decoder: RS(36,32) decoder for one strip of a BOOM block.
//
// Corrects up to two wrong symbols in a 36-symbol codeword (positions as in
// boom_ecc_pkg) and flags what it cannot correct. With four check symbols this is
// enough for either failure the BOOM layout must survive: a dead x8 chip or a dead
// external bus pin, each of which spoils two symbols of a strip.
// Method (combinational): syndromes S0..S3 = r(a^j); if all are zero the word is
// clean. Otherwise, if S1^2 + S0*S2 is not zero, two errors: the error locator
// x^2 + s1*x + s2 follows from the Newton identities, its roots a^i are searched
// over the 36 positions, and the values follow from S0 and S1. If it is zero, one
// error at a^i = S1/S0 of value S0, checked against S2 and S3. Anything
// inconsistent (a root outside the codeword, a wrong root count) sets uncorrectable,
// and the word is then passed on unchanged. The algorithm is this design's choice;
// the document specifies only the code's strength.
module boom_rs_decoder
  import boom_ecc_pkg::*;
(
  input  cw_t             rx,
  output cw_t             corrected,
  output logic [1:0]      n_err,
  output logic [1:0][5:0] err_pos,
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
    sym_t det, inv_det, s1, s2, x, x1, x2, v;
    int   nroot;
    logic [5:0] p1, p2;
    corrected     = rx;
    n_err         = 2'd0;
    err_pos       = '0;
    err_mag       = '0;
    uncorrectable = 1'b0;
    det = '0;
    inv_det = '0;
    s1 = '0;
    s2 = '0;
    x = '0;
    v = '0;
    nroot = 0;
    p1 = '0;
    p2 = '0;
    x1 = '0;
    x2 = '0;
    if (s != '0) begin
      det = gf_mul(s[1], s[1]) ^ gf_mul(s[0], s[2]);
      if (det != '0) begin
        inv_det = gf_inv(det);
        s1 = gf_mul(gf_mul(s[1], s[2]) ^ gf_mul(s[0], s[3]), inv_det);
        s2 = gf_mul(gf_mul(s[1], s[3]) ^ gf_mul(s[2], s[2]), inv_det);
        for (int unsigned i = 0; i < RS_N; i++) begin
          x = APOW[i];
          v = gf_mul(x, x) ^ gf_mul(s1, x) ^ s2;
          if (v == '0) begin
            if (nroot == 0) begin p1 = 6'(i); x1 = x; end
            else            begin p2 = 6'(i); x2 = x; end
            nroot = nroot + 1;
          end
        end
        if (nroot == 2) begin
          err_mag[0] = gf_mul(s[1] ^ gf_mul(s[0], x2), gf_inv(x1 ^ x2));
          err_mag[1] = s[0] ^ err_mag[0];
          err_pos[0] = p1;
          err_pos[1] = p2;
          if (err_mag[0] == '0 || err_mag[1] == '0) begin
            uncorrectable = 1'b1;
          end else begin
            n_err = 2'd2;
            corrected[p1] = rx[p1] ^ err_mag[0];
            corrected[p2] = rx[p2] ^ err_mag[1];
          end
        end else begin
          uncorrectable = 1'b1;
        end
      end else if (s[0] != '0) begin
        x = gf_mul(s[1], gf_inv(s[0]));
        for (int unsigned i = 0; i < RS_N; i++)
          if (APOW[i] == x) begin nroot = 1; p1 = 6'(i); end
        if (nroot == 1 && s[2] == gf_mul(s[1], x) && s[3] == gf_mul(s[2], x)) begin
          n_err         = 2'd1;
          err_pos[0]    = p1;
          err_mag[0]    = s[0];
          corrected[p1] = rx[p1] ^ s[0];
        end else begin
          uncorrectable = 1'b1;
        end
      end else begin
        uncorrectable = 1'b1;
      end
    end
    if (uncorrectable) begin
      corrected = rx;
      err_mag   = '0;
      err_pos   = '0;
    end
  end
endmodule

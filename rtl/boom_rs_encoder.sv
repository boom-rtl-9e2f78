// boom_rs_encoder: RS(36,32) encoder for one strip of a BOOM block.
//
// Computes the 4 check symbols E0..E3 of 32 data symbols D0..D31 (8 bits each) so
// that the codeword, with Ej at position j and Di at position 4+i, is a multiple of
// the generator g(x) = (x+1)(x+a)(x+a^2)(x+a^3) over GF(2^8). The remainder is
// found by the usual division shift register, unrolled over the 32 data symbols,
// so the block is purely combinational. The document asks for four check symbols
// per strip; the field and generator are this design's choice (boom_ecc_pkg).
module boom_rs_encoder
  import boom_ecc_pkg::*;
(
  input  sym_t [RS_K-1:0]    data,
  output sym_t [RS_NSYM-1:0] ecc
);
  localparam logic [RS_NSYM:0][7:0] G = rs_gen_poly();

  always_comb begin
    sym_t [RS_NSYM-1:0] r;
    sym_t               fb;
    r = '0;
    for (int i = RS_K - 1; i >= 0; i--) begin
      fb = data[i] ^ r[RS_NSYM-1];
      for (int j = RS_NSYM - 1; j > 0; j--) r[j] = r[j-1] ^ gf_mul(fb, G[j]);
      r[0] = gf_mul(fb, G[0]);
    end
    ecc = r;
  end
endmodule

// boom_ecc_pkg: GF(2^8) arithmetic and the BOOM data/ECC layout.
//
// The memory controller protects each "horizontal strip" of a block with a
// Reed-Solomon code of 32 data symbols and 4 check symbols, RS(36,32), over 8-bit
// symbols. A strip is two internal beats of the two 72-bit lanes of a sub-rank,
// which the external bus carries as four beats: internal beat b of lane l is DBUS
// beat 2*b+l. An 8-bit symbol is one nibble (4 pins) of a x8 chip over the two
// internal beats, so a failed chip spoils two symbols of a strip (its two nibbles)
// and a failed external pin spoils two symbols too (the same pin of lane 0 and of
// lane 1). The code corrects two symbol errors and so tolerates either failure.
// The strip, symbol and failure pattern follow the document's layout figure; the
// field polynomial (x^8+x^4+x^3+x^2+1), the generator roots alpha^0..alpha^3 and the
// codeword positions (check symbols E0..E3 at positions 0..3, data D0..D31 at 4..35)
// are this design's choices, the document does not give them.
package boom_ecc_pkg;

  localparam int unsigned RS_K    = 32;   // data symbols per strip
  localparam int unsigned RS_NSYM = 4;    // check symbols per strip
  localparam int unsigned RS_N    = 36;
  localparam int unsigned STRIP_BEATS = 4; // DBUS beats per strip
  localparam int unsigned STRIPS  = 4;    // strips in a 128B block
  localparam logic [8:0]  GF_POLY = 9'h11D;

  typedef logic [7:0] sym_t;
  typedef sym_t [RS_N-1:0] cw_t;           // codeword, index = position
  typedef logic [STRIP_BEATS-1:0][71:0] strip_beats_t;

  typedef enum logic [2:0] {
    FAIL_NONE   = 3'd0,  // no error
    FAIL_SINGLE = 3'd1,  // one symbol corrected
    FAIL_CHIP   = 3'd2,  // two symbols of one DRAM chip corrected
    FAIL_PIN    = 3'd3,  // one external bus pin seen in both lanes, corrected
    FAIL_MULTI  = 3'd4,  // two unrelated symbols corrected
    FAIL_UNCORR = 3'd5   // detected, not correctable
  } fail_e;

  function automatic sym_t gf_mul(sym_t a, sym_t b);
    logic [7:0] p;
    logic [7:0] x;
    p = '0;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ x;
      x = x[7] ? ((x << 1) ^ GF_POLY[7:0]) : (x << 1);
    end
    return p;
  endfunction

  function automatic sym_t gf_alpha_pow(int unsigned n);
    sym_t r;
    r = 8'h01;
    for (int unsigned i = 0; i < n % 255; i++) r = gf_mul(r, 8'h02);
    return r;
  endfunction

  // Table of a^i for the codeword positions i = 0..35, built one multiply per entry.
  function automatic cw_t alpha_table();
    cw_t t;
    t[0] = 8'h01;
    for (int unsigned i = 1; i < RS_N; i++) t[i] = gf_mul(t[i-1], 8'h02);
    return t;
  endfunction

  // a^254 = a^-1 for a != 0 (and 0 for a == 0)
  function automatic sym_t gf_inv(sym_t a);
    sym_t r;
    sym_t sq;
    r  = 8'h01;
    sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, sq);
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

  // Generator g(x) = (x+a^0)(x+a^1)(x+a^2)(x+a^3); g[4] = 1.
  function automatic logic [RS_NSYM:0][7:0] rs_gen_poly();
    logic [RS_NSYM:0][7:0] g;
    g = '0;
    g[0] = 8'h01;
    for (int unsigned j = 0; j < RS_NSYM; j++) begin
      for (int i = RS_NSYM; i > 0; i--)
        g[i] = g[i-1] ^ gf_mul(g[i], gf_alpha_pow(j));
      g[0] = gf_mul(g[0], gf_alpha_pow(j));
    end
    return g;
  endfunction

  // Codeword position of data symbol Di and check symbol Ej.
  function automatic int unsigned pos_of_d(int unsigned i); return RS_NSYM + i; endfunction
  function automatic int unsigned pos_of_e(int unsigned j); return j; endfunction

  // Codeword position of the symbol that holds pin p (0..71) of lane l.
  function automatic int unsigned pos_of_pin(int unsigned l, int unsigned p);
    int unsigned c;
    c = p / 8;
    if (c < 8) return pos_of_d(2 * (l * 8 + c) + (p % 8) / 4);
    else       return pos_of_e(2 * l + (p % 8) / 4);
  endfunction

  // Gather the four DBUS beats of a strip into a codeword.
  function automatic cw_t strip_to_cw(strip_beats_t beats);
    cw_t cw;
    cw = '0;
    for (int unsigned b = 0; b < 2; b++)
      for (int unsigned l = 0; l < 2; l++)
        for (int unsigned p = 0; p < 72; p++)
          cw[pos_of_pin(l, p)][b * 4 + p % 4] = beats[2 * b + l][p];
    return cw;
  endfunction

  // Scatter a codeword into the four DBUS beats of a strip.
  function automatic strip_beats_t cw_to_strip(cw_t cw);
    strip_beats_t beats;
    beats = '0;
    for (int unsigned b = 0; b < 2; b++)
      for (int unsigned l = 0; l < 2; l++)
        for (int unsigned p = 0; p < 72; p++)
          beats[2 * b + l][p] = cw[pos_of_pin(l, p)][b * 4 + p % 4];
    return beats;
  endfunction

endpackage

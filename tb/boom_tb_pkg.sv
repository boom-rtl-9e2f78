// boom_tb_pkg: reference models shared by the BOOM testbenches.
//
// GF(2^8) arithmetic here uses log/antilog tables built at run time, unlike the
// shift-and-add multiplier in the RTL, and the RS encoder divides by the
// generator polynomial written out by multiplying the roots in table form. The
// strip layout is written from the pin's point of view: DBUS beat t of a strip is
// internal beat t/2 of lane t%2; its bit q is pin q%8 of chip slot q/8 (slot 8 is
// the lane's check chip); that pin feeds symbol D(16*lane + 2*slot + pin/4), or
// E(2*lane + pin/4) for the check chip, at symbol bit 4*(t/2) + pin%4.
package boom_tb_pkg;

  typedef logic [7:0] byte_t;

  byte_t exp_t [510];
  int    log_t [256];
  bit    built = 0;

  function automatic void build();
    int x;
    x = 1;
    for (int i = 0; i < 255; i++) begin
      exp_t[i] = byte_t'(x);
      exp_t[i + 255] = byte_t'(x);
      log_t[x] = i;
      x = x << 1;
      if (x & 'h100) x = x ^ 'h11D;
    end
    log_t[0] = -1;
    built = 1;
  endfunction

  function automatic byte_t mul(byte_t a, byte_t b);
    if (!built) build();
    if (a == 0 || b == 0) return 0;
    return exp_t[log_t[a] + log_t[b]];
  endfunction

  function automatic byte_t apow(int n);
    if (!built) build();
    return exp_t[n % 255];
  endfunction

  // codeword as an array indexed by position: E0..E3 at 0..3, D0..D31 at 4..35
  typedef byte_t cw_a [36];

  function automatic byte_t syndrome(cw_a c, int j);
    byte_t s;
    s = 0;
    for (int i = 0; i < 36; i++) s ^= mul(c[i], apow(i * j));
    return s;
  endfunction

  // systematic encoder: parity = D(x)*x^4 mod g(x)
  function automatic cw_a encode(byte_t d [32]);
    byte_t g [5];
    byte_t rem [36];
    cw_a   c;
    g = '{1, 0, 0, 0, 0};
    for (int j = 0; j < 4; j++) begin
      byte_t ng [5];
      for (int i = 0; i < 5; i++) ng[i] = mul(g[i], apow(j)) ^ ((i > 0) ? g[i-1] : 8'h00);
      g = ng;
    end
    for (int i = 0; i < 36; i++) rem[i] = (i >= 4) ? d[i-4] : 8'h00;
    for (int i = 35; i >= 4; i--) begin
      byte_t f;
      f = rem[i];
      if (f != 0) for (int k = 0; k <= 4; k++) rem[i - 4 + k] ^= mul(f, g[k]);
    end
    for (int i = 0; i < 4; i++) c[i] = rem[i];
    for (int i = 0; i < 32; i++) c[i + 4] = d[i];
    return c;
  endfunction

  function automatic int sym_of(int t, int q);
    int lane, slot, p;
    lane = t % 2;
    slot = q / 8;
    p    = q % 8;
    if (slot < 8) return 4 + 16 * lane + 2 * slot + p / 4;
    else          return 2 * lane + p / 4;
  endfunction

  function automatic int bit_of(int t, int q);
    return 4 * (t / 2) + (q % 8) % 4;
  endfunction

  // block (128 bytes) to 16 DBUS beats
  function automatic void block_to_beats(input logic [1023:0] blk, output logic [71:0] beats [16]);
    for (int s = 0; s < 4; s++) begin
      byte_t d [32];
      cw_a   c;
      for (int i = 0; i < 32; i++) d[i] = blk[(s * 32 + i) * 8 +: 8];
      c = encode(d);
      for (int t = 0; t < 4; t++)
        for (int q = 0; q < 72; q++)
          beats[4 * s + t][q] = c[sym_of(t, q)][bit_of(t, q)];
    end
  endfunction

  function automatic void beats_to_strip(input logic [71:0] beats [16], input int s, output cw_a c);
    for (int i = 0; i < 36; i++) c[i] = 0;
    for (int t = 0; t < 4; t++)
      for (int q = 0; q < 72; q++)
        c[sym_of(t, q)][bit_of(t, q)] = beats[4 * s + t][q];
  endfunction

  function automatic logic [1023:0] rand_block();
    logic [1023:0] b;
    for (int i = 0; i < 32; i++) b[i * 32 +: 32] = $urandom;
    return b;
  endfunction

endpackage

// luffa_ref_pkg: a plain functional model of Luffa-256 for the testbenches.
//
// Written as straight-line functions, independently of the RTL structure:
// the S-box is applied crumb by crumb from a table, multiplication by 2 is
// done as a polynomial shift with reduction, and the hash pads the message
// itself. Only the algorithm's constant tables (IV and step constants) are
// shared with the RTL package.
package luffa_ref_pkg;
  import luffa_pkg::blk_t;
  import luffa_pkg::state_t;
  import luffa_pkg::word_t;

  // Loop bounds are kept in variables so that the model stays a compact
  // loop when compiled rather than being unrolled at every call site.
  int unsigned n_bits = 32, n_steps = 8, n_lanes = 3, n_words = 8, n_half = 4;

  localparam logic [3:0] S [16] = '{13, 14, 0, 1, 5, 10, 7, 6, 11, 3, 9, 12, 15, 8, 2, 4};

  function automatic word_t rl(word_t x, int n);
    word_t r = x;
    for (int i = 0; i < n; i++) r = {r[30:0], r[31]};
    return r;
  endfunction

  function automatic blk_t rand_blk();
    blk_t b;
    for (int k = 0; k < 8; k++) b[k] = $urandom;
    return b;
  endfunction

  // a * x over 32-bit words, reduction polynomial x^8 + x^4 + x^3 + x + 1.
  function automatic blk_t mul2(blk_t a);
    blk_t y;
    word_t top = a[7];
    for (int k = 7; k > 0; k--) y[k] = a[k-1];
    y[0] = '0;
    if (top != 0) begin
      y[0] ^= top; y[1] ^= top; y[3] ^= top; y[4] ^= top;
    end
    return y;
  endfunction

  function automatic state_t mi(blk_t m, state_t h);
    state_t x;
    blk_t s = mul2(h[0] ^ h[1] ^ h[2]);
    blk_t mm = m;
    for (int j = 0; j < n_lanes; j++) begin
      x[j] = h[j] ^ s ^ mm;
      mm = mul2(mm);
    end
    return x;
  endfunction

  function automatic blk_t tweak(int j, blk_t a);
    blk_t y = a;
    for (int k = n_half; k < n_words; k++) y[k] = rl(a[k], j);
    return y;
  endfunction

  // Apply the S-box to words (a, b, c, d) as crumb bits 0..3.
  function automatic void subcrumb(ref word_t a, ref word_t b, ref word_t c, ref word_t d, input int unsigned nb = 32);
    for (int i = 0; i < int'(nb); i++) begin
      logic [3:0] v = S[{d[i], c[i], b[i], a[i]}];
      a[i] = v[0]; b[i] = v[1]; c[i] = v[2]; d[i] = v[3];
    end
  endfunction

  function automatic void mixword(ref word_t l, ref word_t r);
    r = r ^ l;
    l = rl(l, 2) ^ r;
    r = rl(r, 14) ^ l;
    l = rl(l, 10) ^ r;
    r = rl(r, 1);
  endfunction

  function automatic blk_t step(int j, int r, blk_t a);
    word_t w [8];
    blk_t y;
    for (int k = 0; k < n_words; k++) w[k] = a[k];
    subcrumb(w[0], w[1], w[2], w[3], n_bits);
    subcrumb(w[5], w[6], w[7], w[4], n_bits);
    for (int k = 0; k < n_half; k++) mixword(w[k], w[k+4]);
    w[0] ^= luffa_pkg::RC0[j][r];
    w[4] ^= luffa_pkg::RC4[j][r];
    for (int k = 0; k < n_words; k++) y[k] = w[k];
    return y;
  endfunction

  function automatic blk_t q(int j, blk_t a);
    blk_t y = tweak(j, a);
    for (int r = 0; r < n_steps; r++) y = step(j, r, y);
    return y;
  endfunction

  function automatic state_t round(blk_t m, state_t h);
    state_t x = mi(m, h);
    for (int j = 0; j < n_lanes; j++) x[j] = q(j, x[j]);
    return x;
  endfunction

  // Padded block i of an n-bit message held in msg (unused bits ignored).
  function automatic blk_t pad_block(blk_t msg [], longint unsigned n, int i);
    logic [255:0] b = (i < msg.size()) ? msg[i] : '0;
    longint unsigned last = n / 256;
    int t = int'(n % 256);
    if (i == int'(last)) begin
      for (int k = 0; k < 8 * int'(n_bits); k++)
        if (k >= t) b[255-k] = 1'b0;   // message bit k sits at 255-k
      b[255-t] = 1'b1;
    end
    return blk_t'(b);
  endfunction

  function automatic blk_t hash(blk_t msg [], longint unsigned n);
    state_t h = luffa_pkg::IV;
    int nb = int'(n / 256) + 1;
    for (int i = 0; i < nb; i++) h = round(pad_block(msg, n, i), h);
    h = round('0, h);
    return h[0] ^ h[1] ^ h[2];
  endfunction
endpackage

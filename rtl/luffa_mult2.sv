// luffa_mult2: multiplication by 2 (by x) of a 256-bit block viewed as an
// element of GF((2^32)^8), as used three times in message injection.
//
// Word a_k is the coefficient of x^k. Multiplying by x moves each word up
// one position; the word that leaves the top (a7) is folded back with the
// reduction polynomial x^8 + x^4 + x^3 + x + 1, i.e. XORed into positions
// 0, 1, 3 and 4. The polynomial is the one of the Luffa algorithm. Purely
// combinational: a few 32-bit XORs and wiring.
module luffa_mult2
  import luffa_pkg::*;
(
  input  blk_t a,
  output blk_t y
);
  always_comb begin
    y[0] = a[7];
    y[1] = a[0] ^ a[7];
    y[2] = a[1];
    y[3] = a[2] ^ a[7];
    y[4] = a[3] ^ a[7];
    y[5] = a[4];
    y[6] = a[5];
    y[7] = a[6];
  end
endmodule

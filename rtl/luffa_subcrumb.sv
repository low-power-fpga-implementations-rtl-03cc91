// luffa_subcrumb: SubCrumb, 32 parallel 4-bit S-boxes across four words.
//
// For every bit position b, the crumb {w3[b], w2[b], w1[b], w0[b]} (w0 is
// the least significant bit) goes through the Luffa S-box and the result is
// written back bit-wise to y0..y3. The caller chooses which state words form
// w0..w3 (a0,a1,a2,a3 for the first SubCrumb of a step, a5,a6,a7,a4 for the
// second).
//
// SBOX_RAM = 0 builds the S-boxes from general logic: a bit-sliced network of
// AND, OR, XOR and NOT on whole 32-bit words that computes the same table.
// SBOX_RAM = 1 is the RAM variant of the design: each of the 32 S-boxes is a
// 16 x 4 memory (luffa_sbox_ram). Both are combinational.
module luffa_subcrumb
  import luffa_pkg::*;
#(
  parameter bit SBOX_RAM = 1'b0
)(
  input  word_t w0, w1, w2, w3,
  output word_t y0, y1, y2, y3
);
  if (SBOX_RAM) begin : g_ram
    for (genvar b = 0; b < WORD; b++) begin : g_bit
      logic [3:0] q;
      luffa_sbox_ram u_sbox (.addr({w3[b], w2[b], w1[b], w0[b]}), .data(q));
      assign y0[b] = q[0];
      assign y1[b] = q[1];
      assign y2[b] = q[2];
      assign y3[b] = q[3];
    end
  end else begin : g_logic
    word_t p0, p1, p2, p3, p4, p5, p6, p7, p8, p9;
    always_comb begin
      p0 = (w0 | w1) ^ w3;        // w0 | w1, then ^ w3
      p1 = w3 & w0;
      p2 = ~w1 ^ p1;
      p3 = w2 ^ w3;
      p4 = p1 ^ p3;
      p5 = (p3 & p0) ^ p2;
      p6 = p2 | p4;
      p7 = p4 ^ p5;
      p8 = p5 & p6;
      p9 = p6 ^ ~p0;
      y0 = w0 ^ p6;
      y1 = p9;
      y2 = p8;
      y3 = p7;
    end
  end
endmodule

// luffa_pkg: types and constants shared by the Luffa-256 core.
//
// A 256-bit block is eight 32-bit words a0..a7, with a0 in the most
// significant bits (blk_t is a packed array with an ascending range, so
// blk[0] is bits 255:224). The chaining state is three such lanes.
//
// The numeric tables here (initial chaining value, step constants and the
// 4-bit S-box) belong to the Luffa hash function (version 2 of its
// specification) and are not design choices. The technique enum selects
// where pipeline registers sit in the round; the five values are the
// conventional round and the low-power variants of this design.
package luffa_pkg;

  localparam int unsigned WORD  = 32;
  localparam int unsigned WORDS = 8;
  localparam int unsigned BLK   = WORD * WORDS;  // 256-bit message block
  localparam int unsigned LANES = 3;             // w = 3 for Luffa-256
  localparam int unsigned STEPS = 8;             // steps per Q_j
  // Pipelined round latency: M register, MI register, tweak register and
  // registers after steps 1..7.
  localparam int unsigned PIPE_LAT = 10;

  typedef logic [WORD-1:0]            word_t;
  typedef logic [0:WORDS-1][WORD-1:0] blk_t;
  typedef blk_t [0:LANES-1]           state_t;

  typedef enum logic [1:0] {
    LUFFA_CONVENTIONAL = 2'd0,  // whole round combinational, 1 cycle
    LUFFA_POSITIVE     = 2'd1,  // rising-edge registers between stages, 10 cycles
    LUFFA_GATING       = 2'd2,  // as POSITIVE, registers load only with a token
    LUFFA_NEGATIVE     = 2'd3   // falling-edge register after step 3, 1 cycle
  } tech_e;

  // Initial chaining value V0, V1, V2.
  localparam state_t IV = '{
    '{32'h6d251e69, 32'h44b051e0, 32'h4eaa6fb4, 32'hdbf78465,
      32'h6e292011, 32'h90152df4, 32'hee058139, 32'hdef610bb},
    '{32'hc3b44b95, 32'hd9d2f256, 32'h70eee9a0, 32'hde099fa3,
      32'h5d9b0557, 32'h8fc944b3, 32'hcf1ccf0e, 32'h746cd581},
    '{32'hf7efc89d, 32'h5dba5781, 32'h04016ce5, 32'had659c05,
      32'h0306194f, 32'h666d1836, 32'h24aa230a, 32'h8b264ae7}
  };

  // Step constants: RC0[j][r] is XORed into a0 and RC4[j][r] into a4 in
  // step r of Q_j.
  typedef word_t [0:LANES-1][0:STEPS-1] rc_t;
  localparam rc_t RC0 = '{
    '{32'h303994a6, 32'hc0e65299, 32'h6cc33a12, 32'hdc56983e,
      32'h1e00108f, 32'h7800423d, 32'h8f5b7882, 32'h96e1db12},
    '{32'hb6de10ed, 32'h70f47aae, 32'h0707a3d4, 32'h1c1e8f51,
      32'h707a3d45, 32'haeb28562, 32'hbaca1589, 32'h40a46f3e},
    '{32'hfc20d9d2, 32'h34552e25, 32'h7ad8818f, 32'h8438764a,
      32'hbb6de032, 32'hedb780c8, 32'hd9847356, 32'ha2c78434}
  };
  localparam rc_t RC4 = '{
    '{32'he0337818, 32'h441ba90d, 32'h7f34d442, 32'h9389217f,
      32'he5a8bce6, 32'h5274baf4, 32'h26889ba7, 32'h9a226e9d},
    '{32'h01685f3d, 32'h05a17cf4, 32'hbd09caca, 32'hf4272b28,
      32'h144ae5cc, 32'hfaa7ae2b, 32'h2e48f1c1, 32'hb923c704},
    '{32'he25e72c1, 32'he623bb72, 32'h5c58a4a4, 32'h1e38e2e7,
      32'h78e38b9d, 32'h27586719, 32'h36eda57f, 32'h703aace7}
  };

  // 4-bit S-box; input bit i comes from word i of the SubCrumb group.
  typedef logic [3:0] nib_t;
  localparam nib_t SBOX [16] = '{
    4'd13, 4'd14, 4'd0, 4'd1, 4'd5, 4'd10, 4'd7, 4'd6,
    4'd11, 4'd3, 4'd9, 4'd12, 4'd15, 4'd8, 4'd2, 4'd4
  };

  function automatic word_t rotl(word_t x, int unsigned n);
    return (x << n) | (x >> (WORD - n));
  endfunction

endpackage

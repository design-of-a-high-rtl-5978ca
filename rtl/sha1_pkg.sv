// sha1_pkg: types, constants and small functions shared by the SHA-1 cores.
//
// SHA-1 works on 32-bit words. One 512-bit block is sixteen words, the
// digest is five. The round function f_t and the scrambling constant K_t
// change every 20 rounds; both are looked up here from the round number.
// The working state of the unfolded datapath carries, besides the five
// standard words a..e, three precomputed words:
//   g = f_t(b,c,d) of the next round,
//   h = e + K_t + W_t of the next round,
//   j = K_{t+1} + W_{t+1}, the constant-plus-word sum one round further on.
// These let the critical path of two rounds shrink to three additions.
// The g/h/j precomputation is the idea of the design; the constants and
// round functions are those of the SHA-1 standard (FIPS 180).
package sha1_pkg;

  typedef logic [31:0] word_t;

  localparam int unsigned ROUNDS      = 80;
  localparam int unsigned UNFOLD      = 2;              // rounds per operation block
  localparam int unsigned ITERATIONS  = ROUNDS / UNFOLD; // 40

  typedef enum logic [1:0] {
    F_CH     = 2'd0,   // rounds  0..19: (b & c) | (~b & d)
    F_PARITY = 2'd1,   // rounds 20..39 and 60..79: b ^ c ^ d
    F_MAJ    = 2'd2    // rounds 40..59: majority
  } fsel_e;

  // Working state of the unfolded datapath (after some round t).
  typedef struct packed {
    word_t a, b, c, d, e;
    word_t g;   // f_{t+1}(b, c, d)
    word_t h;   // e + K_{t+1} + W_{t+1}
    word_t j;   // K_{t+2} + W_{t+2}
  } state_t;

  // Sixteen-word message window, w[0] the oldest word.
  typedef word_t [15:0] window_t;

  // Digest H0..H4, h0 in the most significant word.
  typedef logic [159:0] digest_t;

  // Initial hash value H0..H4: the chaining value of a message's first block
  localparam digest_t H_INIT = 160'h67452301_EFCDAB89_98BADCFE_10325476_C3D2E1F0;

  // One block in flight: its chaining value, working state and window.
  typedef struct packed {
    logic    valid;
    digest_t hin;    // chaining value the block started from
    state_t  st;
    window_t w;      // W_{2i} .. W_{2i+15} before iteration i
  } slot_t;

  function automatic word_t rotl(word_t x, int unsigned n);
    return (x << n) | (x >> (32 - n));
  endfunction

  // Round function selection from the round number (any value >= 80 maps
  // to the last group; those rounds are never used).
  function automatic fsel_e fsel_of(int unsigned t);
    if (t < 20)      return F_CH;
    else if (t < 40) return F_PARITY;
    else if (t < 60) return F_MAJ;
    else             return F_PARITY;
  endfunction

  function automatic word_t k_of(int unsigned t);
    if (t < 20)      return 32'h5A827999;
    else if (t < 40) return 32'h6ED9EBA1;
    else if (t < 60) return 32'h8F1BBCDC;
    else             return 32'hCA62C1D6;
  endfunction

  function automatic word_t f_func(fsel_e sel, word_t x, word_t y, word_t z);
    unique case (sel)
      F_CH:    return (x & y) | (~x & z);
      F_MAJ:   return (x & y) | (x & z) | (y & z);
      default: return x ^ y ^ z;
    endcase
  endfunction

  // Fill a slot for a new 512-bit block (word 0 in bits 511:480) starting
  // from chaining value hin: a..e = hin, and the precomputed words for
  // round 0: g = f_0(b,c,d), h = e + K_0 + W_0, j = K_1 + W_1.
  function automatic slot_t load_slot(logic valid, logic [511:0] block, digest_t hin);
    slot_t s;
    s.valid = valid;
    s.hin   = hin;
    for (int i = 0; i < 16; i++) s.w[i] = block[511 - 32*i -: 32];
    s.st.a = hin[159:128];
    s.st.b = hin[127:96];
    s.st.c = hin[95:64];
    s.st.d = hin[63:32];
    s.st.e = hin[31:0];
    s.st.g = f_func(fsel_of(0), s.st.b, s.st.c, s.st.d);
    s.st.h = s.st.e + (k_of(0) + s.w[0]);
    s.st.j = k_of(1) + s.w[1];
    return s;
  endfunction

  // Digest of a slot whose state is the one after round 79.
  function automatic digest_t final_digest(slot_t s);
    return {s.hin[159:128] + s.st.a, s.hin[127:96] + s.st.b, s.hin[95:64] + s.st.c,
            s.hin[63:32] + s.st.d, s.hin[31:0] + s.st.e};
  endfunction

endpackage

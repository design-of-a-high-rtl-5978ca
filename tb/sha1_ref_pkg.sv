// sha1_ref_pkg: plain, round-by-round SHA-1 reference model for the
// testbenches. It follows the textbook definition (one round at a time,
// no precomputed words, no unfolding) and shares no code with the RTL.
// Also provides message padding and a few standard test vectors.
package sha1_ref_pkg;

  typedef logic [31:0]  w32_t;
  typedef logic [159:0] dig_t;
  typedef logic [511:0] blk_t;
  typedef w32_t wexp_t [100];   // W_0..W_99 (words past 79 only for checks)

  typedef struct {
    w32_t a, b, c, d, e;
  } rstate_t;

  function automatic w32_t rl(w32_t x, int n);
    return (x << n) | (x >> (32 - n));
  endfunction

  function automatic w32_t ref_k(int t);
    case (t / 20)
      0:       return 32'h5A827999;
      1:       return 32'h6ED9EBA1;
      2:       return 32'h8F1BBCDC;
      default: return 32'hCA62C1D6;
    endcase
  endfunction

  function automatic w32_t ref_f(int t, w32_t x, w32_t y, w32_t z);
    case (t / 20)
      0:       return (x & y) ^ (~x & z);
      2:       return (x & y) ^ (x & z) ^ (y & z);
      default: return x ^ y ^ z;
    endcase
  endfunction

  function automatic wexp_t ref_expand(blk_t blk);
    wexp_t w;
    for (int t = 0; t < 16; t++) w[t] = blk[511 - 32*t -: 32];
    for (int t = 16; t < 100; t++) w[t] = rl(w[t-3] ^ w[t-8] ^ w[t-14] ^ w[t-16], 1);
    return w;
  endfunction

  function automatic rstate_t ref_round(rstate_t s, int t, w32_t wt);
    rstate_t n;
    n.a = rl(s.a, 5) + ref_f(t, s.b, s.c, s.d) + s.e + ref_k(t) + wt;
    n.b = s.a;
    n.c = rl(s.b, 30);
    n.d = s.c;
    n.e = s.d;
    return n;
  endfunction

  function automatic rstate_t ref_init(dig_t hin);
    rstate_t s;
    s.a = hin[159:128]; s.b = hin[127:96]; s.c = hin[95:64];
    s.d = hin[63:32];   s.e = hin[31:0];
    return s;
  endfunction

  // working state after round r (r = -1: the chaining value itself)
  function automatic rstate_t ref_state_after(dig_t hin, blk_t blk, int r);
    wexp_t   w = ref_expand(blk);
    rstate_t s = ref_init(hin);
    for (int t = 0; t <= r; t++) s = ref_round(s, t, w[t]);
    return s;
  endfunction

  function automatic dig_t ref_compress(dig_t hin, blk_t blk);
    rstate_t s = ref_state_after(hin, blk, 79);
    return {hin[159:128] + s.a, hin[127:96] + s.b, hin[95:64] + s.c,
            hin[63:32] + s.d, hin[31:0] + s.e};
  endfunction

  localparam dig_t REF_H0 = 160'h67452301_EFCDAB89_98BADCFE_10325476_C3D2E1F0;

  // pad a byte string into 512-bit blocks (standard SHA-1 padding)
  function automatic void ref_pad(string msg, ref blk_t blocks[$]);
    byte unsigned bytes[$];
    longint unsigned bitlen = 64'(msg.len()) * 8;
    blk_t b;
    for (int i = 0; i < msg.len(); i++) bytes.push_back(msg[i]);
    bytes.push_back(8'h80);
    while (bytes.size() % 64 != 56) bytes.push_back(8'h00);
    for (int i = 7; i >= 0; i--) bytes.push_back(8'(bitlen >> (8*i)));
    blocks.delete();
    for (int k = 0; k < bytes.size() / 64; k++) begin
      for (int i = 0; i < 64; i++) b[511 - 8*i -: 8] = bytes[64*k + i];
      blocks.push_back(b);
    end
  endfunction

  function automatic dig_t ref_hash(string msg);
    blk_t blocks[$];
    dig_t h = REF_H0;
    ref_pad(msg, blocks);
    foreach (blocks[i]) h = ref_compress(h, blocks[i]);
    return h;
  endfunction

  function automatic blk_t rand_block();
    blk_t b;
    for (int i = 0; i < 16; i++) b[32*i +: 32] = $urandom();
    return b;
  endfunction

  function automatic dig_t rand_digest();
    dig_t d;
    for (int i = 0; i < 5; i++) d[32*i +: 32] = $urandom();
    return d;
  endfunction

endpackage

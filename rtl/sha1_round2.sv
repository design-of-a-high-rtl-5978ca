// sha1_round2: SHA-1 operation block with unfolding factor two.
//
// Computes two consecutive SHA-1 rounds, t and t+1, in one combinational
// pass. The input is the working state after round t-1 together with three
// precomputed words: g = f_t(b,c,d), h = e + K_t + W_t and j = K_{t+1} +
// W_{t+1}. Because these were prepared one step earlier, the new a of round
// t is only two additions away from the registers (g + h, then + ROTL5(a)),
// and the a of round t+1 adds one more, so the critical path is three
// adders. In parallel the block prepares the same three words for the next
// pass: g' = f_{t+2}(b,c,d after round t+1), h' = e_{t+1} + (K_{t+2} +
// W_{t+2}) and j' = K_{t+3} + W_{t+3}.
//
// The connections, the use of g/h/j and the three-adder path follow the
// unfolding-two operation block of the design. The e input is not read:
// round t's e is already folded into h, and e_{t+1} equals c_{t-1}.
// Supplying K_{t+2}+W_{t+2} already summed is as drawn in the design; the
// caller forms that sum.
//
// Interface: purely combinational, no clock.
//   s_in    state after round t-1 (a..e, g, h, j)
//   kw2     K_{t+2} + W_{t+2}
//   k3, w3  K_{t+3} and W_{t+3}
//   fsel1   round function of round t+1
//   fsel2   round function of round t+2
//   s_out   state after round t+1 with g, h, j for rounds t+2, t+3
module sha1_round2
  import sha1_pkg::*;
(
  input  state_t s_in,
  input  word_t  kw2,
  input  word_t  k3,
  input  word_t  w3,
  input  fsel_e  fsel1,
  input  fsel_e  fsel2,
  output state_t s_out
);

  word_t rb30;      // ROTL30(b_{t-1}) = c_t = d_{t+1}
  word_t ra30;      // ROTL30(a_{t-1}) = c_{t+1}
  word_t a_t;       // a after round t
  word_t part_t1;   // e_t + K_{t+1} + W_{t+1} + f_{t+1}: round t+1 without a

  always_comb begin
    rb30    = rotl(s_in.b, 30);
    ra30    = rotl(s_in.a, 30);
    // round t: two adders on the critical path
    a_t     = (s_in.g + s_in.h) + rotl(s_in.a, 5);
    // round t+1, the part that does not wait for a_t
    part_t1 = (s_in.d + s_in.j) + f_func(fsel1, s_in.a, rb30, s_in.c);

    s_out.a = part_t1 + rotl(a_t, 5);
    s_out.b = a_t;
    s_out.c = ra30;
    s_out.d = rb30;
    s_out.e = s_in.c;
    s_out.g = f_func(fsel2, a_t, ra30, rb30);
    s_out.h = s_in.c + kw2;
    s_out.j = k3 + w3;
  end

endmodule

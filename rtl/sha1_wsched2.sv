// sha1_wsched2: SHA-1 message schedule advancing two words per step.
//
// The schedule is kept as a sliding window of sixteen words. Before
// iteration i the window holds W_{2i} .. W_{2i+15} (w_in[0] the oldest).
// The operation block of iteration i needs W_{2i+2} and W_{2i+3}, which are
// window entries 2 and 3. The block also produces the window for the next
// iteration: it drops the two oldest words and appends
//   W_n = ROTL1(W_{n-3} ^ W_{n-8} ^ W_{n-14} ^ W_{n-16})
// for n = 2i+16 and n = 2i+17. Both new words depend only on words already
// in the window, so the two expansions run side by side.
//
// The expansion rule is that of the SHA-1 standard; the design only states
// that the W_t are known ahead of the rounds. The two-words-per-step window
// is this implementation's way of feeding the unfolded operation block.
//
// Interface: combinational.
//   w_in           window before the iteration
//   w2, w3         W_{2i+2}, W_{2i+3} for the operation block
//   w_out          window after the iteration
module sha1_wsched2
  import sha1_pkg::*;
(
  input  window_t w_in,
  output word_t   w2,
  output word_t   w3,
  output window_t w_out
);

  always_comb begin
    w2 = w_in[2];
    w3 = w_in[3];
    for (int i = 0; i < 14; i++) w_out[i] = w_in[i + 2];
    w_out[14] = rotl(w_in[13] ^ w_in[8] ^ w_in[2] ^ w_in[0], 1);
    w_out[15] = rotl(w_in[14] ^ w_in[9] ^ w_in[3] ^ w_in[1], 1);
  end

endmodule

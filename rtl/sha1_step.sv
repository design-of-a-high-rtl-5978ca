// sha1_step: one iteration (two rounds) of the unfolded SHA-1 datapath.
//
// Joins the operation block (sha1_round2) with the message schedule
// (sha1_wsched2) and picks the round functions and constants from the
// iteration number. Iteration i computes rounds 2i and 2i+1 and prepares
// g/h/j for rounds 2i+2 and 2i+3, so it needs f_{2i+1}, f_{2i+2}, K_{2i+2}
// and K_{2i+3}. At the last iteration of a 20-round group those already
// belong to the next group. The iteration number may be a constant, in
// which case the selection folds away. At i = 39 the words prepared for
// rounds 80 and 81 are never used.
//
// Interface: combinational.
//   iter    iteration number 0..39
//   s_in    slot before the iteration; s_out after it
// valid and the chaining value pass through unchanged.
module sha1_step
  import sha1_pkg::*;
(
  input  logic [5:0] iter,
  input  slot_t      s_in,
  output slot_t      s_out
);

  word_t w2, w3;
  word_t k2, k3;
  fsel_e fsel1, fsel2;
  int unsigned t1;   // round t+1 = 2i+1

  always_comb begin
    t1    = 2 * int'(iter) + 1;
    fsel1 = fsel_of(t1);
    fsel2 = fsel_of(t1 + 1);
    k2    = k_of(t1 + 1);
    k3    = k_of(t1 + 2);
  end

  sha1_wsched2 u_sched (
    .w_in  (s_in.w),
    .w2    (w2),
    .w3    (w3),
    .w_out (s_out.w)
  );

  sha1_round2 u_round (
    .s_in  (s_in.st),
    .kw2   (k2 + w2),
    .k3    (k3),
    .w3    (w3),
    .fsel1 (fsel1),
    .fsel2 (fsel2),
    .s_out (s_out.st)
  );

  assign s_out.valid = s_in.valid;
  assign s_out.hin   = s_in.hin;

endmodule

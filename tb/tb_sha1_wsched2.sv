// tb_sha1_wsched2: checks the two-words-per-step message schedule against
// the reference expansion W_0..W_79 for random blocks: starting from the
// block itself, the window is fed back 32 times, and at every step the two
// words handed to the operation block and the whole next window are
// compared with the reference.
module tb_sha1_wsched2;
  import sha1_pkg::*;
  import sha1_ref_pkg::*;

  window_t w_in, w_out;
  word_t   w2, w3;
  int      checks = 0, failures = 0;

  sha1_wsched2 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_t  blk;
    wexp_t w;
    for (int rep = 0; rep < 20; rep++) begin
      blk = rand_block();
      w   = ref_expand(blk);
      for (int k = 0; k < 16; k++) w_in[k] = blk[511 - 32*k -: 32];
      for (int i = 0; i < 32; i++) begin
        #1;
        checks++;
        if (w2 !== w[2*i + 2] || w3 !== w[2*i + 3]) begin
          failures++;
          $display("FAIL i=%0d words %08h %08h expected %08h %08h",
                   i, w2, w3, w[2*i + 2], w[2*i + 3]);
        end
        for (int k = 0; k < 16; k++) begin
          checks++;
          if (w_out[k] !== w[2*i + 2 + k]) begin
            failures++;
            $display("FAIL i=%0d window[%0d] %08h expected %08h",
                     i, k, w_out[k], w[2*i + 2 + k]);
          end
        end
        w_in = w_out;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

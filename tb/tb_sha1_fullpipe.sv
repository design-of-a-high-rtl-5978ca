// tb_sha1_fullpipe: end-to-end test of the fully pipelined SHA-1 core.
//
//  1. standard vectors: "abc", the empty message, and the two-block
//     message "abcdbcdecdef...nopq" (second block chained on the first
//     block's digest), against their published digests;
//  2. a back-to-back stream of random blocks with random chaining values:
//     every digest is compared with the reference model, every latency must
//     be 40 clocks and a digest must leave on every clock;
//  3. bubbles (clocks with in_valid low) must produce no output;
//  4. four interleaved three-block messages, each block chained on the
//     previous digest of its own message.
// Blocks are driven at the falling edge and outputs sampled there.
module tb_sha1_fullpipe;
  import sha1_pkg::*;
  import sha1_ref_pkg::*;

  localparam int LATENCY = 40;
  localparam int PERIOD  = 1;

  logic         clk = 0;
  logic         rst_n = 0;
  logic         in_valid = 0;
  logic [511:0] in_block = '0;
  digest_t      in_hin = '0;
  logic         out_valid;
  digest_t      out_digest;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_bubble = 0, n_chained = 0, n_out = 0;

  sha1_fullpipe dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // scoreboard: expected digests in order, with acceptance edge
  dig_t exp_q[$];
  int   acc_q[$];
  dig_t got_q[$];
  int   last_out = -1;

  always @(negedge clk) begin
    if (out_valid) begin
      n_out++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected digest %h at cycle %0d", out_digest, cyc);
      end else begin
        dig_t e;
        int   a;
        e = exp_q.pop_front();
        a = acc_q.pop_front();
        if (out_digest !== e) begin
          failures++;
          $display("FAIL digest %h expected %h", out_digest, e);
        end
        checks++;
        if (cyc - a != LATENCY) begin
          failures++;
          $display("FAIL latency %0d expected %0d", cyc - a, LATENCY);
        end
      end
      got_q.push_back(out_digest);
      last_out = cyc;
    end
  end

  function automatic void expect_check(string what, dig_t got, dig_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endfunction

  // present one block; returns at the falling edge after it was taken
  task automatic send(dig_t hin, blk_t blk);
    @(negedge clk);
    in_valid = 1;
    in_block = blk;
    in_hin   = hin;
    exp_q.push_back(ref_compress(hin, blk));
    acc_q.push_back(cyc + 1);
    @(posedge clk);
  endtask

  task automatic idle_slot();
    @(negedge clk);
    in_valid = 0;
    n_bubble++;
    @(posedge clk);
  endtask

  task automatic drain();
    @(negedge clk);
    in_valid = 0;
    while (exp_q.size() != 0) @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_t blocks[$];
    dig_t h;
    int   prev;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. standard vectors
    expect_check("reference abc", ref_hash("abc"),
                 160'ha9993e36_4706816a_ba3e2571_7850c26c_9cd0d89d);
    ref_pad("abc", blocks);
    send(REF_H0, blocks[0]);
    drain();
    expect_check("abc", got_q.pop_back(), 160'ha9993e36_4706816a_ba3e2571_7850c26c_9cd0d89d);
    ref_pad("", blocks);
    send(REF_H0, blocks[0]);
    drain();
    expect_check("empty", got_q.pop_back(), 160'hda39a3ee_5e6b4b0d_3255bfef_95601890_afd80709);
    ref_pad("abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq", blocks);
    h = REF_H0;
    foreach (blocks[i]) begin
      send(h, blocks[i]);
      drain();
      h = got_q.pop_back();
      if (i > 0) n_chained++;
    end
    expect_check("two-block", h, 160'h84983e44_1c3bd26e_baae4aa1_f95129e5_e54670f1);

    // 2. back-to-back stream
    got_q.delete();
    prev = -1;
    fork
      begin
        for (int i = 0; i < 24; i++) send(rand_digest(), rand_block());
        @(negedge clk);
        in_valid = 0;
      end
      begin
        int n;
        n = 0;
        while (n < 24) begin
          @(negedge clk);
          if (out_valid) begin
            if (prev >= 0) begin
              checks++;
              if (cyc - prev != PERIOD) begin
                failures++;
                $display("FAIL digests %0d clocks apart", cyc - prev);
              end
            end
            prev = cyc;
            n++;
          end
        end
      end
    join
    drain();

    // 3. bubbles
    for (int i = 0; i < 12; i++) begin
      if (i % 3 == 1) idle_slot();
      else send(rand_digest(), rand_block());
    end
    drain();

    // 4. four interleaved three-block messages
    begin
      blk_t msg[4][3];
      dig_t hm[4];
      foreach (hm[m]) hm[m] = REF_H0;
      foreach (msg[m, k]) msg[m][k] = rand_block();
      got_q.delete();
      for (int k = 0; k < 3; k++) begin
        for (int m = 0; m < 4; m++) send(hm[m], msg[m][k]);
        drain();
        for (int m = 0; m < 4; m++) begin
          hm[m] = got_q.pop_front();
          if (k > 0) n_chained++;
        end
      end
      for (int m = 0; m < 4; m++) begin
        dig_t e;
        e = REF_H0;
        for (int k = 0; k < 3; k++) e = ref_compress(e, msg[m][k]);
        expect_check($sformatf("message %0d", m), hm[m], e);
      end
    end

    // no output may be left over
    repeat (60) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d digests missing", exp_q.size());
    end
    checks++;
    if (n_bubble == 0 || n_chained == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("digests %0d, bubbles %0d, chained blocks %0d", n_out, n_bubble, n_chained);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

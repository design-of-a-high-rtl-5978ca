// tb_sha1_top: end-to-end test of both SHA-1 cores of the top level at
// their default sizes, running at the same time.
//
// Each core gets the standard vectors ("abc", the empty message, the
// two-block "abcdbcdecdef...nopq" with chaining), random messages of every
// length from 0 to 129 bytes (one to three padded blocks), a stream of 48
// back-to-back random blocks with random chaining values, a run with
// bubbles, and four interleaved three-block messages. Every digest is
// compared with a plain round-by-round reference model and must arrive 40
// clocks after its block was taken. The stream checks the rates: one
// digest every 10 clocks for the four-stage core, every clock for the fully
// pipelined one. The mechanisms are counted at the end and each must have
// happened: stage hand-offs with four blocks in flight and waits for
// in_ready (four-stage core), forty blocks in flight (fully pipelined
// core), bubbles and chained blocks (both).
module tb_sha1_top;
  import sha1_pkg::*;
  import sha1_ref_pkg::*;

  localparam int LATENCY   = 40;
  localparam int p1_PERIOD = 10;
  localparam int p2_PERIOD = 1;
  localparam dig_t DIG_ABC   = 160'ha9993e36_4706816a_ba3e2571_7850c26c_9cd0d89d;
  localparam dig_t DIG_EMPTY = 160'hda39a3ee_5e6b4b0d_3255bfef_95601890_afd80709;
  localparam dig_t DIG_2BLK  = 160'h84983e44_1c3bd26e_baae4aa1_f95129e5_e54670f1;
  localparam string MSG_2BLK = "abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq";

  logic         clk = 0;
  logic         rst_n = 0;
  logic         p1_in_valid = 0, p2_in_valid = 0;
  logic         p1_in_ready;
  logic [511:0] p1_in_block = '0, p2_in_block = '0;
  digest_t      p1_in_hin = '0, p2_in_hin = '0;
  logic         p1_out_valid, p2_out_valid;
  digest_t      p1_out_digest, p2_out_digest;
  logic         p1_ready, p2_ready;
  int           checks = 0, failures = 0;
  int           cyc = 0;
  int           p1_n_handoff = 0;

  sha1_top dut (.*);

  assign p1_ready = p1_in_ready;
  assign p2_ready = 1'b1;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (rst_n && p1_in_ready) p1_n_handoff++;

  function automatic void expect_check(string what, dig_t got, dig_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endfunction

  // valid stages of the fully pipelined core
  function automatic int p2_valid_count();
    int n = 0;
    for (int k = 0; k < 40; k++) n += int'(dut.u_fullpipe.stage_q[k].valid);
    return n;
  endfunction

  function automatic string rand_msg(int len);
    string m = "";
    for (int i = 0; i < len; i++) m = {m, string'(byte'(8'h20 + $urandom_range(0, 94)))};
    return m;
  endfunction

  function automatic void mechanism(string what, int count, int need);
    $display("%-40s %0d", what, count);
    checks++;
    if (count < need) begin
      failures++;
      $display("FAIL %s happened %0d times, expected at least %0d", what, count, need);
    end
  endfunction

  // ---------------- p1 : four-stage pipelined core ----------------
  dig_t p1_exp_q[$];
  int   p1_acc_q[$];
  dig_t p1_got_q[$];
  int   p1_n_out = 0, p1_n_wait = 0, p1_n_bubble = 0, p1_n_chained = 0;
  int   p1_max_inflight = 0;

  always @(negedge clk) begin
    if (p1_out_valid) begin
      p1_n_out++;
      checks++;
      if (p1_exp_q.size() == 0) begin
        failures++;
        $display("FAIL p1 unexpected digest %h", p1_out_digest);
      end else begin
        dig_t e;
        int   a;
        e = p1_exp_q.pop_front();
        a = p1_acc_q.pop_front();
        if (p1_out_digest !== e) begin
          failures++;
          $display("FAIL p1 digest %h expected %h", p1_out_digest, e);
        end
        checks++;
        if (cyc - a != LATENCY) begin
          failures++;
          $display("FAIL p1 latency %0d expected %0d", cyc - a, LATENCY);
        end
      end
      p1_got_q.push_back(p1_out_digest);
    end
    if (int'(dut.u_pipe4.cur[0].valid + dut.u_pipe4.cur[1].valid + dut.u_pipe4.cur[2].valid + dut.u_pipe4.cur[3].valid) > p1_max_inflight) p1_max_inflight = int'(dut.u_pipe4.cur[0].valid + dut.u_pipe4.cur[1].valid + dut.u_pipe4.cur[2].valid + dut.u_pipe4.cur[3].valid);
  end

  task automatic p1_send(dig_t hin, blk_t blk);
    @(negedge clk);
    p1_in_valid = 1;
    p1_in_block = blk;
    p1_in_hin   = hin;
    while (!p1_ready) begin
      p1_n_wait++;
      @(negedge clk);
    end
    p1_exp_q.push_back(ref_compress(hin, blk));
    p1_acc_q.push_back(cyc + 1);
    @(posedge clk);
  endtask

  task automatic p1_bubble();
    @(negedge clk);
    p1_in_valid = 0;
    while (!p1_ready) @(negedge clk);
    p1_n_bubble++;
    @(posedge clk);
  endtask

  task automatic p1_drain();
    @(negedge clk);
    p1_in_valid = 0;
    while (p1_exp_q.size() != 0) @(negedge clk);
  endtask

  task automatic p1_run();
    blk_t blocks[$];
    dig_t h;
    int   prev, n;
    // standard vectors
    ref_pad("abc", blocks);
    p1_send(REF_H0, blocks[0]);
    p1_drain();
    expect_check("p1 abc", p1_got_q.pop_back(), DIG_ABC);
    ref_pad("", blocks);
    p1_send(REF_H0, blocks[0]);
    p1_drain();
    expect_check("p1 empty", p1_got_q.pop_back(), DIG_EMPTY);
    ref_pad(MSG_2BLK, blocks);
    h = REF_H0;
    foreach (blocks[i]) begin
      p1_send(h, blocks[i]);
      p1_drain();
      h = p1_got_q.pop_back();
      if (i > 0) p1_n_chained++;
    end
    expect_check("p1 two-block", h, DIG_2BLK);
    // back-to-back stream, digests PERIOD clocks apart
    prev = -1;
    n = 0;
    fork
      begin
        for (int i = 0; i < 48; i++) p1_send(rand_digest(), rand_block());
        @(negedge clk);
        p1_in_valid = 0;
      end
      while (n < 48) begin
        @(negedge clk);
        if (p1_out_valid) begin
          if (prev >= 0) begin
            checks++;
            if (cyc - prev != p1_PERIOD) begin
              failures++;
              $display("FAIL p1 digests %0d clocks apart", cyc - prev);
            end
          end
          prev = cyc;
          n++;
        end
      end
    join
    p1_drain();
    // bubbles
    for (int i = 0; i < 12; i++) begin
      if (i % 3 == 1) p1_bubble();
      else p1_send(rand_digest(), rand_block());
    end
    p1_drain();
    // messages of every length from 0 to 129 bytes, padded and chained
    for (int len = 0; len < 130; len++) begin
      string m;
      m = rand_msg(len);
      ref_pad(m, blocks);
      h = REF_H0;
      foreach (blocks[i]) begin
        p1_send(h, blocks[i]);
        p1_drain();
        h = p1_got_q.pop_back();
        if (i > 0) p1_n_chained++;
      end
      expect_check($sformatf("p1 message of %0d bytes", len), h, ref_hash(m));
    end
    // interleaved chained messages
    begin
      blk_t msg[4][3];
      dig_t hm[4];
      dig_t e;
      foreach (hm[m]) hm[m] = REF_H0;
      foreach (msg[m, k]) msg[m][k] = rand_block();
      p1_got_q.delete();
      for (int k = 0; k < 3; k++) begin
        for (int m = 0; m < 4; m++) p1_send(hm[m], msg[m][k]);
        p1_drain();
        for (int m = 0; m < 4; m++) begin
          hm[m] = p1_got_q.pop_front();
          if (k > 0) p1_n_chained++;
        end
      end
      for (int m = 0; m < 4; m++) begin
        e = REF_H0;
        for (int k = 0; k < 3; k++) e = ref_compress(e, msg[m][k]);
        expect_check($sformatf("p1 message %0d", m), hm[m], e);
      end
    end
  endtask

  // ---------------- p2 : fully pipelined core ----------------
  dig_t p2_exp_q[$];
  int   p2_acc_q[$];
  dig_t p2_got_q[$];
  int   p2_n_out = 0, p2_n_wait = 0, p2_n_bubble = 0, p2_n_chained = 0;
  int   p2_max_inflight = 0;

  always @(negedge clk) begin
    if (p2_out_valid) begin
      p2_n_out++;
      checks++;
      if (p2_exp_q.size() == 0) begin
        failures++;
        $display("FAIL p2 unexpected digest %h", p2_out_digest);
      end else begin
        dig_t e;
        int   a;
        e = p2_exp_q.pop_front();
        a = p2_acc_q.pop_front();
        if (p2_out_digest !== e) begin
          failures++;
          $display("FAIL p2 digest %h expected %h", p2_out_digest, e);
        end
        checks++;
        if (cyc - a != LATENCY) begin
          failures++;
          $display("FAIL p2 latency %0d expected %0d", cyc - a, LATENCY);
        end
      end
      p2_got_q.push_back(p2_out_digest);
    end
    if (int'(p2_valid_count()) > p2_max_inflight) p2_max_inflight = int'(p2_valid_count());
  end

  task automatic p2_send(dig_t hin, blk_t blk);
    @(negedge clk);
    p2_in_valid = 1;
    p2_in_block = blk;
    p2_in_hin   = hin;
    while (!p2_ready) begin
      p2_n_wait++;
      @(negedge clk);
    end
    p2_exp_q.push_back(ref_compress(hin, blk));
    p2_acc_q.push_back(cyc + 1);
    @(posedge clk);
  endtask

  task automatic p2_bubble();
    @(negedge clk);
    p2_in_valid = 0;
    while (!p2_ready) @(negedge clk);
    p2_n_bubble++;
    @(posedge clk);
  endtask

  task automatic p2_drain();
    @(negedge clk);
    p2_in_valid = 0;
    while (p2_exp_q.size() != 0) @(negedge clk);
  endtask

  task automatic p2_run();
    blk_t blocks[$];
    dig_t h;
    int   prev, n;
    // standard vectors
    ref_pad("abc", blocks);
    p2_send(REF_H0, blocks[0]);
    p2_drain();
    expect_check("p2 abc", p2_got_q.pop_back(), DIG_ABC);
    ref_pad("", blocks);
    p2_send(REF_H0, blocks[0]);
    p2_drain();
    expect_check("p2 empty", p2_got_q.pop_back(), DIG_EMPTY);
    ref_pad(MSG_2BLK, blocks);
    h = REF_H0;
    foreach (blocks[i]) begin
      p2_send(h, blocks[i]);
      p2_drain();
      h = p2_got_q.pop_back();
      if (i > 0) p2_n_chained++;
    end
    expect_check("p2 two-block", h, DIG_2BLK);
    // back-to-back stream, digests PERIOD clocks apart
    prev = -1;
    n = 0;
    fork
      begin
        for (int i = 0; i < 48; i++) p2_send(rand_digest(), rand_block());
        @(negedge clk);
        p2_in_valid = 0;
      end
      while (n < 48) begin
        @(negedge clk);
        if (p2_out_valid) begin
          if (prev >= 0) begin
            checks++;
            if (cyc - prev != p2_PERIOD) begin
              failures++;
              $display("FAIL p2 digests %0d clocks apart", cyc - prev);
            end
          end
          prev = cyc;
          n++;
        end
      end
    join
    p2_drain();
    // bubbles
    for (int i = 0; i < 12; i++) begin
      if (i % 3 == 1) p2_bubble();
      else p2_send(rand_digest(), rand_block());
    end
    p2_drain();
    // messages of every length from 0 to 129 bytes, padded and chained
    for (int len = 0; len < 130; len++) begin
      string m;
      m = rand_msg(len);
      ref_pad(m, blocks);
      h = REF_H0;
      foreach (blocks[i]) begin
        p2_send(h, blocks[i]);
        p2_drain();
        h = p2_got_q.pop_back();
        if (i > 0) p2_n_chained++;
      end
      expect_check($sformatf("p2 message of %0d bytes", len), h, ref_hash(m));
    end
    // interleaved chained messages
    begin
      blk_t msg[4][3];
      dig_t hm[4];
      dig_t e;
      foreach (hm[m]) hm[m] = REF_H0;
      foreach (msg[m, k]) msg[m][k] = rand_block();
      p2_got_q.delete();
      for (int k = 0; k < 3; k++) begin
        for (int m = 0; m < 4; m++) p2_send(hm[m], msg[m][k]);
        p2_drain();
        for (int m = 0; m < 4; m++) begin
          hm[m] = p2_got_q.pop_front();
          if (k > 0) p2_n_chained++;
        end
      end
      for (int m = 0; m < 4; m++) begin
        e = REF_H0;
        for (int k = 0; k < 3; k++) e = ref_compress(e, msg[m][k]);
        expect_check($sformatf("p2 message %0d", m), hm[m], e);
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    expect_check("reference model, abc", ref_hash("abc"), DIG_ABC);
    fork
      p1_run();
      p2_run();
    join
    repeat (60) @(negedge clk);
    checks += 2;
    if (p1_exp_q.size() != 0 || p2_exp_q.size() != 0) begin
      failures++;
      $display("FAIL digests missing");
    end
    mechanism("p1 stage hand-offs", p1_n_handoff, 4);
    mechanism("p1 blocks in flight (max)", p1_max_inflight, 4);
    mechanism("p1 clocks waiting for in_ready", p1_n_wait, 1);
    mechanism("p1 bubbles", p1_n_bubble, 1);
    mechanism("p1 chained blocks", p1_n_chained, 1);
    mechanism("p2 blocks in flight (max)", p2_max_inflight, 40);
    mechanism("p2 bubbles", p2_n_bubble, 1);
    mechanism("p2 chained blocks", p2_n_chained, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

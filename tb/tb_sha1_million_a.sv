// tb_sha1_million_a: the long standard test message, one million repetitions
// of the character 'a' (15,625 full blocks plus one padding block), hashed
// by both cores of the top level at once. Every block is chained on the
// previous block's digest, so each core handles one block at a time; the
// final digests are compared with the published value
// 34aa973c d4c4daa4 f61eeb2b dbad2731 6534016f. Latency per block is
// checked to be 40 clocks on both cores.
module tb_sha1_million_a;
  import sha1_pkg::*;
  import sha1_ref_pkg::*;

  localparam int   NBLK    = 15626;
  localparam int   LATENCY = 40;
  localparam dig_t EXPECT  = 160'h34aa973c_d4c4daa4_f61eeb2b_dbad2731_6534016f;

  logic         clk = 0;
  logic         rst_n = 0;
  logic         p1_in_valid = 0, p2_in_valid = 0;
  logic         p1_in_ready;
  logic [511:0] p1_in_block = '0, p2_in_block = '0;
  digest_t      p1_in_hin = '0, p2_in_hin = '0;
  logic         p1_out_valid, p2_out_valid;
  digest_t      p1_out_digest, p2_out_digest;
  int           checks = 0, failures = 0;
  int           cyc = 0;
  int           p1_lat_bad = 0, p2_lat_bad = 0;

  sha1_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic blk_t block_of(int k);
    if (k < NBLK - 1) return {64{8'h61}};
    else              return {8'h80, 440'd0, 64'd8000000};
  endfunction

  task automatic run_p1(output dig_t h);
    int acc;
    h = REF_H0;
    for (int k = 0; k < NBLK; k++) begin
      @(negedge clk);
      p1_in_valid = 1;
      p1_in_block = block_of(k);
      p1_in_hin   = h;
      while (!p1_in_ready) @(negedge clk);
      acc = cyc + 1;
      @(negedge clk);
      p1_in_valid = 0;
      while (!p1_out_valid) @(negedge clk);
      if (cyc - acc != LATENCY) p1_lat_bad++;
      h = p1_out_digest;
    end
  endtask

  task automatic run_p2(output dig_t h);
    int acc;
    h = REF_H0;
    for (int k = 0; k < NBLK; k++) begin
      @(negedge clk);
      p2_in_valid = 1;
      p2_in_block = block_of(k);
      p2_in_hin   = h;
      acc = cyc + 1;
      @(negedge clk);
      p2_in_valid = 0;
      while (!p2_out_valid) @(negedge clk);
      if (cyc - acc != LATENCY) p2_lat_bad++;
      h = p2_out_digest;
    end
  endtask

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dig_t h1, h2, href;
    href = REF_H0;
    for (int k = 0; k < NBLK; k++) href = ref_compress(href, block_of(k));
    checks++;
    if (href !== EXPECT) begin
      failures++;
      $display("FAIL reference model gives %h", href);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      run_p1(h1);
      run_p2(h2);
    join
    checks += 4;
    if (h1 !== EXPECT) begin failures++; $display("FAIL four-stage core: %h", h1); end
    if (h2 !== EXPECT) begin failures++; $display("FAIL fully pipelined core: %h", h2); end
    if (p1_lat_bad != 0) begin failures++; $display("FAIL four-stage core latency wrong %0d times", p1_lat_bad); end
    if (p2_lat_bad != 0) begin failures++; $display("FAIL fully pipelined core latency wrong %0d times", p2_lat_bad); end
    $display("million-a digest %h after %0d clocks", h1, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

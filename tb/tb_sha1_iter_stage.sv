// tb_sha1_iter_stage: checks each of the four pipeline stages on its own.
// A stage is loaded with the reference working state of a random block
// just before its 20-round group, then iterated ten times; after every
// clock the stage's two-round result (state, g/h/j, message window,
// chaining value, valid) is compared with the reference model. Loading
// while a block is in flight and a load of an empty slot are also checked.
module tb_sha1_iter_stage;
  import sha1_pkg::*;
  import sha1_ref_pkg::*;

  localparam int ITERS = 10;

  logic       clk = 0;
  logic       rst_n = 0;
  logic [3:0] iter_in = '0;
  logic       load = 0;
  slot_t      load_in;
  slot_t      cur [4];
  slot_t      nxt [4];
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar s = 0; s < 4; s++) begin : g_dut
    sha1_iter_stage #(.STAGE(s), .ITERS(ITERS)) dut (
      .clk, .rst_n, .iter_in, .load, .load_in, .cur(cur[s]), .nxt(nxt[s])
    );
  end

  // reference slot before the round after r
  function automatic slot_t ref_slot(logic v, dig_t hin, blk_t blk, int r);
    slot_t   sl;
    wexp_t   w = ref_expand(blk);
    rstate_t s = ref_state_after(hin, blk, r);
    sl.valid = v;
    sl.hin   = hin;
    sl.st    = '{a: s.a, b: s.b, c: s.c, d: s.d, e: s.e,
                 g: ref_f(r + 1, s.b, s.c, s.d),
                 h: s.e + ref_k(r + 1) + w[r + 1],
                 j: ref_k(r + 2) + w[r + 2]};
    for (int k = 0; k < 16; k++) sl.w[k] = w[r + 1 + k];
    return sl;
  endfunction

  task automatic check_slot(int s, int n, slot_t got, slot_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL stage %0d iteration %0d: a=%08h exp %08h, valid %0b exp %0b",
               s, n, got.st.a, exp.st.a, got.valid, exp.valid);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dig_t hin;
    blk_t blk;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int s = 0; s < 4; s++) begin
      for (int rep = 0; rep < 6; rep++) begin
        hin = (rep == 0) ? REF_H0 : rand_digest();
        blk = rand_block();
        // load in the middle of a group to check that load wins
        iter_in <= 4'(rep % ITERS);
        load    <= 1;
        load_in <= ref_slot(rep != 5, hin, blk, 20 * s - 1);
        @(posedge clk);
        load <= 0;
        for (int n = 0; n < ITERS; n++) begin
          iter_in <= 4'(n);
          #1;
          check_slot(s, n, nxt[s], ref_slot(rep != 5, hin, blk, 20 * s + 2 * n + 1));
          @(posedge clk);
        end
        #1;
        check_slot(s, ITERS, cur[s], ref_slot(rep != 5, hin, blk, 20 * s + 19));
      end
    end
    // reset clears valid
    rst_n <= 0;
    @(posedge clk);
    #1;
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (cur[s].valid !== 1'b0) begin
        failures++;
        $display("FAIL stage %0d valid not cleared by reset", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

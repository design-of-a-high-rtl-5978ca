// tb_sha1_round2: checks the unfolded operation block against two plain
// SHA-1 rounds of the reference model, for random states and message words
// at every round position t = 0, 2, ..., 78 (so every round function and
// every group boundary is exercised).
module tb_sha1_round2;
  import sha1_pkg::*;
  import sha1_ref_pkg::*;

  state_t s_in, s_out;
  word_t  kw2, k3, w3;
  fsel_e  fsel1, fsel2;
  int     checks = 0, failures = 0;

  sha1_round2 dut (.*);

  function automatic fsel_e sel(int t);
    case (t / 20)
      0: return F_CH;
      2: return F_MAJ;
      default: return F_PARITY;
    endcase
  endfunction

  task automatic check(string what, word_t got, word_t exp, int t);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL t=%0d %s: got %08h expected %08h", t, what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rstate_t s0, s1, s2;
    w32_t w[4];
    for (int rep = 0; rep < 25; rep++) begin
      for (int t = 0; t < 80; t += 2) begin
        s0.a = $urandom(); s0.b = $urandom(); s0.c = $urandom();
        s0.d = $urandom(); s0.e = $urandom();
        foreach (w[i]) w[i] = $urandom();
        s1 = ref_round(s0, t, w[0]);
        s2 = ref_round(s1, t + 1, w[1]);
        s_in  = '{a: s0.a, b: s0.b, c: s0.c, d: s0.d, e: s0.e,
                  g: ref_f(t, s0.b, s0.c, s0.d),
                  h: s0.e + ref_k(t) + w[0],
                  j: ref_k(t + 1) + w[1]};
        kw2   = ref_k(t + 2) + w[2];
        k3    = ref_k(t + 3);
        w3    = w[3];
        fsel1 = sel(t + 1);
        fsel2 = sel(t + 2);
        #1;
        check("a", s_out.a, s2.a, t);
        check("b", s_out.b, s2.b, t);
        check("c", s_out.c, s2.c, t);
        check("d", s_out.d, s2.d, t);
        check("e", s_out.e, s2.e, t);
        if (t + 2 < 80) begin
          check("g", s_out.g, ref_f(t + 2, s2.b, s2.c, s2.d), t);
          check("h", s_out.h, s2.e + ref_k(t + 2) + w[2], t);
          check("j", s_out.j, ref_k(t + 3) + w[3], t);
        end
        #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

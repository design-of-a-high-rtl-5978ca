// sha1_fullpipe: fully pipelined SHA-1 core with unfolding factor two.
//
// The 40 iterations of the two-rounds-per-clock operation block are laid
// out in space instead of time: stage k holds the block that is about to
// run rounds 2k and 2k+1, and every clock each block moves one stage on.
// A new 512-bit block can therefore enter every clock and a digest leaves
// every clock. Each stage's round functions and constants are fixed, so
// their selection logic folds away.
//
// One clock per pipeline stage with the unfolded operation block is the
// arrangement of the design. The input register (the loader that forms
// a..e and g/h/j for round 0), the per-stage message windows, the final
// addition of the chaining value, the handshake and the reset are this
// implementation's choices. Blocks must arrive padded; for a message of
// several blocks the previous block's digest is given as in_hin.
//
// Interface:
//   in_valid, in_block, in_hin  a block (word 0 in bits 511:480) and its
//       chaining value, taken on every clock edge where in_valid is high
//       (there is no back-pressure).
//   out_valid, out_digest  digest H0..H4 (H0 in bits 159:128), valid for
//       one clock, 40 clocks after the block was taken.
module sha1_fullpipe
  import sha1_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [511:0] in_block,
  input  digest_t      in_hin,
  output logic         out_valid,
  output digest_t      out_digest
);

  localparam int unsigned DEPTH = ITERATIONS;   // one stage per iteration

  slot_t stage_q [DEPTH];   // stage_q[k]: before iteration k
  slot_t step_d  [DEPTH];   // step_d[k]:  after iteration k

  for (genvar k = 0; k < DEPTH; k++) begin : g_stage
    sha1_step u_step (
      .iter  (6'(k)),
      .s_in  (stage_q[k]),
      .s_out (step_d[k])
    );

    if (k == 0) begin : g_load
      always_ff @(posedge clk) begin
        if (!rst_n) stage_q[0].valid <= 1'b0;
        else        stage_q[0].valid <= in_valid;
      end
      always_ff @(posedge clk) begin
        stage_q[0].hin <= in_hin;
        stage_q[0].st  <= load_slot(1'b1, in_block, in_hin).st;
        stage_q[0].w   <= load_slot(1'b1, in_block, in_hin).w;
      end
    end else begin : g_pass
      always_ff @(posedge clk) begin
        if (!rst_n) stage_q[k].valid <= 1'b0;
        else        stage_q[k].valid <= step_d[k-1].valid;
      end
      always_ff @(posedge clk) begin
        stage_q[k].hin <= step_d[k-1].hin;
        stage_q[k].st  <= step_d[k-1].st;
        stage_q[k].w   <= step_d[k-1].w;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= step_d[DEPTH-1].valid;
  end

  always_ff @(posedge clk) begin
    out_digest <= final_digest(step_d[DEPTH-1]);
  end

endmodule

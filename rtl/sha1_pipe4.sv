// sha1_pipe4: SHA-1 core with four pipeline stages and unfolding factor two.
//
// Each of the four stages works on one 20-round group and runs the
// two-rounds-per-clock operation block for 10 clocks, so four independent
// 512-bit blocks are in flight and one digest leaves every 10 clocks
// (512 bits per 10 clocks). A free-running counter 0..9 is the pipeline
// controller: when it reads 9, every stage hands its block to the next,
// stage 0 takes a new block from the input, and the block leaving stage 3
// has its chaining value added to form the digest.
//
// The four groups of ten clocks follow the design. The input loader (a..e
// from the chaining value, g/h/j for round 0), the final addition of the
// chaining value, the handshake and the reset are this implementation's
// choices; message padding is left to the user, who supplies padded blocks
// and, for a message of several blocks, the previous block's digest as
// in_hin.
//
// Interface:
//   in_valid, in_ready, in_block, in_hin  a block (word 0 in bits 511:480)
//       and its chaining value; taken on a clock edge with both valid and
//       ready high. in_ready is high one clock in ten, first in the clock
//       after reset is released.
//   out_valid, out_digest  digest H0..H4 (H0 in bits 159:128), valid for
//       one clock exactly 40 clocks after the block was taken.
module sha1_pipe4
  import sha1_pkg::*;
#(
  parameter int unsigned STAGES = 4,    // one stage per 20-round group
  parameter int unsigned ITERS  = 10    // clocks per stage
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [511:0] in_block,
  input  digest_t      in_hin,
  output logic         out_valid,
  output digest_t      out_digest
);

  logic [3:0] cnt;
  logic       handoff;
  slot_t      cur [STAGES];
  slot_t      nxt [STAGES];
  slot_t      head;

  // pipeline controller
  always_ff @(posedge clk) begin
    if (!rst_n)       cnt <= 4'(ITERS - 1);
    else if (handoff) cnt <= '0;
    else              cnt <= cnt + 4'd1;
  end

  assign handoff  = (32'(cnt) == ITERS - 1);
  assign in_ready = handoff;
  assign head     = load_slot(in_valid, in_block, in_hin);

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    sha1_iter_stage #(.STAGE(s), .ITERS(ITERS)) u_stage (
      .clk     (clk),
      .rst_n   (rst_n),
      .iter_in (cnt),
      .load    (handoff),
      .load_in ((s == 0) ? head : nxt[(s == 0) ? 0 : s - 1]),
      .cur     (cur[s]),
      .nxt     (nxt[s])
    );
  end

  // final addition of the chaining value
  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= handoff && nxt[STAGES-1].valid;
  end

  always_ff @(posedge clk) begin
    if (handoff) out_digest <= final_digest(nxt[STAGES-1]);
  end

  // the input is offered a slot exactly once every ITERS clocks
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_ready |=> (ITERS == 1) || !in_ready)
    else $error("in_ready high on consecutive clocks");

  initial assert (STAGES * ITERS == ITERATIONS && ITERS <= 16)
    else $error("STAGES * ITERS must be 40");

endmodule

// sha1_top: the two SHA-1 cores of the design, side by side.
//
// p1_*: the four-stage pipelined core (sha1_pipe4). Four 20-round stages of
//       ten clocks each, unfolding factor two: one 512-bit block accepted
//       and one 160-bit digest produced every 10 clocks.
// p2_*: the fully pipelined core (sha1_fullpipe). Forty one-clock stages of
//       the same operation block: one block accepted and one digest produced
//       every clock.
// Both take padded 512-bit blocks (word 0 in bits 511:480) with a chaining
// value (H0..H4, or the previous block's digest) and return the digest
// 40 clocks later. They share the clock and the active-low synchronous
// reset and are otherwise independent.
module sha1_top
  import sha1_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // four-stage pipelined core
  input  logic         p1_in_valid,
  output logic         p1_in_ready,
  input  logic [511:0] p1_in_block,
  input  digest_t      p1_in_hin,
  output logic         p1_out_valid,
  output digest_t      p1_out_digest,
  // fully pipelined core
  input  logic         p2_in_valid,
  input  logic [511:0] p2_in_block,
  input  digest_t      p2_in_hin,
  output logic         p2_out_valid,
  output digest_t      p2_out_digest
);

  sha1_pipe4 u_pipe4 (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (p1_in_valid),
    .in_ready   (p1_in_ready),
    .in_block   (p1_in_block),
    .in_hin     (p1_in_hin),
    .out_valid  (p1_out_valid),
    .out_digest (p1_out_digest)
  );

  sha1_fullpipe u_fullpipe (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (p2_in_valid),
    .in_block   (p2_in_block),
    .in_hin     (p2_in_hin),
    .out_valid  (p2_out_valid),
    .out_digest (p2_out_digest)
  );

endmodule

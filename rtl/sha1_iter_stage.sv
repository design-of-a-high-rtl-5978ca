// sha1_iter_stage: one stage of the four-stage SHA-1 pipeline.
//
// A stage owns one 20-round group (stage 0 rounds 0..19, stage 1 rounds
// 20..39, ...), i.e. one round function and one constant K. It holds one
// block in flight: its working state, its message window and the chaining
// value it started from. Each clock the unfolded operation block advances
// the block by two rounds, so the group takes ITERS = 10 clocks. On the
// clock where the pipeline controller raises `load`, the register takes the
// previous stage's result instead, and this stage's own result (`nxt`, the
// state after its last two rounds) is taken by the following stage.
//
// Four stages of ten clocks and the two-rounds-per-clock operation block
// are the arrangement of the design. Holding the message window and the
// chaining value in every stage, and the valid bit that marks an empty
// stage, are this implementation's choices.
//
// Interface:
//   clk, rst_n  clock, active-low synchronous reset (clears valid only)
//   iter_in     iteration within the group, 0..ITERS-1, from the controller
//   load        take load_in this clock
//   load_in     slot handed over from the previous stage (or the loader)
//   cur         the stage register
//   nxt         result of this clock's two rounds (combinational from cur)
module sha1_iter_stage
  import sha1_pkg::*;
#(
  parameter int unsigned STAGE = 0,   // group index 0..3
  parameter int unsigned ITERS = 10   // iterations per group (20 rounds / 2)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] iter_in,
  input  logic       load,
  input  slot_t      load_in,
  output slot_t      cur,
  output slot_t      nxt
);

  logic [5:0] iter;

  assign iter = 6'(STAGE * ITERS) + 6'(iter_in);

  sha1_step u_step (
    .iter  (iter),
    .s_in  (cur),
    .s_out (nxt)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)    cur.valid <= 1'b0;
    else if (load) cur.valid <= load_in.valid;
    else           cur.valid <= nxt.valid;
  end

  always_ff @(posedge clk) begin
    if (load) begin
      cur.hin <= load_in.hin;
      cur.st  <= load_in.st;
      cur.w   <= load_in.w;
    end else begin
      cur.hin <= nxt.hin;
      cur.st  <= nxt.st;
      cur.w   <= nxt.w;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) 32'(iter_in) < ITERS)
    else $error("iteration %0d out of range", iter_in);

endmodule

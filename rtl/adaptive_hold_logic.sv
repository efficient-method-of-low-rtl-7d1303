// Adaptive hold logic (AHL): decides, for the operand now held in the
// multiplier's input register, whether the multiplication may complete in one
// clock cycle or needs two, and drives the clock-gating signal accordingly.
//
// Structure, as described: two judging blocks look at the same operand, one
// asking "more than N zeros?" and a stricter one asking "more than N+1
// zeros?". A multiplexer picks the first while the aging indicator is low and
// the stricter one once it reports that the circuit has aged. The choice is
// ORed with the inverted output of a D flip-flop clocked on the falling clock
// edge, whose Q output is gating_n. gating_n = 1 lets the next rising edge
// clock the input and Razor registers; gating_n = 0 holds them for one cycle,
// giving the multiplier a second cycle. The OR with ~Q guarantees that a hold
// lasts exactly one cycle: after a held cycle the flip-flop returns to 1
// whatever the judgement.
//
// Timing: md is sampled on the falling edge of clk, half a cycle after the
// rising edge that loaded it, so gating_n is stable before the next rising
// edge. op_done and error feed the aging indicator on the rising edge.
// N, WINDOW and ERR_LIMIT are this implementation's choices (the values are
// not given); reset sets gating_n to 1 and clears the aging state.
module adaptive_hold_logic #(
  parameter int unsigned M         = 16,
  parameter int unsigned N         = M / 2 - 1,
  parameter int unsigned WINDOW    = 64,
  parameter int unsigned ERR_LIMIT = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] md,        // operand whose zeros are counted
  input  logic         op_done,   // a result was captured this cycle
  input  logic         error,     // Razor error
  output logic         gating_n,  // 1: clock the registers, 0: hold a cycle
  output logic         aged,      // aging indicator output
  output logic         one_cycle  // current judgement: 1 = one cycle suffices
);
  logic judge_n, judge_n1;

  zero_judge #(.M(M), .THRESH(N))     u_judge_n  (.x(md), .more_zeros(judge_n));
  zero_judge #(.M(M), .THRESH(N + 1)) u_judge_n1 (.x(md), .more_zeros(judge_n1));

  aging_indicator #(.WINDOW(WINDOW), .ERR_LIMIT(ERR_LIMIT)) u_aging (
    .clk(clk), .rst_n(rst_n), .op_done(op_done), .error(error), .aged(aged)
  );

  // Multiplexer selected by the aging indicator.
  assign one_cycle = aged ? judge_n1 : judge_n;

  // Falling-edge D flip-flop with D = judgement | ~Q.
  always_ff @(negedge clk) begin
    if (!rst_n) gating_n <= 1'b1;
    else        gating_n <= one_cycle | ~gating_n;
  end

  // A hold never lasts two rising edges in a row.
  a_hold_one_cycle: assert property (
    @(posedge clk) disable iff (!rst_n) !gating_n |=> gating_n
  ) else $error("AHL held the clock for two cycles");
endmodule

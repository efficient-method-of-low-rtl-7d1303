// Bank of WIDTH Razor flip-flops (2m of them behind an m x m multiplier).
//
// Each bit has a main flip-flop clocked by the normal clock and a shadow
// element clocked by a delayed clock clk_del, whose rising edge comes a
// fraction of a cycle after that of clk. A path that settles after the clk
// edge but before the clk_del edge leaves a wrong value in the main flip-flop
// and the right one in the shadow element; an XOR per bit compares the two
// and the per-bit errors are ORed into `error`. In the cycle after an error
// the multiplexer in front of each main flip-flop selects the shadow value,
// so the next rising edge restores the correct result. This cell structure
// (main flip-flop, shadow element, XOR, multiplexer, OR of the bit errors)
// follows the described design.
//
// This implementation's choices: the shadow element is an edge-triggered
// register on the rising edge of clk_del rather than a level-sensitive latch;
// it only samples after an edge on which the main flip-flops captured (cap),
// and a pair of toggle tags keeps `error` low between that clk edge and the
// following clk_del edge, while the comparison is not yet meaningful.
//
// Timing: d must be stable from the clk_del edge on (the usual Razor
// short-path constraint, since the next operands may already be applied).
// `error` is valid from the clk_del edge to the next clk edge, which is the
// restore edge; it falls once q has been restored. cap is ignored on a
// restore edge. Synchronous active-low reset in both clock domains.
module razor_ff #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             clk_del,
  input  logic             rst_n,
  input  logic             cap,      // clock enable of the main flip-flops
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic             error
);
  logic [WIDTH-1:0] shadow;
  logic [WIDTH-1:0] bit_err;
  logic             tag_clk;   // toggles on every capturing clk edge
  logic             tag_del;   // copies tag_clk on the following clk_del edge

  // Main flip-flops with the restore multiplexer in front.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q       <= '0;
      tag_clk <= 1'b0;
    end else if (error) begin
      q       <= shadow;
    end else if (cap) begin
      q       <= d;
      tag_clk <= ~tag_clk;
    end
  end

  // Shadow elements on the delayed clock.
  always_ff @(posedge clk_del) begin
    if (!rst_n) begin
      shadow  <= '0;
      tag_del <= 1'b0;
    end else if (tag_del != tag_clk) begin
      shadow  <= d;
      tag_del <= tag_clk;
    end
  end

  // Comparators and the OR of the bit errors.
  assign bit_err = (tag_del == tag_clk) ? (q ^ shadow) : '0;
  assign error   = |bit_err;

  // The restore edge always clears the error.
  a_error_one_cycle: assert property (
    @(posedge clk) disable iff (!rst_n) error |=> !error
  ) else $error("Razor error not cleared by the restore edge");
endmodule

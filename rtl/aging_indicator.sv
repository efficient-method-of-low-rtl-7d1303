// Aging indicator of the adaptive hold logic.
//
// Transistor aging slows the multiplier, so operations the judging block
// predicts to be short start to miss the clock edge and the Razor flip-flops
// report errors. This block counts Razor errors over a window of WINDOW
// completed operations; when a window ends with at least ERR_LIMIT errors, it
// sets the sticky output `aged`, which makes the adaptive hold logic switch
// to its stricter judging block. Only a reset clears `aged` (aging does not
// recover). That it watches the error signal and selects the judging block
// follows the described design; the windowed count, WINDOW and ERR_LIMIT are
// this implementation's choices.
//
// Timing: all inputs sampled on the rising edge of clk. `op_done` is high for
// one cycle per completed operation, `error` for one cycle per Razor error.
// `aged` rises one cycle after the edge that closes a failing window.
module aging_indicator #(
  parameter int unsigned WINDOW    = 64,
  parameter int unsigned ERR_LIMIT = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic op_done,
  input  logic error,
  output logic aged
);
  localparam int unsigned OW = $clog2(WINDOW + 1);
  localparam int unsigned EW = $clog2(WINDOW + 2);

  logic [OW-1:0] ops;
  logic [EW-1:0] errs;
  logic [EW-1:0] errs_next;

  assign errs_next = errs + EW'(error);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ops  <= '0;
      errs <= '0;
      aged <= 1'b0;
    end else if (op_done && 32'(ops) == WINDOW - 1) begin
      // Window closes: judge it and start a new one.
      if (32'(errs_next) >= ERR_LIMIT) aged <= 1'b1;
      ops  <= '0;
      errs <= '0;
    end else begin
      if (op_done) ops <= ops + 1'b1;
      errs <= errs_next;
    end
  end
endmodule

// Aging-aware variable-latency multiplier with adaptive hold logic.
//
// An m x m column-bypassing multiplier is clocked with a period shorter than
// its worst-case path. Operands with many zero bits in the multiplicand
// bypass most adder columns and finish in one cycle; the adaptive hold logic
// (AHL) recognises the others from the same operand and gates the next clock
// edge so that they get two cycles. (With BYPASS = BYPASS_ROW a row-bypassing
// multiplier is used instead and the multiplier operand plays that role.) 2m Razor flip-flops catch the product;
// when a one-cycle prediction is wrong (for instance after the circuit has
// aged), the Razor flip-flops flag the error, restore the correct product one
// cycle later and tell the AHL, whose aging indicator then switches to a
// stricter judging block. This block diagram (input registers, clock gate,
// multiplier, Razor flip-flops, AHL with aging indicator, re-execute output)
// follows the described design.
//
// This implementation's choices: the AND-gate clock gating of the registers
// is written as a clock enable (`load`); a valid/ready handshake is added on
// both sides; the Razor error also holds the input registers for the restore
// cycle, so the operation in flight gains a cycle instead of being lost.
//
// Interface and timing: an operand pair (md, mr) is accepted on a rising edge
// of clk with in_valid && in_ready. Its product appears on `product` with
// out_valid high for exactly one cycle, 1 cycle later when predicted short,
// 2 cycles later when predicted long. A short operation that the Razor
// flip-flops catch as late, or one that waits behind that restore, also
// takes 2 cycles (re_execute is high during the restore cycle).
// clk_del is the Razor delayed clock: same period as clk, rising edge a
// fraction of a cycle later. Synchronous active-low reset.
module vl_multiplier_top #(
  parameter vlm_pkg::bypass_e BYPASS = vlm_pkg::BYPASS_COLUMN,
  parameter int unsigned M         = 16,
  parameter int unsigned N         = M / 2 - 1,
  parameter int unsigned WINDOW    = 64,
  parameter int unsigned ERR_LIMIT = 4
) (
  input  logic           clk,
  input  logic           clk_del,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [M-1:0]   md,          // multiplicand (selects the bypass)
  input  logic [M-1:0]   mr,          // multiplier
  output logic           out_valid,
  output logic [2*M-1:0] product,
  output logic           re_execute,  // Razor error: result late, restoring
  output logic           aged,        // aging indicator state
  output logic           hold,        // AHL holds the registers this edge
  output logic           predict_one  // AHL judges the current operand short
);
  logic           gating_n;
  logic           error;
  logic           load;
  logic [M-1:0]   md_q, mr_q;
  logic           op_valid;
  logic           res_new;
  logic [2*M-1:0] mul_p;

  // Clock gate: the registers advance only when the AHL allows it and no
  // Razor restore is under way.
  assign load     = gating_n & ~error;
  assign in_ready = load;
  assign hold     = ~gating_n;

  // Input registers.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      md_q     <= '0;
      mr_q     <= '0;
      op_valid <= 1'b0;
    end else if (load) begin
      md_q     <= md;
      mr_q     <= mr;
      op_valid <= in_valid;
    end
  end

  // The operand whose bits select the bypass is the one the AHL judges.
  logic [M-1:0] judged;

  if (BYPASS == vlm_pkg::BYPASS_ROW) begin : g_row
    row_bypass_multiplier #(.M(M)) u_mul (.a(md_q), .b(mr_q), .p(mul_p));
    assign judged = mr_q;
  end else begin : g_col
    column_bypass_multiplier #(.M(M)) u_mul (.a(md_q), .b(mr_q), .p(mul_p));
    assign judged = md_q;
  end

  razor_ff #(.WIDTH(2 * M)) u_razor (
    .clk(clk), .clk_del(clk_del), .rst_n(rst_n),
    .cap(load), .d(mul_p), .q(product), .error(error)
  );

  adaptive_hold_logic #(.M(M), .N(N), .WINDOW(WINDOW), .ERR_LIMIT(ERR_LIMIT)) u_ahl (
    .clk(clk), .rst_n(rst_n), .md(judged),
    .op_done(out_valid), .error(error),
    .gating_n(gating_n), .aged(aged), .one_cycle(predict_one)
  );

  // res_new: the Razor flip-flops hold a product not yet handed out. It
  // survives a restore edge and is cleared by any other edge.
  always_ff @(posedge clk) begin
    if (!rst_n)     res_new <= 1'b0;
    else if (error) res_new <= res_new;
    else if (load)  res_new <= op_valid;
    else            res_new <= 1'b0;
  end

  assign out_valid  = res_new & ~error;
  assign re_execute = error;

  // No operand pair is taken while a result is being restored, and a
  // product is never reported valid in that cycle.
  a_no_load_on_restore: assert property (
    @(posedge clk) disable iff (!rst_n) re_execute |-> !in_ready && !out_valid
  ) else $error("operands taken or product reported during a Razor restore");
endmodule

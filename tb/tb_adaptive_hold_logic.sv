// Self-checking testbench of the adaptive hold logic at M = 16, N = 7, with
// a short aging window (8 operations, 2 errors) so that aging happens
// quickly. Operands are applied after each rising edge as the input register
// would; a reference model evaluates the falling-edge flip-flop
// (D = judgement | ~Q) with the judging block chosen by the aging state.
// Checked: gating_n after every falling edge, that a hold never lasts two
// cycles, and that an operand with exactly 8 zeros is judged short before
// aging and long after it.
module tb_adaptive_hold_logic;
  int checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0, op_done = 0, error = 0;
  logic [15:0] md = '0;
  logic        gating_n, aged, one_cycle;

  adaptive_hold_logic #(.M(16), .N(7), .WINDOW(8), .ERR_LIMIT(2)) dut (
    .clk(clk), .rst_n(rst_n), .md(md), .op_done(op_done), .error(error),
    .gating_n(gating_n), .aged(aged), .one_cycle(one_cycle)
  );

  always #5 clk = ~clk;

  bit m_q = 1;
  int holds = 0, shorts = 0;

  function automatic int zeros_of(input logic [15:0] v);
    int z = 0;
    for (int i = 0; i < 16; i++) if (!v[i]) z++;
    return z;
  endfunction

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One cycle: new operand after the rising edge, check after the falling.
  task automatic cycle(input logic [15:0] v, input bit od, input bit er, input bit expect_aged);
    bit prev_q, judge;
    @(posedge clk);
    #1;
    md = v; op_done = od; error = er;
    @(negedge clk);
    prev_q = m_q;
    judge  = expect_aged ? (zeros_of(v) > 8) : (zeros_of(v) > 7);
    m_q    = judge | ~m_q;
    #1;
    checks++;
    if (gating_n !== m_q || one_cycle !== judge) begin
      failures++;
      $display("FAIL at %0t: md=%h gating_n=%b exp %b one_cycle=%b exp %b",
               $time, v, gating_n, m_q, one_cycle, judge);
    end
    checks++;
    if (!prev_q && !gating_n) begin
      failures++;
      $display("FAIL at %0t: hold lasted two cycles", $time);
    end
    if (!m_q) holds++;
    if (judge) shorts++;
  endtask

  initial begin
    logic [15:0] v;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      v = 16'($urandom);
      if (k % 2 == 0) v = v & 16'($urandom);
      cycle(v, 1'b0, 1'b0, 1'b0);
    end
    cycle(16'h00FF, 1'b0, 1'b0, 1'b0);   // exactly 8 zeros: short while young
    checks++;
    if (one_cycle !== 1'b1) begin failures++; $display("FAIL: 8 zeros judged long"); end
    // A window of 8 operations with errors: the indicator must switch.
    // The eighth error is sampled on the rising edge of the next cycle.
    for (int k = 0; k < 8; k++) cycle(16'hFFFF, 1'b1, 1'b1, 1'b0);
    cycle(16'h00FF, 1'b0, 1'b0, 1'b1);   // exactly 8 zeros: long once aged
    checks++;
    if (aged !== 1'b1) begin failures++; $display("FAIL: aging not indicated"); end
    checks++;
    if (one_cycle !== 1'b0) begin failures++; $display("FAIL: 8 zeros judged short after aging"); end
    for (int k = 0; k < 300; k++) begin
      v = 16'($urandom);
      if (k % 2 == 0) v = v & 16'($urandom);
      cycle(v, 1'b0, 1'b0, 1'b1);
    end
    checks++;
    if (holds == 0 || shorts == 0) begin failures++; $display("FAIL: no hold or no short operation"); end
    $display("holds=%0d shorts=%0d", holds, shorts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench of the aging indicator, with a window of 8
// operations and a limit of 2 errors. Random operation-done and error pulses
// are applied; a cycle-by-cycle reference model in the testbench predicts the
// sticky `aged` flag. Phases with rare errors (the flag must stay low) are
// followed by a phase with frequent errors (it must rise) and then by
// error-free windows (it must stay high).
module tb_aging_indicator;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, op_done = 0, error = 0;
  logic aged;

  aging_indicator #(.WINDOW(8), .ERR_LIMIT(2)) dut (
    .clk(clk), .rst_n(rst_n), .op_done(op_done), .error(error), .aged(aged)
  );

  always #5 clk = ~clk;

  int  m_ops = 0, m_errs = 0;
  bit  m_aged = 0;
  bit  saw_rise = 0;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input bit od, input bit er);
    op_done = od; error = er;
    @(posedge clk);
    // Reference model of the edge just taken.
    if (od && m_ops == 7) begin
      if (m_errs + int'(er) >= 2) m_aged = 1;
      m_ops = 0; m_errs = 0;
    end else begin
      if (od) m_ops++;
      m_errs += int'(er);
    end
    #1;
    checks++;
    if (aged !== m_aged) begin
      failures++;
      $display("FAIL at %0t: aged=%b expected %b", $time, aged, m_aged);
    end
    if (aged) saw_rise = 1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // Rare errors: at most one per window, aged must stay 0.
    for (int w = 0; w < 20; w++) begin
      automatic int e_at = $urandom_range(0, 9);
      for (int k = 0; k < 8; k++) begin
        step(1'b1, k == e_at);
        if ($urandom_range(0, 3) == 0) step(1'b0, 1'b0);
      end
    end
    checks++;
    if (aged !== 1'b0) begin failures++; $display("FAIL: aged with rare errors"); end
    // Frequent errors: aged must rise and stay.
    for (int k = 0; k < 200; k++) step($urandom_range(0, 1) == 1, $urandom_range(0, 2) == 0);
    checks++;
    if (!saw_rise || aged !== 1'b1) begin failures++; $display("FAIL: aged never rose"); end
    // Error-free windows afterwards: the flag is sticky.
    for (int k = 0; k < 40; k++) step(1'b1, 1'b0);
    checks++;
    if (aged !== 1'b1) begin failures++; $display("FAIL: aged cleared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

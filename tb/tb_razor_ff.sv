// Self-checking testbench of the Razor flip-flop bank (32 bits). clk has a
// period of 10 time units, clk_del rises 3 units after clk. The data input is
// driven like the output of a combinational block with a known arrival time:
// a value that arrives before the clk edge must be captured with no error; a
// value that arrives between the clk edge and the clk_del edge must raise
// `error`, and the next edge must restore it into q. Cycles with cap = 0 must
// neither capture nor raise an error. During the restore cycle d already
// changes again, as the next operation's result would.
module tb_razor_ff;
  int checks = 0, failures = 0;
  int n_err = 0;

  logic        clk = 0, clk_del = 0, rst_n = 0, cap = 0;
  logic [31:0] d = '0, q;
  logic        error;

  razor_ff dut (.clk(clk), .clk_del(clk_del), .rst_n(rst_n), .cap(cap),
                .d(d), .q(q), .error(error));

  always #5 clk = ~clk;
  always @(clk) clk_del <= #3 clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(input logic [31:0] eq, input logic ee, input string what);
    checks++;
    if (q !== eq || error !== ee) begin
      failures++;
      $display("FAIL %s at %0t: q=%h exp %h error=%b exp %b", what, $time, q, eq, error, ee);
    end
  endtask

  // Each task starts and ends 4 units after a clk edge (after clk_del).
  task automatic op_on_time(input logic [31:0] v);
    d = v; cap = 1;
    @(posedge clk); #4;
    expect_state(v, 1'b0, "on time");
  endtask

  task automatic op_late(input logic [31:0] v);
    logic [31:0] old;
    old = d;                    // the value still on d at the clk edge
    cap = 1;
    @(posedge clk); #1;
    d = v;                      // arrives after clk, before clk_del
    #3;
    expect_state(old, 1'b1, "late, error flagged");
    if (error) n_err++;
    cap = 0;
    // The next operation's result may already arrive during the restore
    // cycle; the restore must still take the shadow value.
    #2 d = ~v;
    @(posedge clk); #4;
    expect_state(v, 1'b0, "late, restored");
  endtask

  task automatic idle(input logic [31:0] v);
    logic [31:0] old;
    old = q;
    cap = 0;
    @(posedge clk); #1;
    d = v;
    #3;
    expect_state(old, 1'b0, "no capture");
  endtask

  initial begin
    logic [31:0] v;
    repeat (2) @(posedge clk);
    #4 rst_n = 1;
    expect_state('0, 1'b0, "reset");
    for (int k = 0; k < 400; k++) begin
      v = $urandom;
      if (v == q || v == d) v = v ^ 32'h0001_0001;
      if (v == q || v == d) v = v ^ 32'h0100_0100;
      case ($urandom_range(0, 3))
        0, 1: op_on_time(v);
        2:    op_late(v);
        default: idle(v);
      endcase
    end
    checks++;
    if (n_err == 0) begin failures++; $display("FAIL: no error ever raised"); end
    $display("errors=%0d", n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

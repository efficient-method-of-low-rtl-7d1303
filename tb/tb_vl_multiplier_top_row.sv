// End-to-end testbench of the variable-latency multiplier built around the
// row-bypassing multiplier (BYPASS = BYPASS_ROW), otherwise at the default
// parameters. It differs from the default testbench, described below, only
// in its name, ROW and the parameter on the instance.
//
// End-to-end testbench of the variable-latency multiplier at its default
// parameters (16 x 16, column bypassing, N = 7, aging window 64 operations,
// limit 4 errors). Its M, ROW and instantiation lines are the only ones that
// differ in the 4 x 4 and row-bypassing variants.
//
// Zero-delay simulation has no late paths, so the testbench gives the
// multiplier output net a path delay of its own: after every edge that loads
// new operands, the net keeps showing the previous product until
//   delay = (4 + (12/M) * ones(judged operand)) * age   time units
// have passed (clock period 10, clk_del 3 units after clk). The judged
// operand is md with column bypassing and mr with row bypassing. While young
// (age = 1.0) an operand with at most M/2 ones, which the AHL (N = M/2 - 1)
// judges short, settles within one period and the others within two. After
// operation AGE_AT the circuit "ages" (age = 1.05): operands with exactly M/2
// ones now settle after 10.5 units, past the clk edge but before clk_del, so
// the Razor flip-flops must catch them; the aging indicator must then switch
// to the stricter judging block, after which no further errors may occur.
//
// Checked: every product against the testbench's own multiplication, in
// order, starting with the worked examples 8 x 4, 2 x 4 and 32 x 2; latency
// 1 for operations judged short, 2 for those judged long, 2 for an operation
// that was re-executed or waited behind a restore; no errors before aging and
// after the indicator switched; that each mechanism (one-cycle operation,
// hold, Razor error and restore, aging switch, stricter judgement, idle
// input) happened at least once.
module tb_vl_multiplier_top_row;
  localparam bit ROW    = 1'b1;     // configuration under test
  localparam int M      = 16;       // operand width of the design under test
  localparam int NT     = M/2 - 1;  // its judging threshold N
  localparam int NOPS   = 1500;
  // Delay per one bit of the judged operand: M/2 ones take exactly 10 units.
  localparam real K     = 12.0 / M;
  localparam logic [M-1:0] HALF = M'((64'(1) << (M/2)) - 1);  // M/2 ones
  localparam int AGE_AT = 400;

  int checks = 0, failures = 0;

  logic        clk = 0, clk_del = 0, rst_n = 0;
  logic        in_valid = 0, in_ready;
  logic [M-1:0] md = '0, mr = '0;
  logic        out_valid, re_execute, aged, hold, predict_one;
  logic [2*M-1:0] product;

  vl_multiplier_top #(.BYPASS(vlm_pkg::BYPASS_ROW)) dut (
    .clk(clk), .clk_del(clk_del), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .md(md), .mr(mr),
    .out_valid(out_valid), .product(product), .re_execute(re_execute),
    .aged(aged), .hold(hold), .predict_one(predict_one)
  );

  always #5 clk = ~clk;
  always @(clk) clk_del <= #3 clk;

  typedef struct {
    logic [2*M-1:0] p;
    int          accept_cycle;
    bit          short_pred;
    bit          errored;
    bit          behind_restore;
  } op_t;

  op_t q[$];
  int  cycle = 0, accepted = 0, completed = 0;
  real age = 1.0;

  // Mechanism counters.
  int n_short = 0, n_hold = 0, n_err = 0, n_strict = 0, n_idle = 0;
  int err_before_age = 0, err_after_switch = 0;
  bit aged_seen = 0;
  int n_fixed = 0;
  bit pend = 0;
  logic [M-1:0] pend_op;

  function automatic int ones_of(input logic [M-1:0] v);
    int n = 0;
    for (int i = 0; i < M; i++) if (v[i]) n++;
    return n;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Path-delay model of the multiplier output net.
  logic [2*M-1:0] prev_true = '0, cur_true = '0;
  int          gen = 0;

  task automatic delay_net(input logic [M-1:0] new_md, input logic [M-1:0] new_mr);
    real d;
    int  my_gen;
    prev_true = cur_true;
    cur_true  = (2*M)'(new_md) * (2*M)'(new_mr);
    d = (4.0 + K * ones_of(ROW ? new_mr : new_md)) * age;
    gen++;
    my_gen = gen;
    force dut.mul_p = prev_true;
    fork
      begin
        #(d - 1.0);
        if (gen == my_gen) release dut.mul_p;
      end
    join_none
  endtask

  initial begin
    logic        load_pre = 0, acc_pre = 0, err_pre = 0;
    logic [M-1:0] md_pre = '0, mr_pre = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    while (completed < NOPS && cycle < 20 * NOPS) begin
      @(posedge clk);
      cycle++;
      #1;
      if (load_pre) delay_net(md_pre, mr_pre);
      if (accepted == AGE_AT && age == 1.0) age = 1.05;
      // New input once the previous one was taken (or none was offered).
      if (acc_pre || !in_valid) begin
        in_valid = ($urandom_range(0, 9) != 0) && (accepted < NOPS);
        md = M'($urandom);
        case ($urandom_range(0, 3))
          0: md = md & M'($urandom);
          1: md = md | M'($urandom);
          default: ;
        endcase
        mr = M'($urandom);
        if (ROW) {md, mr} = {mr, md};       // the judged operand is mr
        if ($urandom_range(0, 7) == 0) begin  // exactly M/2 ones
          if (ROW) mr = HALF; else md = HALF;
        end
        // The worked examples first: 8 x 4, 2 x 4 (and 32 x 2 when it fits).
        if (n_fixed < ((M >= 8) ? 3 : 2)) begin
          in_valid = 1;
          case (n_fixed)
            0: begin md = M'(8);  mr = M'(4); end
            1: begin md = M'(2);  mr = M'(4); end
            default: begin md = M'(32); mr = M'(2); end
          endcase
          n_fixed++;
        end
      end
      if (!in_valid) n_idle++;
      #8;
      // One time unit before the next edge: sample.
      load_pre = in_ready;
      md_pre   = md;
      mr_pre   = mr;
      acc_pre  = in_valid && in_ready;
      // The AHL judged the operand taken on the last edge at the falling edge
      // since, with the aging state of that moment, which is still current.
      if (pend) begin
        q[$].short_pred = (M - ones_of(pend_op)) > (aged ? NT + 1 : NT);
        if (aged && ones_of(pend_op) == M/2) n_strict++;
        pend = 0;
      end
      if (hold) n_hold++;
      if (re_execute && !err_pre) begin
        n_err++;
        if (!aged_seen && age == 1.0) err_before_age++;
        if (aged_seen) err_after_switch++;
        if (q.size() > 0) q[0].errored = 1;
        if (q.size() > 1) q[1].behind_restore = 1;
      end
      err_pre = re_execute;
      if (aged && !aged_seen) begin
        aged_seen = 1;
        $display("aging indicated at cycle %0d after %0d operations", cycle, completed);
      end
      if (out_valid) begin
        op_t o;
        int  lat;
        checks++;
        if (q.size() == 0) begin
          failures++;
          $display("FAIL cycle %0d: output with nothing outstanding", cycle);
        end else begin
          o = q.pop_front();
          // Accepted on the edge after accept_cycle's sample, shown after
          // the capture edge: cycles between those two edges.
          lat = cycle - o.accept_cycle - 1;
          if (product !== o.p) begin
            failures++;
            $display("FAIL cycle %0d: product %h expected %h", cycle, product, o.p);
          end
          checks++;
          // Short: 1 cycle, or 2 when the restore of the previous result
          // held it. Long: 2. Re-executed (only short ones can be): 2.
          if ((o.errored && (lat != 2 || !o.short_pred)) ||
              (!o.errored && o.short_pred && lat != (o.behind_restore ? 2 : 1)) ||
              (!o.errored && !o.short_pred && lat != 2)) begin
            failures++;
            $display("FAIL cycle %0d: latency %0d short=%0d err=%0d", cycle, lat, o.short_pred, o.errored);
          end
          if (o.short_pred && lat == 1) n_short++;
          completed++;
        end
      end
      if (acc_pre) begin
        op_t o;
        o.p = (2*M)'(md) * (2*M)'(mr);
        o.accept_cycle = cycle;
        o.short_pred = 0;             // set at the next sample
        o.errored = 0;
        o.behind_restore = 0;
        q.push_back(o);
        pend    = 1;
        pend_op = ROW ? mr : md;
        accepted++;
      end
    end
    checks++;
    if (completed != NOPS) begin failures++; $display("FAIL: only %0d of %0d completed", completed, NOPS); end
    checks++;
    if (err_before_age != 0 || err_after_switch != 0) begin
      failures++;
      $display("FAIL: errors before aging %0d, after the switch %0d", err_before_age, err_after_switch);
    end
    $display("one-cycle=%0d holds=%0d razor_errors=%0d aged=%0d strict_judgements=%0d idle=%0d",
             n_short, n_hold, n_err, aged_seen, n_strict, n_idle);
    checks++;
    if (n_short == 0 || n_hold == 0 || n_err == 0 || !aged_seen || n_strict == 0 || n_idle == 0) begin
      failures++;
      $display("FAIL: a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench of the row-bypassing multiplier.
// A 4 x 4 instance is checked exhaustively (all 256 operand pairs) and a
// 16 x 16 instance (the default size) with corner cases, the worked examples
// 8 x 4 = 32, 2 x 4 = 8 and 32 x 2 = 64, and random operands, including
// operands with many zero bits so that most rows are bypassed. The
// reference is the simulator's own multiplication. At 16 x 16 the testbench
// also checks that every bypassed adder has all its inputs held at 0.
module tb_row_bypass_multiplier;
  int checks = 0, failures = 0;

  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic [15:0] a16, b16;
  logic [31:0] p16;

  row_bypass_multiplier #(.M(4)) u_m4  (.a(a4),  .b(b4),  .p(p4));
  row_bypass_multiplier          u_m16 (.a(a16), .b(b16), .p(p16));

  // Operand isolation: an adder whose row is bypassed (b[j] = 0) must
  // see all three inputs at 0, so that it does not toggle.
  logic [15:0] iso_bad [1:15];
  for (genvar j = 1; j < 16; j++) begin : g_iso_r
    for (genvar i = 0; i < 16; i++) begin : g_iso_c
      assign iso_bad[j][i] = !b16[j] &
        (u_m16.g_row[j].g_fa.g_col[i].fa_x | u_m16.g_row[j].g_fa.g_col[i].fa_y |
         u_m16.g_row[j].g_fa.g_col[i].fa_ci);
    end
  end
  int n_bypassed = 0;

  task automatic check16(input logic [15:0] x, input logic [15:0] y);
    a16 = x; b16 = y;
    #1;
    checks++;
    for (int j = 1; j < 16; j++) begin
      if (iso_bad[j] != '0) begin
        failures++;
        $display("FAIL isolation: %0d * %0d, row %0d inputs active in a bypassed cell", x, y, j);
      end
    end
    for (int k = 0; k < 16; k++) if (!b16[k]) n_bypassed++;
    checks++;
    if (p16 !== 32'(x) * 32'(y)) begin
      failures++;
      $display("FAIL 16x16: %0d * %0d gave %0d", x, y, p16);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j);
        #1;
        checks++;
        if (p4 !== 8'(i * j)) begin
          failures++;
          $display("FAIL 4x4: %0d * %0d gave %0d", i, j, p4);
        end
      end
    end
    check16(16'd8, 16'd4);
    check16(16'd2, 16'd4);
    check16(16'd32, 16'd2);
    check16(16'hFFFF, 16'hFFFF);
    check16(16'h0000, 16'hFFFF);
    check16(16'hFFFF, 16'h0000);
    check16(16'h8000, 16'h8000);
    check16(16'hAAAA, 16'h5555);
    check16(16'h5555, 16'hFFFF);
    for (int k = 0; k < 3000; k++) begin
      logic [15:0] x, y;
      x = 16'($urandom);
      y = 16'($urandom);
      if (k % 3 == 1) y = y & 16'($urandom) & 16'($urandom);  // sparse multiplier
      check16(x, y);
    end
    checks++;
    if (n_bypassed == 0) begin failures++; $display("FAIL: no row was ever bypassed"); end
    $display("bypassed rows seen: %0d", n_bypassed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

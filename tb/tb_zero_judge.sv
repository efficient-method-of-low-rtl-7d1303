// Self-checking testbench of the judging block: every 8-bit operand against
// thresholds 3 and 4, and random 16-bit operands at the default threshold,
// compared with a zero count made bit by bit in the testbench.
module tb_zero_judge;
  int checks = 0, failures = 0;

  logic [7:0]  x8;
  logic [15:0] x16;
  logic        j3, j4, j16;

  zero_judge #(.M(8), .THRESH(3)) u_j3  (.x(x8), .more_zeros(j3));
  zero_judge #(.M(8), .THRESH(4)) u_j4  (.x(x8), .more_zeros(j4));
  zero_judge                      u_j16 (.x(x16), .more_zeros(j16));

  function automatic int zeros_of(input logic [15:0] v, input int w);
    int z = 0;
    for (int i = 0; i < w; i++) if (v[i] == 1'b0) z++;
    return z;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      x8 = 8'(v);
      #1;
      checks += 2;
      if (j3 !== (zeros_of(16'(v), 8) > 3)) begin failures++; $display("FAIL t3 %b", x8); end
      if (j4 !== (zeros_of(16'(v), 8) > 4)) begin failures++; $display("FAIL t4 %b", x8); end
    end
    for (int k = 0; k < 2000; k++) begin
      x16 = 16'($urandom);
      if (k % 2 == 0) x16 = x16 & 16'($urandom);
      #1;
      checks++;
      if (j16 !== (zeros_of(x16, 16) > 7)) begin failures++; $display("FAIL t7 %b", x16); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Row-bypassing array multiplier, M x M bits, unsigned, combinational.
//
// Same carry-save array as the column-bypassing multiplier: row 0 holds the
// partial products a[i]&b[0], row j (1..M-1) holds M full adders of weight
// i+j adding a[i]&b[j], the sum from the row above and a carry, and a final
// ripple-carry row forms p[2M-1:M]. Here the multiplier bit b[j] selects the
// bypass: when b[j] is 0 the whole row j adds nothing, so its full adders are
// isolated (inputs forced to 0, in place of tri-state gates) and
// multiplexers pass the row above down: each sum keeps its weight by moving
// one position as in normal operation, and each carry moves one position to
// the right so that its weight is kept too. The carry leaving the right edge
// of a bypassed row has weight j; a column of extra full adders at the right
// edge (one per row from row 2 on, since row 1 receives no carries) adds it
// into product bit p[j], passing their own carries down the column and the
// last one into the ripple row. The bypass rule, the isolation and the extra
// right-edge adders gated by the inverted multiplier bit follow the
// described design; the exact wiring of that right-edge column is this
// implementation's own, chosen so that the product is exact.
//
// Ports: a = multiplicand, b = multiplier (its bits select the bypass),
// p = a*b. No clock.
module row_bypass_multiplier #(
  parameter int unsigned M = 16
) (
  input  logic [M-1:0]   a,
  input  logic [M-1:0]   b,
  output logic [2*M-1:0] p
);
  // Per row: sums s (s[M] is the missing cell beyond the left edge, 0),
  // carries c, and e, the carry out of the right-edge extra adder (weight
  // j+1).
  for (genvar j = 0; j < M; j++) begin : g_row
    logic [M:0]   s;
    logic [M-1:0] c;
    logic         e;
    assign s[M] = 1'b0;
    if (j == 0) begin : g_pp
      assign s[M-1:0] = a & {M{b[0]}};
      assign c        = '0;
      assign e        = 1'b0;
      assign p[0]     = s[0];
    end else begin : g_fa
      for (genvar i = 0; i < M; i++) begin : g_col
        logic fa_x, fa_y, fa_ci, fa_s, fa_co;
        logic byp_c;
        // Operand isolation: inputs held at 0 while the row is bypassed.
        assign fa_x  = b[j] & a[i];
        assign fa_y  = b[j] & g_row[j-1].s[i+1];
        assign fa_ci = b[j] & g_row[j-1].c[i];
        full_adder u_fa (.x(fa_x), .y(fa_y), .ci(fa_ci), .s(fa_s), .co(fa_co));
        // Bypassed carry: the carry of weight i+j+1 from the row above.
        if (i < M - 1) begin : g_bc
          assign byp_c = g_row[j-1].c[i+1];
        end else begin : g_bz
          assign byp_c = 1'b0;
        end
        assign s[i] = b[j] ? fa_s  : g_row[j-1].s[i+1];
        assign c[i] = b[j] ? fa_co : byp_c;
      end
      // Right-edge extra adder: adds the carry that a bypassed row pushes
      // out at weight j, plus the extra carry from the row above.
      logic x_right;
      assign x_right = ~b[j] & g_row[j-1].c[0];
      full_adder u_fx (.x(s[0]), .y(x_right), .ci(g_row[j-1].e), .s(p[j]), .co(e));
    end
  end

  // Final ripple-carry row, carry-in = the last right-edge carry (weight M).
  logic [M-1:0] rc;
  assign rc[0] = g_row[M-1].e;
  for (genvar i = 0; i < M-1; i++) begin : g_rca
    full_adder u_fa (.x(g_row[M-1].s[i+1]), .y(g_row[M-1].c[i]), .ci(rc[i]),
                     .s(p[M+i]), .co(rc[i+1]));
  end
  // Top position: its sum input is the 0 beyond the left edge and its carry
  // out is provably 0 (an M x M product fits in 2M bits), so it is not formed.
  assign p[2*M-1] = g_row[M-1].s[M] ^ g_row[M-1].c[M-1] ^ rc[M-1];
endmodule

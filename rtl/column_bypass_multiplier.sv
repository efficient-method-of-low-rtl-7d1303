// Column-bypassing array multiplier, M x M bits, unsigned, combinational.
//
// The structure is the classic carry-save array: row 0 is the partial
// products a[i]&b[0]; each following row j (1..M-1) holds M full adders
// FA(i,j) of weight i+j that add the partial product a[i]&b[j], the sum of
// FA(i+1,j-1) coming down from the row above, and the carry of FA(i,j-1).
// Carries therefore run along the diagonal of one multiplicand bit a[i].
// Bit p[j] leaves at the right edge of row j; a ripple-carry row of M full
// adders then adds the last row's sums and carries into p[2M-1:M].
//
// Column bypassing: when a[i] is 0, every full adder of diagonal i has a zero
// partial product and a zero carry-in, so its sum equals the sum from the
// adder above and its carry is 0. Such an adder is then isolated (its three
// inputs are forced to 0, standing in for the tri-state gates that turn its
// input path off) and a 2:1 multiplexer selected by a[i] passes the upper sum
// down instead, with carry 0. The array shape, the bypass rule and the final
// ripple row follow the described design; the AND-gate isolation in place of
// tri-state gates is this implementation's choice (no internal tri-states).
//
// Ports: a = multiplicand (its bits select the bypass), b = multiplier,
// p = a*b. No clock; the worst-case path runs through the carry-save array
// and the ripple row, and it shortens as more multiplicand bits are 0.
module column_bypass_multiplier #(
  parameter int unsigned M = 16
) (
  input  logic [M-1:0]   a,
  input  logic [M-1:0]   b,
  output logic [2*M-1:0] p
);
  // Each row r of generate block g_row keeps its own sums s (s[M] is the
  // missing cell beyond the left edge, always 0) and carries c.
  for (genvar j = 0; j < M; j++) begin : g_row
    logic [M:0]   s;
    logic [M-1:0] c;
    assign s[M] = 1'b0;
    if (j == 0) begin : g_pp
      // Row 0: partial products only.
      assign s[M-1:0] = a & {M{b[0]}};
      assign c        = '0;
    end else begin : g_fa
      for (genvar i = 0; i < M; i++) begin : g_col
        logic fa_x, fa_y, fa_ci, fa_s, fa_co;
        // Operand isolation: inputs held at 0 while the column is bypassed.
        assign fa_x  = a[i] & b[j];
        assign fa_y  = a[i] & g_row[j-1].s[i+1];
        assign fa_ci = a[i] & g_row[j-1].c[i];
        full_adder u_fa (.x(fa_x), .y(fa_y), .ci(fa_ci), .s(fa_s), .co(fa_co));
        // Bypass multiplexer selected by the multiplicand bit.
        assign s[i] = a[i] ? fa_s  : g_row[j-1].s[i+1];
        assign c[i] = a[i] ? fa_co : 1'b0;
      end
    end
    // Low half of the product leaves at the right edge of each row.
    assign p[j] = s[0];
  end

  // Final ripple-carry row: weight M+i adds s[i+1] and c[i] of the last row.
  // The top position's sum input is the 0 beyond the left edge, and its
  // carry-out is provably 0 (an M x M product fits in 2M bits), so that
  // carry is not formed.
  logic [M-1:0] rc;
  assign rc[0] = 1'b0;
  for (genvar i = 0; i < M-1; i++) begin : g_rca
    full_adder u_fa (.x(g_row[M-1].s[i+1]), .y(g_row[M-1].c[i]), .ci(rc[i]),
                     .s(p[M+i]), .co(rc[i+1]));
  end
  assign p[2*M-1] = g_row[M-1].s[M] ^ g_row[M-1].c[M-1] ^ rc[M-1];
endmodule

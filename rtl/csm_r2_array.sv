// csm_r2_array: radix-2 carry-save adder array whose most significant half
// comes out early, most significant digit first.
//
// Elementary products are formed with AND gates. For two's complement
// operands (SIGNED = 1) the Baugh-Wooley scheme with Blankenship's extension
// is used: with m = n-1, the products that involve exactly one sign bit are
// complemented (~x[i]&y[m], x[m]&~y[j]), x[m] + y[m] is added at weight m
// through a half adder, and (x[m] | y[m]) is added at weights 2n-2 and 2n-1.
// For unsigned operands (SIGNED = 0) the plain products x[i]&y[j] are used and
// the half adder and OR term are left out.
//
// Structure (n = 5 is the case drawn in the original description):
//  * A triangle of (n-1)^2 full adders. Row r (r = 1 .. n-1) covers weights
//    r .. 2n-2-r. A cell at (r, w) adds the sum of (r-1, w), the carry of
//    (r-1, w-1) and one new elementary product; row 1 adds two or three
//    products (the third input is 0 in columns that have one bit to spare).
//    Columns 1 .. n-1 end in one bit each: z[w] after w full-adder delays.
//  * A diagonal line of n-1 full adders, one per weight w = n .. 2n-2. Each
//    adds the three bits that the triangle leaves in column w. Its sum and
//    the carry of the diagonal adder one weight below form the carry-sum
//    digit p_k = c_k + s_k of weight 2^(2n-k), k = 2n-w. Carries are not
//    rippled along the diagonal. p_1 pairs the OR term with the carry of the
//    weight 2n-2 adder; the sum of the weight-n adder is z[n].
// Timing (in full-adder delays): p_1 after 2, p_k after k+1, p_(n-1) and the
// n+1 least significant bits after n. Purely combinational.
//
// The placement of each product in the triangle follows the n = 5 drawing:
// in columns w >= n-1 the order is ~x[w-m]&y[m], the plain products with
// rising x index, x[m]&~y[w-m], then the half-adder bit; in lower columns the
// plain products with falling x index. The general-n rule is this design's
// extrapolation of that drawing. The third (zero) input of the weight 2n-2
// diagonal adder is also this design's reading.
module csm_r2_array #(
  parameter int unsigned N      = 5,     // operand width n (n >= 3)
  parameter bit          SIGNED = 1'b1   // 1: two's complement, 0: unsigned
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N:0]   z_lo,   // result bits 0 .. n, final
  output logic [N-1:1] c_msd,  // carry bit of digit p_k, weight 2^(2n-k)
  output logic [N-1:1] s_msd   // sum bit of digit p_k,   weight 2^(2n-k)
);
  localparam int unsigned M    = N - 1;      // index of the sign bit
  localparam int unsigned WTOP = 2 * N - 3;  // highest triangle column
  localparam int unsigned TMAX = N + 2;      // products per column, upper bound

  // number of triangle rows in column w
  function automatic int unsigned rows(input int unsigned w);
    return (w < 2 * N - 2 - w) ? w : 2 * N - 2 - w;
  endfunction

  // a column is full (no zero input in row 1) only where the signed scheme
  // adds the half-adder bit
  function automatic bit spare(input int unsigned w);
    return !(SIGNED && (w == M || w == N));
  endfunction

  initial begin
    assert (N >= 3) else $error("csm_r2_array: N must be at least 3");
  end

  // ---------------------------------------------------------------- products
  logic ha_s, ha_c;
  logic or_top;  // bit added at weights 2n-2 and 2n-1 (x[m]&y[m] if unsigned)
  csm_ha u_ha (.a(SIGNED ? x[M] : 1'b0), .b(SIGNED ? y[M] : 1'b0), .s(ha_s), .co(ha_c));
  assign or_top = SIGNED ? (x[M] | y[M]) : (x[M] & y[M]);

  logic [TMAX-1:0] t [1:WTOP];  // products of column w, in order of use

  always_comb begin
    for (int unsigned w = 1; w <= WTOP; w++) begin
      int unsigned k;
      t[w] = '0;
      k = 0;
      if (w >= M) begin
        t[w][k] = (SIGNED ? ~x[w-M] : x[w-M]) & y[M];
        k++;
        for (int unsigned i = w - M + 1; i < M; i++) begin
          t[w][k] = x[i] & y[w-i];
          k++;
        end
        t[w][k] = x[M] & (SIGNED ? ~y[w-M] : y[w-M]);
        k++;
        if (SIGNED && w == M) t[w][k] = ha_s;
        if (SIGNED && w == N) t[w][k] = ha_c;
      end else begin
        for (int i = int'(w); i >= 0; i--) begin
          t[w][k] = x[i] & y[int'(w)-i];
          k++;
        end
      end
    end
  end

  // ---------------------------------------------------------------- triangle
  // g_col[w].g_row[r].g_cell holds the full adder at row r, column w: its sum
  // s (weight w) and carry co (weight w+1).
  for (genvar w = 1; w <= WTOP; w++) begin : g_col
    for (genvar r = 1; r <= rows(w); r++) begin : g_row
      if (r == 1) begin : g_cell
        logic s, co;
        csm_fa u_fa (.a(t[w][0]), .b(spare(w) ? 1'b0 : t[w][2]), .ci(t[w][1]),
                     .s(s), .co(co));
      end else begin : g_cell
        localparam int unsigned TI = (spare(w) ? 2 : 3) + r - 2;
        logic s, co;
        csm_fa u_fa (.a(g_col[w].g_row[r-1].g_cell.s), .b(t[w][TI]),
                     .ci(g_col[w-1].g_row[r-1].g_cell.co), .s(s), .co(co));
      end
    end
  end

  // ---------------------------------------------------------------- diagonal
  logic [2*N-2:N] d_s, d_c;  // diagonal adder at weight w

  for (genvar w = N; w <= 2 * N - 2; w++) begin : g_diag
    if (w == 2 * N - 2) begin : g_msb
      csm_fa u_fa (.a(or_top), .b(1'b0), .ci(g_col[WTOP].g_row[1].g_cell.co),
                   .s(d_s[w]), .co(d_c[w]));
    end else begin : g_mid
      csm_fa u_fa (.a(g_col[w].g_row[rows(w)].g_cell.s),
                   .b(g_col[w-1].g_row[rows(w)].g_cell.co),
                   .ci(g_col[w-1].g_row[rows(w)+1].g_cell.co),
                   .s(d_s[w]), .co(d_c[w]));
    end
  end

  // ---------------------------------------------------------------- outputs
  assign z_lo[0] = x[0] & y[0];
  for (genvar w = 1; w < N; w++) begin : g_zlo
    assign z_lo[w] = g_col[w].g_row[w].g_cell.s;
  end
  assign z_lo[N] = d_s[N];

  assign s_msd[1] = SIGNED ? or_top : 1'b0;
  assign c_msd[1] = d_c[2*N-2];
  for (genvar k = 2; k <= M; k++) begin : g_msd
    assign s_msd[k] = d_s[2*N-k];
    assign c_msd[k] = d_c[2*N-k-1];
  end
endmodule

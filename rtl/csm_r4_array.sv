// csm_r4_array: radix-4 adder array whose most significant half comes out as
// redundant radix-4 digits, ready for the radix-4 on-the-fly converter.
//
// Output format:
//  * z_lo: the n+2 least significant product bits, final.
//  * n/2-1 redundant radix-4 digits p_i, most significant first. Digit i has
//    two bits c1[i], s1[i] of weight 2^(2n-2i+1) and one bit c0[i] of weight
//    2^(2n-2i), so p_i = 2*(c1+s1) + c0 lies in 0 .. 5.
//
// Structure:
//  * Elementary products are formed radix-2 with AND gates. For two's
//    complement operands (SIGNED = 1) the Baugh-Wooley/Blankenship terms are
//    used: products with exactly one sign bit complemented, x[n-1] and y[n-1]
//    added at weight n-1, and (x[n-1] | y[n-1]) added at weights 2n-2 and
//    2n-1 in place of x[n-1]&y[n-1].
//  * n/2 rows of basic processing elements, (5,3) counters (csm_bpe). Row r
//    (r = 0 .. n/2-1) has cells at weights 2r .. 2r+n. The cell at weight w
//    adds x[w-2r]&y[2r] and x[w-2r-1]&y[2r+1] (zero where out of range) to
//    the three bits the row above leaves at weight w: its xi from weight w,
//    its eta from weight w-1 and its mu from weight w-2. Row 0 takes the two
//    sign inputs of the Baugh-Wooley scheme on its free inputs at weight n-1.
//  * Low edge: each row leaves one bit at weight 2r and two at weight 2r+1
//    that no later row takes. A ripple of half adders (even weights) and full
//    adders (odd weights) turns them into z[0 .. n-1]; since each row adds two
//    columns, the ripple keeps pace with the rows.
//  * High edge: after the last row every weight n .. 2n-2 holds three bits.
//    A diagonal line of full adders (no carry passed along it) leaves two
//    bits per weight; at weight n the sum meets the ripple carry in a half
//    adder to give z[n].
//  * A diagonal of 2-bit full adders (csm_cla2), one per digit, passing no
//    carries to each other: adder i takes two bits of weight 2^(2n-2i)
//    (alpha, beta) and the bits of weight 2^(2n-2i-1) (gamma, delta, and for
//    the last adder the ripple carry on epsilon). Its mu and eta become c1[i]
//    and c0[i], its xi becomes s1[i+1] (for the last adder: z[n+1]). s1[1]
//    is the XOR of what is left at weight 2^(2n-1); carries beyond it are
//    discarded (result modulo 2^(2n)).
// Delay, in cell delays after the AND gates: n/2 counters, then one full
// adder and one 2-bit adder for the digits; the low bits follow the rows
// through the edge ripple.
//
// The row arrangement, the counters and both diagonals follow the original
// radix-4 scheme's description; the exact cell-by-cell wiring of its drawing
// is not reproduced. In particular its digits leave the array one counter
// delay apart, most significant first, while here they all leave after the
// last row. The half-adder/full-adder ripple of the low edge is this
// design's own version of the edge cells, which the original takes from
// earlier radix-4 arrays. Purely combinational.
module csm_r4_array #(
  parameter int unsigned N      = 8,    // operand width n (even, n >= 4)
  parameter bit          SIGNED = 1'b1  // 1: two's complement, 0: unsigned
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [N+1:0]   z_lo,  // result bits 0 .. n+1, final
  output logic [N/2-1:1] c1,    // digit i: carry bit, weight 2^(2n-2i+1)
  output logic [N/2-1:1] s1,    // digit i: sum bit,   weight 2^(2n-2i+1)
  output logic [N/2-1:1] c0     // digit i: bit of weight 2^(2n-2i)
);
  localparam int unsigned M  = N - 1;      // index of the sign bit
  localparam int unsigned H  = N / 2;      // rows of counters
  localparam int unsigned ND = N / 2 - 1;  // redundant digits

  initial begin
    assert (N >= 4 && N % 2 == 0) else $error("csm_r4_array: N must be even and >= 4");
  end

  // ---------------------------------------------------------------- products
  logic [N-1:0] pp [N];  // pp[i][j]: elementary product of x[i] and y[j]
  always_comb begin
    for (int i = 0; i < int'(N); i++) begin
      for (int j = 0; j < int'(N); j++) begin
        if (SIGNED && i == int'(M) && j == int'(M)) pp[i][j] = x[M] | y[M];
        else if (SIGNED && i == int'(M))            pp[i][j] = x[i] & ~y[j];
        else if (SIGNED && j == int'(M))            pp[i][j] = ~x[i] & y[j];
        else                                        pp[i][j] = x[i] & y[j];
      end
    end
  end

  // -------------------------------------------------------- rows of counters
  // g_row[r].g_col[w].g_cell: counter of row r at weight w; its xi has weight
  // w, its eta weight w+1 and its mu weight w+2.
  for (genvar r = 0; r < H; r++) begin : g_row
    for (genvar w = 2 * r; w <= 2 * r + N; w++) begin : g_col
      if (1) begin : g_cell
        logic a, b, g, d, e, mu, eta, xi;
        if (w - 2 * r < N) begin : g_a
          assign a = pp[w-2*r][2*r];
        end else begin : g_a0
          assign a = 1'b0;
        end
        if (w >= 2 * r + 1) begin : g_b
          assign b = pp[w-2*r-1][2*r+1];
        end else begin : g_b0
          assign b = 1'b0;
        end
        if (r == 0) begin : g_first
          assign g = (SIGNED && w == M) ? x[M] : 1'b0;
          assign d = (SIGNED && w == M) ? y[M] : 1'b0;
          assign e = 1'b0;
        end else begin : g_next
          // the row above spans weights 2r-2 .. 2r-2+n
          if (w <= 2 * r - 2 + N) begin : g_g
            assign g = g_row[r-1].g_col[w].g_cell.xi;
          end else begin : g_g0
            assign g = 1'b0;
          end
          if (w - 1 <= 2 * r - 2 + N) begin : g_d
            assign d = g_row[r-1].g_col[w-1].g_cell.eta;
          end else begin : g_d0
            assign d = 1'b0;
          end
          assign e = g_row[r-1].g_col[w-2].g_cell.mu;
        end
        csm_bpe u_bpe (.alpha(a), .beta(b), .gamma(g), .delta(d), .epsilon(e),
                       .mu(mu), .eta(eta), .xi(xi));
      end
    end
  end

  // ------------------------------------------------------- low-edge ripple
  // row r leaves xi at weight 2r, and xi and eta (from weight 2r) at 2r+1
  logic [N+1:0] rc;  // ripple carry into weight w
  assign rc[0] = 1'b0;
  for (genvar r = 0; r < H; r++) begin : g_edge
    csm_ha u_even (.a(g_row[r].g_col[2*r].g_cell.xi), .b(rc[2*r]),
                   .s(z_lo[2*r]), .co(rc[2*r+1]));
    csm_fa u_odd (.a(g_row[r].g_col[2*r+1].g_cell.xi), .b(g_row[r].g_col[2*r].g_cell.eta),
                  .ci(rc[2*r+1]), .s(z_lo[2*r+1]), .co(rc[2*r+2]));
  end

  // ------------------------------------------------ full-adder diagonal
  // last row: cells at weights n-2 .. 2n-2; weight w holds its xi from w,
  // eta from w-1 and mu from w-2. The mu from 2n-2 (weight 2n) is dropped.
  logic [2*N-2:N] fd_s, fd_c;  // fd_c[w] has weight w+1
  for (genvar w = N; w <= 2 * N - 2; w++) begin : g_fd
    csm_fa u_fa (.a(g_row[H-1].g_col[w].g_cell.xi), .b(g_row[H-1].g_col[w-1].g_cell.eta),
                 .ci(g_row[H-1].g_col[w-2].g_cell.mu), .s(fd_s[w]), .co(fd_c[w]));
  end
  csm_ha u_zn (.a(fd_s[N]), .b(rc[N]), .s(z_lo[N]), .co(rc[N+1]));

  assign s1[1] = g_row[H-1].g_col[2*N-2].g_cell.eta ^ g_row[H-1].g_col[2*N-3].g_cell.mu
                 ^ fd_c[2*N-2] ^ (SIGNED ? (x[M] | y[M]) : 1'b0);

  // ------------------------------------------------ 2-bit adder diagonal
  logic [ND:1] xi;
  for (genvar i = 1; i <= ND; i++) begin : g_diag
    localparam int unsigned E = 2 * N - 2 * i;  // weight of alpha, beta
    csm_cla2 u_cla2 (
      .alpha(fd_s[E]), .beta(fd_c[E-1]),
      .gamma(fd_s[E-1]), .delta(fd_c[E-2]),
      .epsilon(i == ND ? rc[N+1] : 1'b0),
      .mu(c1[i]), .eta(c0[i]), .xi(xi[i]));
    if (i < ND) begin : g_next
      assign s1[i+1] = xi[i];
    end
  end
  assign z_lo[N+1] = xi[ND];
endmodule

// dadda_multiplier: unsigned N x N partial-product generator and Dadda
// reduction tree, ending in two rows whose sum is the product.
//
// Every multiplicand bit a[i] is ANDed with every multiplier bit b[j]; the
// N*N bits fall into columns c = i + j. The columns are then reduced stage by
// stage with full and half adders, following the Dadda height sequence
// (..., 28, 19, 13, 9, 6, 4, 3, 2; build_sched below works out every stage),
// until no column holds more than two bits. For N = 32 that is 8 stages with 899 full adders and 31 half
// adders. The remaining two bits of each column form row0 and row1 (zero
// where a column has fewer bits, so row1[0], row0[2N-1] and row1[2N-1] are
// constant 0); row0 + row1 = a * b modulo 2^(2N), which is exact because the
// product fits in 2N bits.
//
// The final two-row addition is not done here: in the MAC it is folded into
// the carry save adder together with the accumulator. Purely combinational.
// The AND-array partial products and the stage-by-stage reduction along the
// Dadda sequence follow the design; the per-column adder rule is the standard
// Dadda one, and the flat stage vector and the bit order within a column are
// this implementation's own.
module dadda_multiplier
  import dadda_pkg::*;
#(
  parameter int N = 32
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] row0,
  output logic [2*N-1:0] row1
);
  localparam int S = num_stages(N);

  // Schedule table: entry [s][c][field], 16 bits each. Stage S is the final
  // two-row result (no adders); stage S+1 only carries the grand total in
  // its Q_BASE. Column 2N is an all-zero sentinel apart from Q_OFFSET (the
  // stage's total) and Q_BASE.
  typedef logic [S+1:0][2*N:0][4:0][15:0] sched_t;

  function automatic sched_t build_sched();
    sched_t r;
    int h  [2*N];
    int fa [2*N];
    int ha [2*N];
    int tgt[S+1];
    int t, e, cin, below, base;
    for (int st = 0; st <= S + 1; st++)
      for (int i = 0; i <= 2 * N; i++)
        for (int f = 0; f < 5; f++) r[st][i][f] = '0;
    tgt[0] = 2;
    for (int j = 1; j < S; j++) tgt[j] = (tgt[j-1] * 3) / 2;
    for (int i = 0; i < 2 * N; i++) h[i] = (i < N) ? i + 1 : 2 * N - 1 - i;
    base = 0;
    for (int st = 0; st <= S; st++) begin
      t   = (st < S) ? tgt[S - 1 - st] : 2 * N;
      below = 0;
      for (int i = 0; i < 2 * N; i++) begin
        cin   = (i > 0) ? fa[i-1] + ha[i-1] : 0;
        e     = h[i] + cin - t;
        fa[i] = (e > 0) ? e / 2 : 0;
        ha[i] = (e > 0) ? e % 2 : 0;
        r[st][i][Q_HEIGHT] = 16'(h[i]);
        r[st][i][Q_FA]     = 16'(fa[i]);
        r[st][i][Q_HA]     = 16'(ha[i]);
        r[st][i][Q_OFFSET] = 16'(below);
        r[st][i][Q_BASE]   = 16'(base);
        below += h[i];
      end
      r[st][2*N][Q_OFFSET] = 16'(below);
      r[st][2*N][Q_BASE]   = 16'(base);
      base += below;
      // heights entering the next stage (top column first, so fa/ha of the
      // column below are still this stage's)
      for (int i = 2 * N - 1; i >= 0; i--)
        h[i] = h[i] - 2 * fa[i] - ha[i] + ((i > 0) ? fa[i-1] + ha[i-1] : 0);
    end
    r[S+1][0][Q_BASE] = 16'(base);
    return r;
  endfunction

  localparam sched_t SCH   = build_sched();
  localparam int     TOTAL = int'(SCH[S+1][0][Q_BASE]);

  if (N < 2 || N > MAX_N) begin : g_bad_n
    $error("dadda_multiplier: N must be in 2..%0d", MAX_N);
  end

  // All stages' bits: stage s, column c starts at SCH[s][c][Q_BASE] + SCH[s][c][Q_OFFSET].
  logic [TOTAL-1:0] pp;

  // Stage 0 input: the AND array.
  for (genvar c = 0; c < 2 * N; c++) begin : g_and_col
    localparam int H   = int'(SCH[0][c][Q_HEIGHT]);
    localparam int OFF = int'(SCH[0][c][Q_OFFSET]);
    localparam int I0  = (c < N) ? 0 : c - N + 1;   // lowest a index in column c
    for (genvar k = 0; k < H; k++) begin : g_bit
      assign pp[OFF + k] = a[I0 + k] & b[c - I0 - k];
    end
  end

  // Reduction stages: stage s reads its input bits and writes stage s+1's.
  for (genvar s = 0; s < S; s++) begin : g_stage
    localparam int IB = int'(SCH[s][0][Q_BASE]);
    localparam int OB = int'(SCH[s+1][0][Q_BASE]);
    for (genvar c = 0; c < 2 * N; c++) begin : g_col
      localparam int H    = int'(SCH[s][c][Q_HEIGHT]);
      localparam int F    = int'(SCH[s][c][Q_FA]);
      localparam int HA   = int'(SCH[s][c][Q_HA]);
      localparam int PASS = H - 3 * F - 2 * HA;
      localparam int IN   = IB + int'(SCH[s][c][Q_OFFSET]);
      localparam int OUT  = OB + int'(SCH[s+1][c][Q_OFFSET]);
      // where this column's carries land in column c+1 of the next stage
      // (column 2N is the all-zero sentinel)
      localparam int H1    = int'(SCH[s][c+1][Q_HEIGHT]);
      localparam int F1    = int'(SCH[s][c+1][Q_FA]);
      localparam int HA1   = int'(SCH[s][c+1][Q_HA]);
      localparam int CARRY = OB + int'(SCH[s+1][c+1][Q_OFFSET]) + (H1 - 2 * F1 - HA1);

      if (c == 2 * N - 1 && F + HA > 0) begin : g_bad_top
        $error("dadda_multiplier: schedule puts adders in the top column");
      end

      for (genvar k = 0; k < PASS; k++) begin : g_pass
        assign pp[OUT + k] = pp[IN + 3 * F + 2 * HA + k];
      end
      for (genvar k = 0; k < F; k++) begin : g_fa
        full_adder u_fa (
          .a   (pp[IN + 3 * k]),
          .b   (pp[IN + 3 * k + 1]),
          .cin (pp[IN + 3 * k + 2]),
          .sum (pp[OUT + PASS + k]),
          .cout(pp[CARRY + k])
        );
      end
      for (genvar k = 0; k < HA; k++) begin : g_ha
        half_adder u_ha (
          .a    (pp[IN + 3 * F + 2 * k]),
          .b    (pp[IN + 3 * F + 2 * k + 1]),
          .sum  (pp[OUT + PASS + F + k]),
          .carry(pp[CARRY + F + k])
        );
      end
    end
  end

  // Two rows out of the last stage.
  for (genvar c = 0; c < 2 * N; c++) begin : g_row
    localparam int H   = int'(SCH[S][c][Q_HEIGHT]);
    localparam int OFF = int'(SCH[S][0][Q_BASE]) + int'(SCH[S][c][Q_OFFSET]);
    if (H >= 1) begin : g_r0
      assign row0[c] = pp[OFF];
    end else begin : g_r0z
      assign row0[c] = 1'b0;
    end
    if (H >= 2) begin : g_r1
      assign row1[c] = pp[OFF + 1];
    end else begin : g_r1z
      assign row1[c] = 1'b0;
    end
  end
endmodule

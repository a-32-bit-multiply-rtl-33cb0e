// dadda_pkg: elaboration-time schedule of a Dadda partial-product reduction.
//
// An unsigned N x N multiplication has 2N columns of partial-product bits;
// column c starts with min(c+1, 2N-1-c) bits. Dadda reduction shrinks the
// tallest column in stages whose target heights run down the sequence
// d(1) = 2, d(j+1) = floor(1.5 * d(j)), i.e. ..., 28, 19, 13, 9, 6, 4, 3, 2,
// starting from the largest d(j) below N. In a stage with target d, column c
// holds h bits and receives k carries from column c-1's adders of the same
// stage; if h + k > d it gets floor(e/2) full adders and (e mod 2) half
// adders, e = h + k - d, the fewest that bring it down to d. After the last
// stage every column holds at most two bits.
//
// dadda_multiplier's build_sched() replays that schedule once into a table of
// these fields, so every stage is sized and wired from constants. Bits of all
// stages live in one flat vector: stage s starts at entry [s][*][Q_BASE],
// column c of it Q_OFFSET bits further.
// Inside a column the consumed bits come first (full adders take three each,
// then half adders two each), then the bits that pass through; the next
// stage's column holds, in order, the passed bits, the full-adder sums, the
// half-adder sums, then the carries from the column below (full adders'
// first). Supports N up to MAX_N.
package dadda_pkg;

  localparam int MAX_N = 64;

  // Fields of one schedule entry (stage s, column c).
  typedef enum int {
    Q_HEIGHT = 0,   // bits of column c at the input of stage s
    Q_FA     = 1,   // full adders in column c during stage s
    Q_HA     = 2,   // half adders in column c during stage s
    Q_OFFSET = 3,   // bits of stage s in the columns below c
    Q_BASE   = 4    // bits of all stages before s (same for every c)
  } sched_field_e;

  // Number of reduction stages for an N x N multiplier.
  function automatic int num_stages(int n);
    int d = 2;
    int cnt = 0;
    while (d < n) begin
      cnt++;
      d = (d * 3) / 2;
    end
    return cnt;
  endfunction

endpackage

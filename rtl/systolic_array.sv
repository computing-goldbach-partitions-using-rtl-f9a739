// systolic_array: linear systolic array of N Goldbach cells.
//
// Cell 0 is the leftmost. Both streams enter at cell 0 and move right: V1
// (prime(1), prime(3), prime(5), ...) through two registers per cell, V2
// (prime(P+2N-3), prime(P+2N-5), ... down to prime(1)) through one register
// per cell. The fast descending stream meets the slow ascending one so that
// cell j always sees a pair of odd numbers with the fixed sum
//   K_j = P + 2N - 2 - 2j,
// so the leftmost cell computes G2(P+2N-2) and the rightmost G2(P). Feeding
// both vectors one bit per step for (P+2N-2)/2 steps, followed by at least
// 2N steps of zeros to flush the pipeline, leaves each cell's counters
// holding its partition count, about P/2 steps per pass. Registers must be
// zero (reset, or a complete read-back) before a pass starts.
//
// Read-back: the counters of all cells are chained into one shift register
// of N*(WA+WB) bits, entered at the rightmost cell (rb_in) and leaving at the
// leftmost (rb_out). rb_out shows the next bit before each shift; the first
// bit is the MSB of counter B of cell 0. Shifting in zeros clears the array.
// The stream ends v1_out and v2_out let arrays be cascaded, as on a board
// made of several chips.
//
// Timing: step advances the streams and counts one systolic step; readback
// shifts the chain by one bit. Both are array-wide enables.
module systolic_array #(
  parameter int unsigned N     = goldbach_pkg::N_CELLS,
  parameter int unsigned WA    = goldbach_pkg::WA,
  parameter int unsigned KEY_A = goldbach_pkg::KEY_A,
  parameter int unsigned WB    = goldbach_pkg::WB,
  parameter int unsigned KEY_B = goldbach_pkg::KEY_B
) (
  input  logic clk,
  input  logic rst,
  input  logic step,
  input  logic v1_in,
  input  logic v2_in,
  output logic v1_out,
  output logic v2_out,
  input  logic readback,
  input  logic rb_in,
  output logic rb_out
);

  logic [N:0] v1, v2;      // v1[j] / v2[j] enter cell j
  logic [N:0] rb;          // rb[j+1] enters cell j, rb[j] leaves it

  assign v1[0] = v1_in;
  assign v2[0] = v2_in;
  assign rb[N] = rb_in;

  for (genvar j = 0; j < N; j++) begin : g_cell
    logic [WA-1:0] cnt_a;
    logic [WB-1:0] cnt_b;
    goldbach_cell #(.WA(WA), .KEY_A(KEY_A), .WB(WB), .KEY_B(KEY_B)) u_cell (
      .clk, .rst, .step,
      .x1_in   (v1[j]),
      .x2_in   (v2[j]),
      .x1_out  (v1[j+1]),
      .x2_out  (v2[j+1]),
      .readback,
      .rb_in   (rb[j+1]),
      .rb_out  (rb[j]),
      .cnt_a,
      .cnt_b
    );
  end

  assign v1_out = v1[N];
  assign v2_out = v2[N];
  assign rb_out = rb[0];

endmodule

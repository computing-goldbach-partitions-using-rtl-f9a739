// goldbach_cell: one cell of the linear systolic array.
//
// The cell computes one partition G2(K). Every step it latches one bit of
// each input stream, x1 = prime(a) and x2 = prime(b) with a + b = K, and
// when both are true (inc = x1 AND x2) it advances two pseudo-random-bit-
// generator counters at once. The two generators have coprime periods, so
// after the pass the pair of states gives the count by the Chinese
// remainder theorem.
//
// Streams: x2 crosses the cell through one register (x2_out is x2), x1
// through two (x1 and one extra delay register), so V2 moves at twice the
// speed of V1 and each cell sees a fixed sum a + b. That arrangement, the
// AND gate and the two counters follow the paper; the placement of the extra
// delay at the x1 output is this design's choice within that.
//
// Read-back: with readback high the counters form a shift register
// rb_in -> A[0] .. A[WA-1] -> B[0] .. B[WB-1] -> rb_out, so the first bit
// leaving the cell is the MSB of counter B. Read-back does not move the
// streams.
//
// Timing: all registers advance only on a clock edge where step (for the
// streams and counting) or readback (for the counters) is high; step is the
// array-wide stall control. Synchronous active-high reset clears everything.
module goldbach_cell #(
  parameter int unsigned WA    = goldbach_pkg::WA,
  parameter int unsigned KEY_A = goldbach_pkg::KEY_A,
  parameter int unsigned WB    = goldbach_pkg::WB,
  parameter int unsigned KEY_B = goldbach_pkg::KEY_B
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          step,       // advance the streams by one systolic step
  input  logic          x1_in,      // slow stream V1 from the left neighbour
  input  logic          x2_in,      // fast stream V2 from the left neighbour
  output logic          x1_out,     // V1 to the right neighbour (two delays)
  output logic          x2_out,     // V2 to the right neighbour (one delay)
  input  logic          readback,   // counters act as one shift register
  input  logic          rb_in,      // read-back input from the right neighbour
  output logic          rb_out,     // read-back output to the left neighbour
  output logic [WA-1:0] cnt_a,      // state of generator A
  output logic [WB-1:0] cnt_b       // state of generator B
);

  logic x1, x2, x1_d;
  logic inc;
  logic a_msb;

  always_ff @(posedge clk) begin
    if (rst) begin
      x1   <= 1'b0;
      x2   <= 1'b0;
      x1_d <= 1'b0;
    end else if (step) begin
      x1   <= x1_in;
      x2   <= x2_in;
      x1_d <= x1;
    end
  end

  assign inc    = step & x1 & x2;
  assign x1_out = x1_d;
  assign x2_out = x2;

  prbg_counter #(.WIDTH(WA), .KEY(64'(KEY_A))) u_cnt_a (
    .clk, .rst, .inc, .readback,
    .shift_in (rb_in),
    .state    (cnt_a),
    .shift_out(a_msb)
  );

  prbg_counter #(.WIDTH(WB), .KEY(64'(KEY_B))) u_cnt_b (
    .clk, .rst, .inc, .readback,
    .shift_in (a_msb),
    .state    (cnt_b),
    .shift_out(rb_out)
  );

endmodule

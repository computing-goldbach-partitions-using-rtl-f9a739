// goldbach_top: Goldbach partition co-processor.
//
// The host interface turns the host's alternating V1/V2 sub-vector words
// into one bit of each stream per systolic step, and the linear systolic
// array of N cells counts, in each cell, the odd pairs (x1, x2) with
// x1 + x2 = K and both flagged prime. One pass over
// V1 = prime(1), prime(3), ...  and  V2 = prime(P+2N-3), prime(P+2N-5), ...
// (each (P+2N-2)/2 bits, then zero words for at least 2N steps) leaves
// G2(P+2N-2-2j) in cell j, coded as the states of two pseudo-random bit
// generators. A read-back request then shifts the N*(WA+WB)-bit counter
// chain out through the serializer as W-bit words, clearing the array for
// the next pass. Decoding the generator states into counts (table lookup
// and Chinese remainder theorem) is left to the host.
//
// The array's far-end stream outputs are brought out (v1_tail, v2_tail) so
// that arrays can be cascaded; the read-back chain input of the rightmost
// cell is tied to zero, which is what clears the counters. Interface timing
// is described in host_interface; reset is synchronous and active high.
module goldbach_top #(
  parameter int unsigned N     = goldbach_pkg::N_CELLS,
  parameter int unsigned WA    = goldbach_pkg::WA,
  parameter int unsigned KEY_A = goldbach_pkg::KEY_A,
  parameter int unsigned WB    = goldbach_pkg::WB,
  parameter int unsigned KEY_B = goldbach_pkg::KEY_B,
  parameter int unsigned W     = goldbach_pkg::HOST_WORD
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [W-1:0]           in_data,
  input  logic                   rb_req,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [W-1:0]           out_data,
  output logic                   out_last,
  output goldbach_pkg::if_mode_e mode,
  output logic                   step,
  output logic                   v1_tail,
  output logic                   v2_tail
);

  logic v1_bit, v2_bit, readback, rb_bit;

  host_interface #(.W(W), .CHAIN_BITS(N * (WA + WB))) u_if (
    .clk, .rst,
    .in_valid, .in_ready, .in_data,
    .rb_req,
    .out_valid, .out_ready, .out_data, .out_last,
    .mode,
    .step, .v1_bit, .v2_bit, .readback, .rb_bit
  );

  systolic_array #(.N(N), .WA(WA), .KEY_A(KEY_A), .WB(WB), .KEY_B(KEY_B)) u_array (
    .clk, .rst, .step,
    .v1_in   (v1_bit),
    .v2_in   (v2_bit),
    .v1_out  (v1_tail),
    .v2_out  (v2_tail),
    .readback,
    .rb_in   (1'b0),
    .rb_out  (rb_bit)
  );

endmodule

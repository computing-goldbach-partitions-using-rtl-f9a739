// prbg_counter: carry-free counter made of a pseudo-random bit generator.
//
// Counting follows the generator recurrence: on each increment the state is
// shifted left by one bit, and if the bit shifted out (the MSB, x) was 0 the
// constant KEY is XORed into the result. Starting from zero this walks a
// fixed sequence of states; the position in the sequence is the count, and
// it is recovered off-line from a table of the sequence. Because no bit
// depends on more than its right-hand neighbour, the MSB and its own value,
// there is no carry chain and the clock period is that of one small function.
//
// Each bit is generated from its key bit, as in the paper's specialisation:
//   key bit 0 (F0):  c_i <= c_(i-1)
//   key bit 1 (F1):  c_i <= x ? c_(i-1) : ~c_(i-1)
// with c_(-1) = 0 while counting. In read-back mode every bit takes its right
// neighbour (bit 0 takes shift_in), so counters of many cells chain into one
// long shift register and shift_out (the MSB) feeds the next counter.
// Read-back overrides inc; with neither asserted the state holds.
//
// Interface: state is the current register value; one clock edge per step.
// The synchronous active-high reset clears the state to the zero start value
// of the recurrence. The reset style is a choice of this design.
module prbg_counter #(
  parameter int unsigned    WIDTH = goldbach_pkg::WA,
  parameter logic [63:0]    KEY   = 64'(goldbach_pkg::KEY_A)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             inc,        // count one event
  input  logic             readback,   // shift mode for unloading
  input  logic             shift_in,   // serial input used in read-back mode
  output logic [WIDTH-1:0] state,
  output logic             shift_out   // MSB, serial output in read-back mode
);

  logic             x;
  logic [WIDTH-1:0] nxt;

  assign x         = state[WIDTH-1];
  assign shift_out = state[WIDTH-1];

  // Per-bit next-state functions, selected by the key bit at elaboration.
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    logic prev_rb;    // right neighbour in read-back mode
    logic prev_cnt;   // right neighbour in count mode
    if (i == 0) begin : g_lsb
      assign prev_rb  = shift_in;
      assign prev_cnt = 1'b0;
    end else begin : g_mid
      assign prev_rb  = state[i-1];
      assign prev_cnt = state[i-1];
    end

    if (KEY[i]) begin : g_f1
      always_comb begin
        if (readback)  nxt[i] = prev_rb;
        else if (inc)  nxt[i] = x ? prev_cnt : ~prev_cnt;
        else           nxt[i] = state[i];
      end
    end else begin : g_f0
      always_comb begin
        if (readback)  nxt[i] = prev_rb;
        else if (inc)  nxt[i] = prev_cnt;
        else           nxt[i] = state[i];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) state <= '0;
    else     state <= nxt;
  end

endmodule

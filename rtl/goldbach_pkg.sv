// goldbach_pkg: constants shared by the Goldbach partition array.
//
// The array computes N consecutive binary Goldbach partitions G2(K) at once,
// one per systolic cell. Each cell counts with two carry-free counters built
// from pseudo-random bit generators (PRBG). The sizes below are those of the
// 256-cell build: a 27-bit count split into a 13-bit generator with key 9 and
// a 14-bit generator with key 7. Stepping from zero, these generators have
// periods 8001 and 16382, which are coprime, so the pair of states names any
// count below 8001*16382 = 131,072,382 uniquely (Chinese remainder theorem).
// The 16-bit host word matches the 16-bit sub-vectors the host sends.
package goldbach_pkg;

  localparam int unsigned N_CELLS   = 256;   // cells in the linear array
  localparam int unsigned WA        = 13;    // width of generator A
  localparam int unsigned KEY_A     = 9;     // feedback key of generator A
  localparam int unsigned WB        = 14;    // width of generator B
  localparam int unsigned KEY_B     = 7;     // feedback key of generator B
  localparam int unsigned HOST_WORD = 16;    // bits per host transfer word

  // Periods of the two generators when stepped from the all-zero state.
  localparam int unsigned PERIOD_A  = 8001;
  localparam int unsigned PERIOD_B  = 16382;

  // Modes of the host-side automaton.
  typedef enum logic [1:0] {
    MODE_COMPUTE  = 2'd0,   // deserialize sub-vectors and step the array
    MODE_DRAIN    = 2'd1,   // read-back requested, waiting for input to empty
    MODE_READBACK = 2'd2    // shift the counters out and serialize them
  } if_mode_e;

endpackage

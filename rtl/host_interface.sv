// host_interface: automaton with deserializer and serializer between the
// host bus and the systolic array.
//
// Input side (deserializer). The host sends sub-vectors of W boolean values,
// alternately one word of V1 and one word of V2, over a valid/ready
// handshake. When a complete V1/V2 pair is staged it is moved into two shift
// registers, and the array is then stepped once per clock for W clocks with
// bit 0 of each word first. The next pair can be staged while the current
// one is shifting, so a host that keeps up gives one step per clock; when no
// pair is ready the array is stalled (step low), which keeps V1 and V2
// aligned because the whole array stops together. The host is expected to
// end a pass with zero words enough for 2N steps, to flush the pipeline.
//
// Output side (serializer). A pulse on rb_req asks for read-back. The
// automaton finishes a half-sent pair, lets the staged bits drain into the
// array, then shifts the array's counter chain CHAIN_BITS times, packing the
// bits into W-bit words, first bit in bit 0. Words leave over a valid/ready
// handshake with out_last on the final one (zero padded if CHAIN_BITS is not
// a multiple of W). Shifting stalls while an output word waits for the host.
// The chain shifts in zeros, so a full read-back also clears the counters
// for the next pass. Then the automaton returns to compute mode.
//
// The alternating 16-bit sub-vectors come from the paper; the handshakes,
// bit orders, read-back request and stalling are this design's choices.
// Synchronous active-high reset.
module host_interface #(
  parameter int unsigned W          = goldbach_pkg::HOST_WORD,
  parameter int unsigned CHAIN_BITS = goldbach_pkg::N_CELLS *
                                      (goldbach_pkg::WA + goldbach_pkg::WB)
) (
  input  logic                    clk,
  input  logic                    rst,
  // host -> array sub-vectors
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [W-1:0]            in_data,
  // read-back request and results
  input  logic                    rb_req,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [W-1:0]            out_data,
  output logic                    out_last,
  output goldbach_pkg::if_mode_e  mode,
  // array side
  output logic                    step,
  output logic                    v1_bit,
  output logic                    v2_bit,
  output logic                    readback,
  input  logic                    rb_bit
);
  import goldbach_pkg::*;

  localparam int unsigned LW = $clog2(W + 1);
  localparam int unsigned CW = $clog2(CHAIN_BITS + 1);
  localparam int unsigned IW = (W > 1) ? $clog2(W) : 1;

  // ---------------- deserializer ----------------
  logic [W-1:0]  stage1, stage2;      // staged V1 and V2 words
  logic          have1, have2;
  logic          expect_v2;           // next word from the host is V2
  logic [W-1:0]  sh1, sh2;            // shifting words
  logic [LW-1:0] left;                // bits still to shift out
  logic          accept, load;

  assign in_ready = ((mode == MODE_COMPUTE) || (mode == MODE_DRAIN && expect_v2))
                    && (expect_v2 ? !have2 : !have1);
  assign accept   = in_valid && in_ready;
  assign step     = (left != '0);
  assign v1_bit   = sh1[0];
  assign v2_bit   = sh2[0];
  assign load     = have1 && have2 && ((left == '0) || (left == LW'(1)));

  always_ff @(posedge clk) begin
    if (rst) begin
      stage1    <= '0;
      stage2    <= '0;
      have1     <= 1'b0;
      have2     <= 1'b0;
      expect_v2 <= 1'b0;
      sh1       <= '0;
      sh2       <= '0;
      left      <= '0;
    end else begin
      if (accept) begin
        expect_v2 <= !expect_v2;
        if (expect_v2) begin
          stage2 <= in_data;
          have2  <= 1'b1;
        end else begin
          stage1 <= in_data;
          have1  <= 1'b1;
        end
      end
      if (load) begin
        sh1   <= stage1;
        sh2   <= stage2;
        left  <= LW'(W);
        have1 <= 1'b0;
        have2 <= 1'b0;
      end else if (step) begin
        sh1  <= sh1 >> 1;
        sh2  <= sh2 >> 1;
        left <= left - LW'(1);
      end
    end
  end

  // ---------------- automaton and serializer ----------------
  logic          rb_pending;
  logic [CW-1:0] rb_cnt;              // chain bits shifted so far
  logic [W-1:0]  pack;
  logic [LW-1:0] pack_n;              // bits in pack
  logic          all_shifted, flush, out_free, drained;

  assign all_shifted = (rb_cnt == CW'(CHAIN_BITS));
  assign readback    = (mode == MODE_READBACK) && !all_shifted && (pack_n != LW'(W));
  assign out_free    = !out_valid || out_ready;
  assign flush       = (mode == MODE_READBACK) && out_free &&
                       ((pack_n == LW'(W)) || (all_shifted && pack_n != '0));
  assign drained     = !have1 && !have2 && !expect_v2 && (left == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      mode       <= MODE_COMPUTE;
      rb_pending <= 1'b0;
      rb_cnt     <= '0;
      pack       <= '0;
      pack_n     <= '0;
      out_valid  <= 1'b0;
      out_data   <= '0;
      out_last   <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;

      unique case (mode)
        MODE_COMPUTE: begin
          if (rb_req || rb_pending) begin
            rb_pending <= 1'b0;
            mode       <= MODE_DRAIN;
          end
        end
        MODE_DRAIN: begin
          if (drained) begin
            mode   <= MODE_READBACK;
            rb_cnt <= '0;
            pack   <= '0;
            pack_n <= '0;
          end
        end
        MODE_READBACK: begin
          if (rb_req) rb_pending <= 1'b1;
          if (readback) begin
            pack[pack_n[IW-1:0]] <= rb_bit;
            pack_n       <= pack_n + LW'(1);
            rb_cnt       <= rb_cnt + CW'(1);
          end
          if (flush) begin
            out_data  <= pack;
            out_valid <= 1'b1;
            out_last  <= all_shifted;
            pack      <= '0;
            pack_n    <= '0;
            if (all_shifted) mode <= MODE_COMPUTE;
          end
        end
        default: mode <= MODE_COMPUTE;
      endcase
    end
  end

  // The array never counts and shifts in the same clock.
  a_step_xor_rb: assert property (@(posedge clk) disable iff (rst) !(step && readback));
  // An offered output word stays put until it is taken.
  a_out_hold: assert property (@(posedge clk) disable iff (rst)
                               out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule

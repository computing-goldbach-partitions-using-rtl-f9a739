// tb_goldbach_top: end-to-end test of the co-processor (8 cells).
//
// The testbench plays the host: for each pass it sends the V1/V2 sub-vector
// words of a range [P, P+2N-2] (bit 0 of each word first), then zero words
// covering at least 2N flush steps, then requests read-back, collects the
// serialized counter chain and decodes each cell's generator pair into
// G2(P+2N-2-2j), compared with a sieve-based count. Passes follow each
// other without reset, so each one also checks that read-back cleared the
// array. Mechanisms counted, each of which must occur: coincidences counted
// by the cells, stalls of the array while the host is slow, read-back
// stalls under output back-pressure, and the switch from compute to
// read-back and back. The step rate with a prompt host (one step per clock)
// is checked on the first pass.
module tb_goldbach_top;
  import goldbach_pkg::*;
  import goldbach_tb_pkg::*;
  localparam int N = 8, WA = 13, KA = 9, WB = 14, KB = 7, W = 16;
  localparam int CHAIN = N * (WA + WB);

  logic clk = 1'b0;
  logic rst, in_valid, in_ready, rb_req, out_valid, out_ready, out_last;
  logic [W-1:0] in_data, out_data;
  if_mode_e mode;
  logic step, v1_tail, v2_tail;
  int checks = 0, failures = 0;
  int n_stall = 0, n_rb_stall = 0, n_mode_switch = 0, n_coincide = 0;
  int cycle = 0, steps_in_pass = 0, first_step = -1, last_step = -1;
  bit gaps, backpressure;

  always #5 clk = ~clk;

  goldbach_top #(.N(N), .WA(WA), .KEY_A(KA), .WB(WB), .KEY_B(KB), .W(W)) dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  if_mode_e prev_mode;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    prev_mode <= mode;
    if (!rst) begin
      if (mode == MODE_COMPUTE && prev_mode != MODE_COMPUTE) n_mode_switch++;
      if (step) begin
        steps_in_pass++;
        if (first_step < 0) first_step = cycle;
        last_step = cycle;
      end
      if (mode == MODE_COMPUTE && !step && in_valid == 1'b0 && gaps) n_stall++;
      if (mode == MODE_READBACK && out_valid && !out_ready) n_rb_stall++;
    end
  end

  task automatic send_word(logic [W-1:0] d);
    if (gaps && $urandom_range(0, 3) == 0) repeat ($urandom_range(1, 30)) @(posedge clk);
    #1 in_valid = 1'b1; in_data = d;
    do @(posedge clk); while (!in_ready);
    #1 in_valid = 1'b0;
  endtask

  task automatic run_pass(int p);
    int len = (p + 2 * N - 2) / 2;
    int nwords = (len + 2 * N + W - 1) / W;
    logic [W-1:0] a, b;
    bit bits[$];
    longint unsigned sa, sb;
    int idx;
    steps_in_pass = 0; first_step = -1;
    for (int k = 0; k < nwords; k++) begin
      for (int i = 0; i < W; i++) begin
        a[i] = v1_bit(p, N, k * W + i);
        b[i] = v2_bit(p, N, k * W + i);
      end
      send_word(a);
      send_word(b);
    end
    // read-back
    #1 rb_req = 1'b1; @(posedge clk); #1 rb_req = 1'b0;
    while (1) begin
      out_ready = backpressure ? ($urandom_range(0, 2) == 0) : 1'b1;
      @(posedge clk);
      if (out_valid && out_ready) begin
        for (int i = 0; i < W; i++) bits.push_back(out_data[i]);
        if (out_last) break;
      end
      #1;
    end
    #1 out_ready = 1'b0;
    check("steps in pass", steps_in_pass, nwords * W);
    if (!gaps) check("one step per clock", last_step - first_step + 1, nwords * W);
    check("read-back bits", bits.size(), ((CHAIN + W - 1) / W) * W);
    idx = 0;
    for (int j = 0; j < N; j++) begin
      sa = 0; sb = 0;
      for (int t = 0; t < WB; t++) sb = (sb << 1) | longint'(bits[idx++]);
      for (int t = 0; t < WA; t++) sa = (sa << 1) | longint'(bits[idx++]);
      check($sformatf("G2(%0d)", p + 2 * N - 2 - 2 * j), decode(sa, sb),
            g2(p + 2 * N - 2 - 2 * j));
      n_coincide += int'(decode(sa, sb));
    end
  endtask

  initial begin
    build_sieve(40000);
    build_decoder(WA, KA, WB, KB);
    rst = 1'b1; in_valid = 1'b0; in_data = '0; rb_req = 1'b0; out_ready = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    gaps = 1'b0; backpressure = 1'b0;
    run_pass(4);
    gaps = 1'b1; backpressure = 1'b1;
    run_pass(1000);
    gaps = 1'b0; backpressure = 1'b1;
    run_pass(30000);
    $display("coincidences=%0d stalls=%0d readback_stalls=%0d mode_switches=%0d",
             n_coincide, n_stall, n_rb_stall, n_mode_switch);
    check("coincidences happened", n_coincide > 0, 1);
    check("stalls happened", n_stall > 0, 1);
    check("read-back stalls happened", n_rb_stall > 0, 1);
    check("mode switches", n_mode_switch, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

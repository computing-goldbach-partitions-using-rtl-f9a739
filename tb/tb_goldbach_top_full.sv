// tb_goldbach_top_full: one complete pass of the full 256-cell design.
//
// The co-processor is built with every parameter at its default (256 cells,
// 13-bit/key 9 and 14-bit/key 7 generators, 16-bit host words). The
// testbench plays the host for the last pass of the "all partitions up to
// 10^6" run: P = 10^6 - 510, so the cells compute G2(999490) .. G2(10^6).
// It sends the V1/V2 sub-vector words back to back (one step per clock),
// the flush words, requests read-back, and decodes all 256 generator pairs
// (state tables plus Chinese remainder theorem) against sieve counts. The
// number of steps, the one-step-per-clock rate and the length of the
// read-back are checked too.
module tb_goldbach_top_full;
  import goldbach_pkg::*;
  import goldbach_tb_pkg::*;
  localparam int N = N_CELLS, WA = goldbach_pkg::WA, KA = KEY_A, WB = goldbach_pkg::WB,
                 KB = KEY_B, W = HOST_WORD;
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

  goldbach_top dut (.*);

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

  localparam int P = 1000000 - 2 * N + 2;

  initial begin
    build_sieve(P + 2 * N);
    build_decoder(WA, KA, WB, KB);
    rst = 1'b1; in_valid = 1'b0; in_data = '0; rb_req = 1'b0; out_ready = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    gaps = 1'b0; backpressure = 1'b0;
    run_pass(P);
    $display("P=%0d cycles=%0d steps=%0d coincidences=%0d", P, cycle, steps_in_pass, n_coincide);
    check("one mode switch", n_mode_switch, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (700000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

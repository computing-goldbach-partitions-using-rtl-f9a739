// tb_host_interface: self-checking test of the host automaton,
// deserializer and serializer.
//
// Input side: random V1/V2 word pairs are offered with random gaps; every
// step must present the next bit (bit 0 first) of both the V1 and the V2
// word, in order. With words offered back to back, the array must be
// stepped on every clock (16 steps per pair, no bubbles), and stalls must
// appear when the host leaves gaps. Output side: a behavioural chain of
// CHAIN_BITS random bits stands in for the array; after a read-back request
// the words delivered under random back-pressure must hold the chain bits in
// order, bit 0 first, zero padded, with out_last on the final word only.
// Counting and shifting must never overlap, and the automaton must return
// to compute mode.
module tb_host_interface;
  import goldbach_pkg::*;
  localparam int W = 16, CHAIN = 40;
  logic clk = 1'b0;
  logic rst, in_valid, in_ready, rb_req, out_valid, out_ready, out_last;
  logic [W-1:0] in_data, out_data;
  if_mode_e mode;
  logic step, v1_bit, v2_bit, readback, rb_bit;
  int checks = 0, failures = 0;
  int stalls = 0;

  bit exp_v1[$], exp_v2[$];
  bit chain[CHAIN];
  int chain_idx;

  always #5 clk = ~clk;

  host_interface #(.W(W), .CHAIN_BITS(CHAIN)) dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d at %0t", what, got, exp, $time);
    end
  endtask

  // behavioural stand-in for the array's read-back chain
  assign rb_bit = (chain_idx < CHAIN) ? chain[chain_idx] : 1'b0;
  always @(posedge clk) if (readback) chain_idx <= chain_idx + 1;

  // stream monitor
  always @(posedge clk) if (!rst) begin
    if (step && readback) check("step and readback together", 1, 0);
    if (step) begin
      if (exp_v1.size() == 0) check("unexpected step", 1, 0);
      else begin
        check("v1 bit", v1_bit, exp_v1.pop_front());
        check("v2 bit", v2_bit, exp_v2.pop_front());
      end
    end
  end

  task automatic send_word(logic [W-1:0] d, bit gaps);
    if (gaps) repeat ($urandom_range(0, 20)) @(posedge clk);
    #1 in_valid = 1'b1; in_data = d;
    do @(posedge clk); while (!in_ready);
    #1 in_valid = 1'b0;
  endtask

  task automatic send_pairs(int pairs, bit gaps);
    logic [W-1:0] a, b;
    for (int k = 0; k < pairs; k++) begin
      a = W'($urandom); b = W'($urandom);
      for (int i = 0; i < W; i++) begin exp_v1.push_back(a[i]); exp_v2.push_back(b[i]); end
      send_word(a, gaps);
      send_word(b, gaps);
    end
  endtask

  int first_step, last_step, nsteps, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (step && !rst) begin
    if (nsteps == 0) first_step = cycle;
    last_step = cycle;
    nsteps++;
  end
  always @(posedge clk) if (!rst && !step && exp_v1.size() != 0 && mode == MODE_COMPUTE) stalls++;

  task automatic do_readback();
    int words = 0, bit_i = 0;
    logic [W-1:0] expw;
    chain_idx = 0;
    foreach (chain[i]) chain[i] = 1'($urandom);
    #1 rb_req = 1'b1; @(posedge clk); #1 rb_req = 1'b0;
    while (1) begin
      out_ready = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (out_valid && out_ready) begin
        expw = '0;
        for (int i = 0; i < W; i++) begin
          if (bit_i < CHAIN) expw[i] = chain[bit_i];
          bit_i++;
        end
        check("read-back word", out_data, expw);
        words++;
        check("out_last", out_last, (words == (CHAIN + W - 1) / W));
        if (out_last) break;
      end
      #1;
    end
    #1 out_ready = 1'b0;
    check("read-back word count", words, (CHAIN + W - 1) / W);
    check("chain shifts", chain_idx, CHAIN);
    @(posedge clk); #1;
    check("back to compute mode", mode, MODE_COMPUTE);
  endtask

  initial begin
    rst = 1'b1; in_valid = 1'b0; in_data = '0; rb_req = 1'b0; out_ready = 1'b0;
    chain_idx = 0; nsteps = 0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    // back-to-back words: one step per clock
    @(posedge clk);
    send_pairs(10, 1'b0);
    wait (exp_v1.size() == 0);
    @(posedge clk);
    check("steps for 10 pairs", nsteps, 10 * W);
    check("no bubbles between steps", last_step - first_step + 1, 10 * W);
    // gaps: stalls must occur, data still in order
    send_pairs(6, 1'b1);
    wait (exp_v1.size() == 0);
    checks++; if (stalls == 0) failures++;
    do_readback();
    // read-back requested while a pair is half sent: the pair completes first
    send_word(W'(16'h1234), 1'b0);
    for (int i = 0; i < W; i++) exp_v1.push_back(1'((16'h1234 >> i) & 1));
    fork
      begin #1 rb_req = 1'b1; @(posedge clk); #1 rb_req = 1'b0; end
    join
    for (int i = 0; i < W; i++) exp_v2.push_back(1'((16'hbeef >> i) & 1));
    send_word(W'(16'hbeef), 1'b0);
    wait (mode == MODE_READBACK);
    check("pair drained before read-back", exp_v1.size(), 0);
    // finish this read-back with a ready host
    out_ready = 1'b1;
    wait (out_valid && out_last);
    @(posedge clk); #1 out_ready = 1'b0;
    @(posedge clk); #1;
    check("mode after second read-back", mode, MODE_COMPUTE);
    $display("stall cycles seen: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_systolic_array: self-checking test of the linear array.
//
// An 8-cell array (generators of the full 13/14-bit size) is fed the V1 and
// V2 streams of a pass directly, one bit per step, followed by 2N+2 steps of
// zeros. The counter chain is then read back bit by bit and each cell's
// generator pair decoded to a count, which must equal G2(P+2N-2-2j) counted
// from a sieve. Three passes are made without reset (read-back must leave
// the array cleared): a plain one, one with random stalls, and one at a
// larger P. The step count of a pass is checked against (P+2N-2)/2 + 2N.
module tb_systolic_array;
  import goldbach_tb_pkg::*;
  localparam int N = 8, WA = 13, KA = 9, WB = 14, KB = 7;
  logic clk = 1'b0;
  logic rst, step, v1_in, v2_in, v1_out, v2_out, readback, rb_in, rb_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  systolic_array #(.N(N), .WA(WA), .KEY_A(KA), .WB(WB), .KEY_B(KB)) dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic run_pass(int p, bit stalls);
    int len = (p + 2 * N - 2) / 2;
    int steps = 0;
    longint unsigned sa, sb;
    for (int i = 0; i < len + 2 * N + 2; i++) begin
      if (stalls) while ($urandom_range(0, 3) == 0) begin
        step = 1'b0; v1_in = 1'($urandom); v2_in = 1'($urandom);
        @(posedge clk); #1;
      end
      step  = 1'b1;
      v1_in = v1_bit(p, N, i);
      v2_in = v2_bit(p, N, i);
      @(posedge clk); #1;
      steps++;
    end
    step = 1'b0; v1_in = 1'b0; v2_in = 1'b0;
    check("steps per pass", steps, (p + 2 * N - 2) / 2 + 2 * N + 2);
    // read back: per cell, B MSB first then A MSB first; cell 0 first
    for (int j = 0; j < N; j++) begin
      sa = 0; sb = 0;
      for (int b = 0; b < WB; b++) begin
        sb = (sb << 1) | longint'(rb_out);
        readback = 1'b1; @(posedge clk); #1 readback = 1'b0;
      end
      for (int b = 0; b < WA; b++) begin
        sa = (sa << 1) | longint'(rb_out);
        readback = 1'b1; @(posedge clk); #1 readback = 1'b0;
      end
      check($sformatf("G2(%0d) in cell %0d", p + 2 * N - 2 - 2 * j, j),
            decode(sa, sb), g2(p + 2 * N - 2 - 2 * j));
    end
  endtask

  initial begin
    build_sieve(20000);
    build_decoder(WA, KA, WB, KB);
    check("period A", period_a, 8001);
    check("period B", period_b, 16382);
    rst = 1'b1; step = 1'b0; v1_in = 1'b0; v2_in = 1'b0; readback = 1'b0; rb_in = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    run_pass(4, 1'b0);      // K = 4 .. 18
    run_pass(100, 1'b1);
    run_pass(10000, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_goldbach_cell: self-checking test of one systolic cell.
//
// A cycle-level reference of the cell predicts, under random stalls, input
// bits and read-back shifting: the one-step delay of x2 and two-step delay
// of x1, the coincidence count kept by the two generators (computed with the
// generator recurrence on whole words) and the read-back chain order
// rb_in -> A -> B -> rb_out. Counts of pairs seen are also kept, and
// generator A must advance exactly once per counted coincidence. A second
// instance in the 9-bit example configuration (4-bit and 5-bit generators,
// both with key 5) is driven with the same inputs and checked the same way.
module tb_goldbach_cell;
  localparam int WA = 13, KA = 9, WB = 14, KB = 7;
  logic clk = 1'b0;
  logic rst, step, x1_in, x2_in, readback, rb_in;
  logic x1_out, x2_out, rb_out;
  logic [WA-1:0] cnt_a;
  logic [WB-1:0] cnt_b;
  int checks = 0, failures = 0, coincidences = 0;

  // reference state
  logic r_x1, r_x2, r_x1d;
  logic [WA-1:0] r_a;
  logic [WB-1:0] r_b;

  always #5 clk = ~clk;

  goldbach_cell #(.WA(WA), .KEY_A(KA), .WB(WB), .KEY_B(KB)) dut (.*);

  // 9-bit example cell
  logic s_x1_out, s_x2_out, s_rb_out;
  logic [3:0] s_cnt_a, r_sa;
  logic [4:0] s_cnt_b, r_sb;
  goldbach_cell #(.WA(4), .KEY_A(5), .WB(5), .KEY_B(5)) dut_small (
    .clk, .rst, .step, .x1_in, .x2_in, .x1_out(s_x1_out), .x2_out(s_x2_out),
    .readback, .rb_in, .rb_out(s_rb_out), .cnt_a(s_cnt_a), .cnt_b(s_cnt_b));

  function automatic logic [WA-1:0] next_a(logic [WA-1:0] c);
    return c[WA-1] ? (c << 1) : ((c << 1) ^ WA'(KA));
  endfunction
  function automatic logic [WB-1:0] next_b(logic [WB-1:0] c);
    return c[WB-1] ? (c << 1) : ((c << 1) ^ WB'(KB));
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    rst = 1'b1; step = 1'b0; x1_in = 1'b0; x2_in = 1'b0; readback = 1'b0; rb_in = 1'b0;
    @(posedge clk); #1 rst = 1'b0;
    r_x1 = 0; r_x2 = 0; r_x1d = 0; r_a = '0; r_b = '0; r_sa = '0; r_sb = '0;
    for (int k = 0; k < 5000; k++) begin
      // mostly counting, sometimes stalled, sometimes shifting
      readback = ($urandom_range(0, 9) == 0);
      step     = !readback && ($urandom_range(0, 4) != 0);
      x1_in    = 1'($urandom);
      x2_in    = 1'($urandom);
      rb_in    = 1'($urandom);
      #1;
      check("rb_out", 32'(rb_out), 32'(r_b[WB-1]));
      check("small rb_out", 32'(s_rb_out), 32'(r_sb[4]));
      // reference update
      if (readback) begin
        r_b  = {r_b[WB-2:0], r_a[WA-1]};
        r_a  = {r_a[WA-2:0], rb_in};
        r_sb = {r_sb[3:0], r_sa[3]};
        r_sa = {r_sa[2:0], rb_in};
      end else if (step && r_x1 && r_x2) begin
        r_a  = next_a(r_a);
        r_b  = next_b(r_b);
        r_sa = r_sa[3] ? (r_sa << 1) : ((r_sa << 1) ^ 4'd5);
        r_sb = r_sb[4] ? (r_sb << 1) : ((r_sb << 1) ^ 5'd5);
        coincidences++;
      end
      if (step) begin
        r_x1d = r_x1;
        r_x1  = x1_in;
        r_x2  = x2_in;
      end
      @(posedge clk); #1;
      check("x1_out", 32'(x1_out), 32'(r_x1d));
      check("x2_out", 32'(x2_out), 32'(r_x2));
      check("cnt_a", 32'(cnt_a), 32'(r_a));
      check("cnt_b", 32'(cnt_b), 32'(r_b));
      check("small x1_out", 32'(s_x1_out), 32'(r_x1d));
      check("small x2_out", 32'(s_x2_out), 32'(r_x2));
      check("small cnt_a", 32'(s_cnt_a), 32'(r_sa));
      check("small cnt_b", 32'(s_cnt_b), 32'(r_sb));
    end
    checks++;
    if (coincidences < 100) failures++;
    $display("coincidences counted: %0d", coincidences);
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

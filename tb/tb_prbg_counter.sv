// tb_prbg_counter: self-checking test of the PRBG counter.
//
// Three instances are checked: the 13-bit/key 9 and 14-bit/key 7 generators
// of the 256-cell build, and the 4-bit/key 5 generator of the small 9-bit
// example. A reference written directly from the generator recurrence
// (shift left, XOR the key if the old MSB was 0) and from plain shifting in
// read-back mode predicts every state under random inc/readback/shift_in.
// The periods from zero (8001, 16382 and 6) are then measured with inc held
// high, and must be the first return to zero.
module tb_prbg_counter;
  logic clk = 1'b0;
  logic rst;
  logic inc, readback, shift_in;
  logic [12:0] sa, ma;
  logic [13:0] sb, mb;
  logic [3:0]  sc, mc;
  logic oa, ob, oc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  prbg_counter #(.WIDTH(13), .KEY(64'd9)) dut_a (.clk, .rst, .inc, .readback, .shift_in, .state(sa), .shift_out(oa));
  prbg_counter #(.WIDTH(14), .KEY(64'd7)) dut_b (.clk, .rst, .inc, .readback, .shift_in, .state(sb), .shift_out(ob));
  prbg_counter #(.WIDTH(4),  .KEY(64'd5)) dut_c (.clk, .rst, .inc, .readback, .shift_in, .state(sc), .shift_out(oc));

  function automatic logic [63:0] ref_next(logic [63:0] c, int w, logic [63:0] key,
                                           logic i, logic rb, logic si);
    logic [63:0] mask = (64'd1 << w) - 1;
    logic x = c[w-1];
    if (rb) return ((c << 1) | 64'(si)) & mask;
    if (i) begin
      c = (c << 1) & mask;
      if (!x) c = c ^ key;
    end
    return c;
  endfunction

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  task automatic measure_period(int w, int expect_p);
    int n;
    logic [63:0] st;
    rst = 1'b1; inc = 1'b0; readback = 1'b0; shift_in = 1'b0;
    @(posedge clk); #1 rst = 1'b0; inc = 1'b1;
    n = 0;
    do begin
      @(posedge clk); #1 n++;
      st = (w == 13) ? 64'(sa) : (w == 14) ? 64'(sb) : 64'(sc);
    end while (st != 0 && n < 20000);
    check($sformatf("period of %0d-bit generator", w), 64'(n), 64'(expect_p));
    inc = 1'b0;
  endtask

  initial begin
    rst = 1'b1; inc = 1'b0; readback = 1'b0; shift_in = 1'b0;
    @(posedge clk); #1 rst = 1'b0;
    ma = '0; mb = '0; mc = '0;
    check("reset a", 64'(sa), 0);
    check("reset b", 64'(sb), 0);
    for (int k = 0; k < 4000; k++) begin
      inc      = ($urandom_range(0, 3) != 0);
      readback = ($urandom_range(0, 7) == 0);
      shift_in = 1'($urandom);
      ma = 13'(ref_next(64'(ma), 13, 64'd9, inc, readback, shift_in));
      mb = 14'(ref_next(64'(mb), 14, 64'd7, inc, readback, shift_in));
      mc = 4'(ref_next(64'(mc), 4, 64'd5, inc, readback, shift_in));
      @(posedge clk); #1;
      check("state a", 64'(sa), 64'(ma));
      check("state b", 64'(sb), 64'(mb));
      check("state c", 64'(sc), 64'(mc));
      check("shift_out a", 64'(oa), 64'(ma[12]));
    end
    measure_period(13, 8001);
    measure_period(14, 16382);
    measure_period(4, 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

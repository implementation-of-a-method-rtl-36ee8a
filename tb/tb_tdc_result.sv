// tb_tdc_result: checks delta T = N * T_clk + (n_a - n_b) * tau.
//
// Random and corner operands; the expected value is computed here in 64-bit
// arithmetic with tau = 8590 fs and T_clk = 4 ns, negated when `negative` is
// set. Also checks the one-clock latency of `valid`.
module tb_tdc_result;
  timeunit 1ps;
  timeprecision 10fs;

  logic clk = 0, rst = 0, load = 0, negative = 0;
  logic [15:0] n_a = 0, n_b = 0, n_clk = 0;
  logic signed [47:0] delta_fs;
  logic valid;
  int checks = 0, failures = 0;

  tdc_result dut (.*);

  always #2000 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic one(input int a, input int b, input int n, input bit neg);
    longint e;
    e = longint'(n) * 4_000_000 + (longint'(a) - longint'(b)) * 8590;
    if (neg) e = -e;
    @(negedge clk);
    n_a = 16'(a); n_b = 16'(b); n_clk = 16'(n); negative = neg; load = 1;
    rst = 1; #1 rst = 0;
    check(!valid, "valid clear before load");
    @(posedge clk); #1;
    load = 0;
    check(valid, "valid one edge after load");
    check(longint'(delta_fs) == e, $sformatf("a=%0d b=%0d n=%0d neg=%0d: %0d exp %0d",
                                             a, b, n, neg, delta_fs, e));
  endtask

  initial begin
    #1 rst = 1; #10 rst = 0;
    one(0, 0, 0, 0);
    one(466, 10, 0, 0);
    one(10, 466, 0, 0);           // T_B > T_A with N = 0 is a negative sum
    one(100, 300, 3, 0);
    one(65535, 0, 65535, 0);
    one(0, 65535, 65535, 1);
    for (int k = 0; k < 50; k++)
      one($urandom_range(0, 759), $urandom_range(0, 759), $urandom_range(0, 65535), $urandom_range(0, 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_coarse_counter: checks the coarse counter.
//
// Holds `en` high for a known number of clock edges and checks that the
// buffered count equals it, that `done` rises one edge after the window and
// that the counter restarts from zero for the next window. A window of
// 2^WIDTH + 5 edges (WIDTH = 8 here) must wrap and set `overflow`.
module tb_coarse_counter;
  timeunit 1ps;
  timeprecision 10fs;

  localparam int W = 8;

  logic clk = 0, rst = 0, en = 0;
  logic [W-1:0] count_out;
  logic done, overflow;
  int checks = 0, failures = 0;

  coarse_counter #(.WIDTH(W)) dut (.*);

  always #2000 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic window(input int n, input bit do_reset);
    if (do_reset) begin rst = 1; #10; rst = 0; end
    @(negedge clk); en = 1;
    repeat (n) @(negedge clk);
    en = 0;
    @(posedge clk); #1;
    check(done, $sformatf("done after window %0d", n));
    check(count_out == W'(n), $sformatf("count %0d exp %0d", count_out, W'(n)));
    check(overflow == (n >= (1 << W)), $sformatf("overflow flag for %0d", n));
  endtask

  initial begin
    #1 rst = 1; #10 rst = 0;
    #10;
    check(!done && count_out == 0, "idle after reset");
    window(1, 1);
    window(7, 1);
    window(12, 0);        // back-to-back window: counter was cleared
    window(255, 1);
    for (int k = 0; k < 20; k++) window($urandom_range(1, 250), $urandom_range(0, 1));
    window((1 << W) + 5, 1);
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

// tb_prbs15_descrambler: checks the PRBS15 descrambler.
//
// The encoded stream is produced here by a reference scrambler model
// (y[n] = x[n] ^ y[n-14] ^ y[n-15]) started from a random state unknown to
// the descrambler. After 15 clock periods the descrambler must reproduce the
// random source bits exactly (self-synchronisation). A PPS-like pattern
// (long runs of zeros, a run of ones) must also come through unchanged, and
// an edge of the encoded input between clock edges must reach the output at
// once.
module tb_prbs15_descrambler;
  timeunit 1ps;
  timeprecision 10fs;

  logic clock = 0, rst = 0, data_in = 0, data_out;
  int checks = 0, failures = 0;
  bit hist[$];

  prbs15_descrambler dut (.*);

  always #500 clock = ~clock;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input bit x, input int n, input bit do_check);
    bit y;
    @(negedge clock);
    y = x ^ hist[hist.size() - 14] ^ hist[hist.size() - 15];
    data_in = y;
    hist.push_back(y);
    void'(hist.pop_front());
    #1;
    if (do_check) check(data_out == x, $sformatf("bit %0d: %0d exp %0d", n, data_out, x));
  endtask

  initial begin
    #1 rst = 1; #10 rst = 0;
    for (int i = 0; i < 15; i++) hist.push_back(1'($urandom_range(0, 1)));
    for (int n = 0; n < 15; n++) send(1'($urandom_range(0, 1)), n, 0);  // synchronisation
    for (int n = 15; n < 3000; n++) send(1'($urandom_range(0, 1)), n, 1);
    for (int n = 0; n < 500; n++) send(0, n, 1);
    for (int n = 0; n < 40; n++)  send(1, n, 1);
    for (int n = 0; n < 500; n++) send(0, n, 1);
    @(posedge clock); #200;
    begin
      automatic bit prev = data_out;
      data_in = ~data_in;
      #1;
      check(data_out == ~prev, "line edge reaches the output between clock edges");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

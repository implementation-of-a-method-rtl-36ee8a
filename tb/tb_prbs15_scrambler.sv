// tb_prbs15_scrambler: checks the multiplicative PRBS15 scrambler.
//
// 1) With the input held at 0 after reset the output must be a maximum-length
//    sequence: period 2^15 - 1 = 32767 with 2^14 ones and 2^14 - 1 zeros.
// 2) For random input bits the output must equal a reference model written
//    here from the recurrence y[n] = x[n] ^ y[n-14] ^ y[n-15].
// 3) A level change of the input appears on the output at once (between clock
//    edges), so the PPS edge timing is kept.
module tb_prbs15_scrambler;
  timeunit 1ps;
  timeprecision 10fs;

  logic clock = 0, rst = 0, data_in = 0, data_out;
  int checks = 0, failures = 0;
  bit hist[$];

  prbs15_scrambler dut (.*);

  always #500 clock = ~clock;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    bit seq[];
    int ones, period;
    #1 rst = 1; #10 rst = 0;
    // 1) maximum-length sequence
    seq = new[2 * 32767 + 10];
    for (int i = 0; i < seq.size(); i++) begin
      @(negedge clock);
      seq[i] = data_out;
    end
    ones = 0;
    for (int i = 0; i < 32767; i++) ones += seq[i];
    check(ones == 16384, $sformatf("ones per period %0d exp 16384", ones));
    period = 0;
    for (int p = 1; p <= 32767; p++) begin
      automatic bit same = 1;
      for (int i = 0; i < 64; i++) if (seq[i] != seq[i + p]) begin same = 0; break; end
      if (same) begin period = p; break; end
    end
    check(period == 32767, $sformatf("period %0d exp 32767", period));
    // 2) reference recurrence, history from the last 15 outputs
    for (int i = seq.size() - 15; i < seq.size(); i++) hist.push_back(seq[i]);
    for (int n = 0; n < 2000; n++) begin
      bit x, y;
      x = 1'($urandom_range(0, 1));
      @(negedge clock);
      data_in = x;
      #1;
      y = x ^ hist[hist.size() - 14] ^ hist[hist.size() - 15];
      check(data_out == y, $sformatf("bit %0d: %0d exp %0d", n, data_out, y));
      hist.push_back(y);
      void'(hist.pop_front());
    end
    // 3) combinational path for an asynchronous edge
    @(posedge clock); #123;
    begin
      automatic bit prev = data_out;
      data_in = ~data_in;
      #1;
      check(data_out == ~prev, "input edge reaches the line between clock edges");
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

// tb_tdc_core: end-to-end check of the time-to-digital converter.
//
// The converter runs at full size (759-element lines, 8.59 ps per element,
// 4 ns clock). Start/stop pairs with known separations - below one clock
// period, across clock edges, many periods - are applied at random phases.
// For each pair the testbench works out from the edge times the expected N,
// the line counts n_a = floor(T_A / tau) + 1 and n_b = floor(T_B / tau) + 1,
// and checks the raw fields exactly, then checks delta_fs against the true
// interval to within one element delay. It also checks the ready latency
// (three clock edges after line B is captured), the reset between
// measurements, and the counter overflow of a window longer than 2^16
// periods (with a shortened 8-bit counter).
module tb_tdc_core;
  timeunit 1ps;
  timeprecision 10fs;
  import tdc_pkg::*;

  localparam int  TCLK = 4000;
  localparam real TAU  = 8.59;

  logic clk = 0, reset = 0, start = 0, stop = 0, negative = 0;
  tdc_raw_t raw;
  logic ready, overflow, delta_valid;
  logic signed [RESULT_W-1:0] delta_fs;
  tdc_raw_t raw8;
  logic ready8, overflow8, delta_valid8;
  logic signed [RESULT_W-1:0] delta_fs8;
  int checks = 0, failures = 0;
  int n_zero = 0, n_many = 0;

  tdc_core dut (.clk, .reset, .start, .stop, .negative, .raw, .ready, .overflow,
                .delta_fs, .delta_valid);
  tdc_core #(.DLINE_SIZE(16), .CNT_WIDTH(8)) dut8 (.clk, .reset, .start, .stop, .negative,
                .raw(raw8), .ready(ready8), .overflow(overflow8),
                .delta_fs(delta_fs8), .delta_valid(delta_valid8));

  always #(TCLK/2) clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // rising clock edges are at TCLK/2 + k*TCLK
  function automatic realtime next_edge(input realtime t);
    return (real'($floor((t - TCLK / 2) / TCLK)) + 1.0) * TCLK + TCLK / 2;
  endfunction

  task automatic arm();
    reset = 1; start = 0; stop = 0;
    #(8000);                   // lines return to idle
    reset = 0;
  endtask

  task automatic measure(input real phase, input real dt, input bit neg);
    realtime ts, tp, ea, eb, t_cap_b, t_ready;
    int n_exp, na_exp, nb_exp;
    longint true_fs;
    arm();
    negative = neg;
    @(posedge clk);
    #(phase) start = 1;
    ts = $realtime;
    #(dt) stop = 1;
    tp = $realtime;
    ea = next_edge(ts);
    eb = next_edge(tp);
    n_exp  = int'((eb - ea) / TCLK);
    na_exp = int'($floor((ea - ts) / TAU)) + 1;
    nb_exp = int'($floor((eb - tp) / TAU)) + 1;
    if (n_exp == 0) n_zero++;
    if (n_exp > 5)  n_many++;
    @(posedge dut.stop_b);
    t_cap_b = $realtime;
    @(posedge ready);
    t_ready = $realtime;
    check(int'((t_ready - t_cap_b) / TCLK) == 3, $sformatf("ready three edges after capture of line B (ts=%0.2f tp=%0.2f ea=%0.2f eb=%0.2f cap=%0.2f rdy=%0.2f)", ts, tp, ea, eb, t_cap_b, t_ready));
    @(posedge clk); #1;
    check(int'(raw.n_clk) == n_exp, $sformatf("dt=%0.2f N=%0d exp %0d", dt, raw.n_clk, n_exp));
    check(int'(raw.n_a) == na_exp, $sformatf("dt=%0.2f n_a=%0d exp %0d", dt, raw.n_a, na_exp));
    check(int'(raw.n_b) == nb_exp, $sformatf("dt=%0.2f n_b=%0d exp %0d", dt, raw.n_b, nb_exp));
    check(raw.negative == neg, "sign passed through");
    check(delta_valid, "delta valid");
    true_fs = longint'(dt * 1000.0);
    if (neg) true_fs = -true_fs;
    check((longint'(delta_fs) - true_fs) <  longint'(TAU * 1000.0) &&
          (longint'(delta_fs) - true_fs) > -longint'(TAU * 1000.0),
          $sformatf("dt=%0.2f delta=%0d fs true=%0d fs", dt, delta_fs, true_fs));
  endtask

  initial begin
    #1 reset = 1; #10 reset = 0;
    measure(1000.0, 500.0, 0);
    measure(300.0, 3000.0, 0);
    measure(3900.0, 250.0, 1);
    measure(100.0, 40_000.0, 0);
    measure(10.0, 3985.0, 0);
    for (int k = 0; k < 30; k++)
      measure(real'($urandom_range(1, 3999)) + 0.37, real'($urandom_range(1, 100_000)) + 0.11,
              1'($urandom_range(0, 1)));
    check(n_zero > 0 && n_many > 0, "both short (N=0) and long intervals measured");
    // overflow: 8-bit counter in dut8, window of 300 periods
    arm();
    @(posedge clk); #(1000) start = 1;
    #(300 * TCLK) stop = 1;
    @(posedge ready8);
    check(overflow8, "8-bit counter overflow flagged");
    check(!overflow, "16-bit counter no overflow");
    check(raw8.n_clk[7:0] == 8'(300), "wrapped count");
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

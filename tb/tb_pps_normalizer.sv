// tb_pps_normalizer: checks source selection and edge ordering.
//
// For each source (PPS pair, delay generator pair) and both orders of the two
// rising edges, start must rise at the earlier edge and stop at the later
// one, regardless of pulse widths (a short first pulse that has ended before
// the second edge arrives is included), and `negative` must be set exactly
// when input 2 came first. The unselected pair must have no effect, and the
// debug outputs must follow the selected pair.
module tb_pps_normalizer;
  timeunit 1ps;
  timeprecision 10fs;
  import tdc_pkg::*;

  logic reset = 0, pps_local = 0, pps_remote = 0, gen_start = 0, gen_stop = 0;
  src_sel_e sel_src = SRC_PPS;
  logic start, stop, negative, dbg_1, dbg_2;
  int checks = 0, failures = 0;
  time t_start, t_stop;

  pps_normalizer dut (.*);

  always @(posedge start) t_start = $time;
  always @(posedge stop)  t_stop  = $time;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic drive(input bit sel_gen, input bit which, input bit v);
    if (sel_gen) begin if (which) gen_stop = v; else gen_start = v; end
    else         begin if (which) pps_remote = v; else pps_local = v; end
  endtask

  // edge of input 1 at t1, input 2 at t2 (relative), pulse width w
  task automatic pair(input bit sel_gen, input int t1, input int t2, input int w);
    time base;
    int first, second;
    sel_src = sel_gen ? SRC_DELAY_GEN : SRC_PPS;
    reset = 1; #10; reset = 0; #10;
    check(!start && !stop, "cleared by reset");
    base = $time;
    fork
      begin #(t1) drive(sel_gen, 0, 1); #1 check(dbg_1, "dbg_1 follows input 1");
            #(w - 1) drive(sel_gen, 0, 0); end
      begin #(t2) drive(sel_gen, 1, 1); #1 check(dbg_2, "dbg_2 follows input 2");
            #(w - 1) drive(sel_gen, 1, 0); end
      begin // the other pair toggles and must be ignored
        #(t1 / 2 + 1) drive(!sel_gen, 0, 1); drive(!sel_gen, 1, 1);
        #(w) drive(!sel_gen, 0, 0); drive(!sel_gen, 1, 0);
      end
    join
    #10;
    first  = (t1 < t2) ? t1 : t2;
    second = (t1 < t2) ? t2 : t1;
    check(start && stop, "both edges seen");
    check(t_start - base == time'(first),  $sformatf("start at %0d exp %0d", t_start - base, first));
    check(t_stop  - base == time'(second), $sformatf("stop at %0d exp %0d", t_stop - base, second));
    check(negative == (t2 < t1), $sformatf("sign t1=%0d t2=%0d neg=%0d", t1, t2, negative));
  endtask

  initial begin
    #1 reset = 1; #10 reset = 0;
    pair(0, 100, 2000, 20_000);
    pair(0, 2000, 100, 20_000);
    pair(1, 100, 350, 2000);
    pair(1, 900, 300, 50);       // first pulse ends before the second edge
    for (int k = 0; k < 40; k++) begin
      automatic int a = $urandom_range(100, 10_000), b = $urandom_range(100, 10_000);
      if (a == b) b = b + 7;
      pair($urandom_range(0, 1), a, b, $urandom_range(10, 30_000));
    end
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

// tb_delay_generator: checks the delay generator.
//
// With REPETITION = 20 and the default 256-element line (100 ps elements), it
// checks that output_1 pulses once every 20 clock periods, one element delay
// after a rising clock edge, that output_2 follows output_1 by
// delay * 4 * 100 ps for each control value tried, and the pulse width (half
// a clock period).
module tb_delay_generator;
  timeunit 1ps;
  timeprecision 10fs;

  localparam int  TCLK = 4000;
  localparam int  REP  = 20;
  localparam real TAU  = 100.0;

  logic reset = 0, clock = 0;
  logic [5:0] delay = 0;
  logic output_1, output_2;
  int checks = 0, failures = 0;
  realtime t1, t1_prev, t2, t1_fall, clk_edge;

  delay_generator #(.REPETITION(REP), .ELEM_DELAY_PS(TAU)) dut (.*);

  always #(TCLK/2) clock = ~clock;
  always @(posedge clock) clk_edge = $realtime;
  always @(posedge output_1) begin t1_prev = t1; t1 = $realtime; end
  always @(negedge output_1) t1_fall = $realtime;
  always @(posedge output_2) t2 = $realtime;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit near(input realtime a, input realtime b);
    return (a - b) < 0.5 && (b - a) < 0.5;
  endfunction

  initial begin
    #1 reset = 1; #10 reset = 0;
    @(posedge output_1);
    for (int k = 0; k < 20; k++) begin
      automatic int d = (k < 4) ? k * 21 : $urandom_range(0, 63);
      if (d > 63) d = 63;
      @(negedge clock) delay = 6'(d);
      @(posedge output_1);
      #1;
      check(near(t1 - clk_edge, TAU), $sformatf("output_1 one element after the clock edge (%0.2f)", t1 - clk_edge));
      check(near(t1 - t1_prev, REP * TCLK), $sformatf("repetition period %0.1f", t1 - t1_prev));
      #(d * 4 * TAU);
      check(near(t2 - t1, d * 4 * TAU), $sformatf("delay %0d: %0.2f exp %0.2f", d, t2 - t1, d * 4 * TAU));
      @(negedge output_1);
      #1;
      check(near(t1_fall - t1, TCLK / 2), "pulse width half a clock period");
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

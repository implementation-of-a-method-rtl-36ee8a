// tb_tdc_sync_logic: checks the TDC control logic.
//
// For start/stop edges placed at chosen times relative to a 4 ns clock, the
// start_dline_* outputs must rise with the input edges, the stop_dline_*
// outputs at the first clock edge after them, and count_enable must be high
// for exactly the number of clock edges N between those two capture edges
// (computed here from the edge times). Reset must clear all outputs.
module tb_tdc_sync_logic;
  timeunit 1ps;
  timeprecision 10fs;

  localparam int TCLK = 4000;

  logic clock = 0, start = 0, stop = 0, reset = 0;
  logic start_dline_A, start_dline_B, stop_dline_A, stop_dline_B, count_enable;
  int checks = 0, failures = 0;
  int en_cycles;

  tdc_sync_logic dut (.*);

  always #(TCLK/2) clock = ~clock;
  always @(posedge clock) if (count_enable) en_cycles++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // start at offset ts after a rising clock edge, stop dt later
  task automatic run(input int ts, input int dt);
    time t0, t_start, t_stop, edge_a, edge_b;
    int n_exp;
    reset = 1; #100; reset = 0;
    check(!start_dline_A && !start_dline_B && !stop_dline_A && !stop_dline_B, "cleared by reset");
    @(posedge clock);
    t0 = $time;
    en_cycles = 0;
    #(ts) start = 1;
    t_start = $time;
    #1;
    check(start_dline_A && !start_dline_B, "line A launched by start");
    check(!stop_dline_A, "line A not stopped before the clock edge");
    #(dt - 1) stop = 1;
    t_stop = $time;
    #1;
    check(start_dline_B, "line B launched by stop");
    // next clock edges after start and stop
    edge_a = t0 + ((t_start - t0) / TCLK + 1) * TCLK;
    edge_b = t0 + ((t_stop - t0) / TCLK + 1) * TCLK;
    n_exp  = int'((edge_b - edge_a) / TCLK);
    repeat (n_exp + 3) @(posedge clock);
    #1;
    check(stop_dline_A && stop_dline_B, "both lines stopped");
    check(en_cycles == n_exp, $sformatf("ts=%0d dt=%0d N=%0d exp %0d", ts, dt, en_cycles, n_exp));
    start = 0; stop = 0;
  endtask

  // capture edge timing: stop_dline_A rises exactly at the first clock edge
  // (rising clock edges are at TCLK/2 + k*TCLK)
  task automatic edge_timing(input int ts);
    time t_edge;
    reset = 1; #100; reset = 0;
    @(posedge clock);
    #(ts) start = 1;
    @(posedge stop_dline_A);
    t_edge = $time;
    check(t_edge % TCLK == TCLK / 2, $sformatf("stop A at a clock edge (%0t)", t_edge));
    stop = 1;
    #10; start = 0; stop = 0;
  endtask

  initial begin
    #1 reset = 1; #10 reset = 0;
    run(500, 1000);       // same clock period: N = 0
    run(500, 3800);       // N = 1
    run(3900, 200);       // crosses one edge: N = 1
    run(100, 40_000);     // N = 10
    for (int k = 0; k < 40; k++) run($urandom_range(20, 3980), $urandom_range(10, 30_000));
    edge_timing(1234);
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

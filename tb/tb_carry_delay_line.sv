// tb_carry_delay_line: checks the carry-chain delay line and its capture row.
//
// A start edge is launched into a 64-element line with 10 ps per element and
// the line is captured by a stop edge a chosen time later. The captured state
// must be a thermometer code whose number of zeros is floor(dt / tau) + 1
// (element 0 switches with the carry-in itself), computed here from dt.
// Also checked: the idle state after reset (all ones), that q holds between
// stop edges, the end-of-chain carry after the full line delay, and that
// rewritten operands (A = B = 0) stop the line from propagating.
module tb_carry_delay_line;
  timeunit 1ps;
  timeprecision 10fs;

  localparam int  N   = 64;
  localparam real TAU = 10.0;

  logic clk = 0, rst = 0, op_load = 0, start = 0, stop = 0;
  logic [N-1:0] op_a = '0, op_b = '1, q;
  logic carry_out;
  int checks = 0, failures = 0;

  carry_delay_line #(.LINE_SIZE(N), .CARRY_DELAY_PS(TAU)) dut (.*);

  always #2000 clk = ~clk;

  function automatic logic [N-1:0] expected(input real dt);
    int z;
    logic [N-1:0] v;
    z = (dt < 0) ? 0 : int'($floor(dt / TAU)) + 1;
    if (z > N) z = N;
    v = '1;
    for (int i = 0; i < z; i++) v[i] = 1'b0;
    return v;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic measure(input real dt);
    rst = 1; start = 0; stop = 0;
    #(N * TAU + 100);   // line returns to idle (its dead time)
    rst = 0;
    #100;
    start = 1;
    #(dt);
    stop = 1;
    #1;
    check(q == expected(dt), $sformatf("dt=%0.2f q=%h exp=%h", dt, q, expected(dt)));
    #(N * TAU + 50);
    check(q == expected(dt), $sformatf("hold dt=%0.2f", dt));
    check(carry_out == 1'b1, "carry out after full line delay");
    stop = 0;
  endtask

  initial begin
    #1 rst = 1;
    #(N * TAU + 100);
    rst = 0;
    #10;
    check(q == '1, "idle after reset");
    measure(3.0);
    measure(15.0);
    measure(105.0);
    measure(333.3);
    measure(635.0);
    measure(700.0);
    for (int k = 0; k < 20; k++) measure(real'($urandom_range(0, 60000)) / 100.0 + 0.5);
    // operands not in delay-line form: carry does not propagate
    rst = 1; #(N * TAU + 100); rst = 0;
    @(negedge clk); op_a = '0; op_b = '0; op_load = 1;
    @(negedge clk); op_load = 0;
    start = 1; #200; stop = 1; #1;
    check(q[N-1:1] == '0 && q[0] == 1'b1, $sformatf("A=B=0 sum is carry-in only: %h", q));
    check(carry_out == 1'b0, "no carry out with B=0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

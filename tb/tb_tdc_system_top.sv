// tb_tdc_system_top: two stations linked by fiber, end to end.
//
// Station A is the master, station B the slave; both are tdc_system_top. B
// sends its PPS over the fiber (scrambled), A descrambles it and measures it
// against its local PPS. The fiber is modelled as a pure delay of both data
// lanes (FIBER_PS, a whole number of scrambler clock periods, with both
// stations on one scrambler clock, as when the master clock is distributed
// over a second fiber). This testbench plays the control processor: it
// writes and reads A's registers over the Avalon-MM port, waits for the ready
// interrupt, computes delta T from the raw counts with tau = 8.59 ps and
// T_clk = 4 ns, and pulses the measurement reset.
// Checked: the measured interval against the true one (B's edge + fiber
// delay - A's edge) within one element delay, for the remote edge later and
// earlier than the local one; the hardware delta_fs against the processor's
// own computation; the delay generator source (delay = control * 400 ps); that
// the received PPS has exactly one rising edge per pulse (no scrambler
// glitches); that the slave never reports a measurement; the counter overflow
// when the remote PPS is missing; and the SFP presence bits. Each mechanism
// is counted and must occur at least once.
module tb_tdc_system_top;
  timeunit 1ps;
  timeprecision 10fs;
  import tdc_pkg::*;

  localparam int  TCLK     = 4000;       // measurement clock
  localparam int  TSCR     = 8000;       // scrambler clock
  localparam int  TBUS     = 10_000;     // processor clock
  localparam int  FIBER_PS = 100 * TSCR; // 800 ns of fiber
  localparam int  PPS_W    = 1_000_000;  // PPS pulse width, 1 us (shortened)
  localparam real TAU      = 8.59;
  localparam int  REP      = 400;        // delay generator period (clocks)

  logic clk = 0, rst = 0, t2d_clk = 0, sel_clk = 0;
  logic pps_a = 0, pps_b = 0;
  logic a_tx, b_tx, a_rx = 0, b_rx = 0;

  // station A (master) bus and results
  logic [9:0]  a_addr = 0;  logic a_rd = 0, a_wr = 0;
  logic [31:0] a_wdata = 0, a_rdata;  logic a_irq;
  logic a_dbg1, a_dbg2, a_ready, a_ovf, a_dvalid;
  tdc_raw_t a_raw;  logic signed [RESULT_W-1:0] a_delta;
  // station B (slave)
  logic [9:0]  b_addr = 0;  logic b_rd = 0, b_wr = 0;
  logic [31:0] b_wdata = 0, b_rdata;  logic b_irq;
  logic b_dbg1, b_dbg2, b_ready, b_ovf, b_dvalid;
  tdc_raw_t b_raw;  logic signed [RESULT_W-1:0] b_delta;

  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0, n_gen = 0, n_n0 = 0, n_nbig = 0, n_ovf = 0, n_irq = 0;
  int n_slave_quiet = 0, rx_edges = 0, n_sfp = 0;

  tdc_system_top #(.GEN_REPETITION(REP)) st_a (
    .clk, .rst, .t2d_clk, .sel_clk,
    .avs_address (a_addr), .avs_read (a_rd), .avs_write (a_wr),
    .avs_writedata (a_wdata), .avs_readdata (a_rdata), .irq_ready (a_irq),
    .pps_in (pps_a), .sfp_rx (a_rx), .sfp_tx (a_tx), .sfp_inserted (2'b01),
    .dbg_1 (a_dbg1), .dbg_2 (a_dbg2),
    .tdc_raw (a_raw), .tdc_ready (a_ready), .tdc_overflow (a_ovf),
    .delta_fs (a_delta), .delta_valid (a_dvalid)
  );

  tdc_system_top #(.GEN_REPETITION(REP)) st_b (
    .clk, .rst, .t2d_clk, .sel_clk,
    .avs_address (b_addr), .avs_read (b_rd), .avs_write (b_wr),
    .avs_writedata (b_wdata), .avs_readdata (b_rdata), .irq_ready (b_irq),
    .pps_in (pps_b), .sfp_rx (b_rx), .sfp_tx (b_tx), .sfp_inserted (2'b11),
    .dbg_1 (b_dbg1), .dbg_2 (b_dbg2),
    .tdc_raw (b_raw), .tdc_ready (b_ready), .tdc_overflow (b_ovf),
    .delta_fs (b_delta), .delta_valid (b_dvalid)
  );

  always #(TCLK/2) t2d_clk = ~t2d_clk;
  always #(TSCR/2) sel_clk = ~sel_clk;
  always #(TBUS/2) clk     = ~clk;

  // fiber: transport delay of each lane
  // The new value lands after the receiver's clocked processes at that
  // instant have sampled the old one, as a real receiver with hold margin.
  always @(a_tx) fork
    automatic logic v = a_tx;
    begin #(FIBER_PS); b_rx <= v; end
  join_none
  always @(b_tx) fork
    automatic logic v = b_tx;
    begin #(FIBER_PS); a_rx <= v; end
  join_none


  // received PPS at A, after descrambling
  always @(posedge st_a.pps_remote) rx_edges++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- processor bus functional model (station A or B) ----
  task automatic wr(input bit stn, input logic [11:0] off, input logic [31:0] d);
    @(negedge clk);
    if (stn) begin b_addr = off[11:2]; b_wdata = d; b_wr = 1; end
    else     begin a_addr = off[11:2]; a_wdata = d; a_wr = 1; end
    @(negedge clk);
    b_wr = 0; a_wr = 0;
  endtask

  task automatic rd(input bit stn, input logic [11:0] off, output logic [31:0] d);
    @(negedge clk);
    if (stn) begin b_addr = off[11:2]; b_rd = 1; end
    else     begin a_addr = off[11:2]; a_rd = 1; end
    @(negedge clk);
    b_rd = 0; a_rd = 0;
    d = stn ? b_rdata : a_rdata;
  endtask

  task automatic meas_reset();
    wr(0, PIO_RESET, 1);
    #(8000);                       // delay lines return to idle
    wr(0, PIO_RESET, 0);
  endtask

  // wait for the ready interrupt, read the result, compare with truth
  task automatic collect(input realtime true_ps, input string tag);
    logic [31:0] n_a, n_b, n_clk, sgn;
    real  fw_ps;
    longint fw_fs;
    fork : w
      begin @(posedge a_irq); n_irq++; end
      begin #(400_000_000); end
    join_any
    disable w;
    check(a_irq, {tag, ": ready interrupt"});
    rd(0, PIO_START, n_a);
    rd(0, PIO_STOP, n_b);
    rd(0, PIO_CNT, n_clk);
    rd(0, PIO_DELAY_SIGN, sgn);
    fw_fs = longint'(n_clk) * 4_000_000 + (longint'(n_a) - longint'(n_b)) * 8590;
    if (sgn[0]) fw_fs = -fw_fs;
    fw_ps = real'(fw_fs) / 1000.0;
    check(fw_ps - true_ps < TAU && true_ps - fw_ps < TAU,
          $sformatf("%s: measured %0.2f ps, true %0.2f ps", tag, fw_ps, true_ps));
    check(a_dvalid && longint'(a_delta) == fw_fs,
          $sformatf("%s: hardware delta %0d fs vs %0d fs", tag, a_delta, fw_fs));
    if (n_clk == 0) n_n0++;
    if (n_clk > 10) n_nbig++;
    wr(0, PIO_READY_READ + 12, 1);  // clear edge capture
  endtask

  // local PPS of A at t0 + off_a, of B at t0 + off_b
  task automatic meas_pps(input int off_a, input int off_b, input string tag);
    realtime t0, t_a, t_b;
    int edges0 = rx_edges;
    meas_reset();
    t0 = $realtime;
    fork
      begin #(off_a) pps_a = 1; t_a = $realtime; #(PPS_W) pps_a = 0; end
      begin #(off_b) pps_b = 1; t_b = $realtime; #(PPS_W) pps_b = 0; end
      collect(real'(off_b + FIBER_PS) - real'(off_a), tag);
    join
    check(t_a - t0 == off_a && t_b - t0 == off_b, "stimulus timing");
    #(FIBER_PS + 1000);
    check(rx_edges - edges0 == 1, $sformatf("%s: one received PPS edge (%0d)", tag, rx_edges - edges0));
    if (off_b + FIBER_PS > off_a) n_pos++; else n_neg++;
    if (!b_ready && !b_irq) n_slave_quiet++;
  endtask

  task automatic meas_gen(input int d);
    wr(0, PIO_SEL_SRC, 1);
    wr(0, PIO_DELAY, 32'(d));
    wr(0, PIO_RESET, 1);
    @(negedge a_dbg2);              // a generator pulse has just ended
    wr(0, PIO_RESET, 0);
    collect(real'(d) * 4.0 * 100.0, $sformatf("generator delay %0d", d));
    n_gen++;
    wr(0, PIO_SEL_SRC, 0);
  endtask

  initial begin
    logic [31:0] v;
    #1 rst = 1;
    #(50_000) rst = 0;
    wr(1, PIO_MODE, 1);             // B is the slave
    wr(0, PIO_READY_READ + 8, 1);   // A: ready interrupt enabled
    rd(0, PIO_SFP_INSERTED, v);
    check(v == 1, "SFP presence read");
    n_sfp++;
    #(2 * FIBER_PS + 200_000);      // descramblers lock to the far end
    // PPS comparisons: remote later, remote earlier, both within a clock
    meas_pps(1_000_123, 300_000, "remote later");
    meas_pps(2_345_678, 100_000, "remote earlier");
    meas_pps(1_000_000, 200_777, "within a few clocks");
    for (int k = 0; k < 2; k++)
      meas_pps($urandom_range(500_000, 1_500_000), $urandom_range(100_000, 1_000_000),
               $sformatf("random %0d", k));
    // delay generator
    meas_gen(3);
    meas_gen(63);
    // missing remote PPS: the counter runs past 2^16 periods
    meas_reset();
    pps_a = 1;
    #(70_000 * TCLK);
    check(a_ovf, "counter overflow without remote PPS");
    check(!a_irq, "no result without remote PPS");
    if (a_ovf) n_ovf++;
    pps_a = 0;
    meas_reset();
    check(!a_ovf, "overflow cleared by measurement reset");
    // every mechanism happened
    check(n_pos > 0,  "mechanism: remote edge later");
    check(n_neg > 0,  "mechanism: remote edge earlier (normalizer swap)");
    check(n_gen > 0,  "mechanism: delay generator source");
    check(n_n0 > 0,   "mechanism: interval within one clock period (N = 0)");
    check(n_nbig > 0, "mechanism: coarse count over 10 periods");
    check(n_ovf > 0,  "mechanism: counter overflow");
    check(n_irq > 0,  "mechanism: ready interrupt");
    check(n_slave_quiet > 0, "mechanism: slave role does not measure");
    check(n_sfp > 0,  "mechanism: SFP presence");
    $display("mechanisms: later=%0d earlier=%0d gen=%0d N0=%0d Nbig=%0d ovf=%0d irq=%0d slave_quiet=%0d",
             n_pos, n_neg, n_gen, n_n0, n_nbig, n_ovf, n_irq, n_slave_quiet);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2_000_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

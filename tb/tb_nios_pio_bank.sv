// tb_nios_pio_bank: checks the processor register bank.
//
// Through Avalon-MM writes and reads (read latency one clock) it checks that
// each output PIO is written, read back and driven onto its port; that each
// input PIO reads its port value (after the two-flop synchroniser for
// sfp_inserted and ready_read); the ready interrupt (edge capture, mask,
// clear by write); that unmapped and unused offsets read zero; and that a
// write to one PIO leaves the others alone.
module tb_nios_pio_bank;
  timeunit 1ps;
  timeprecision 10fs;
  import tdc_pkg::*;

  logic clk = 0, rst = 0;
  logic [9:0]  avs_address = 0;
  logic        avs_read = 0, avs_write = 0;
  logic [31:0] avs_writedata = 0, avs_readdata;
  logic        irq;
  src_sel_e    pio_sel_src;
  role_e       pio_mode;
  logic        pio_reset;
  logic [5:0]  pio_delay;
  logic        pio_delay_sign = 0, pio_ready_read = 0;
  logic [15:0] pio_cnt = 0, pio_stop = 0, pio_start = 0;
  logic [1:0]  pio_sfp_inserted = 0;
  int checks = 0, failures = 0;

  nios_pio_bank dut (.*);

  always #5000 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [11:0] off, input logic [31:0] d);
    @(negedge clk);
    avs_address = off[11:2]; avs_writedata = d; avs_write = 1;
    @(negedge clk);
    avs_write = 0;
  endtask

  task automatic rd(input logic [11:0] off, output logic [31:0] d);
    @(negedge clk);
    avs_address = off[11:2]; avs_read = 1;
    @(negedge clk);
    avs_read = 0;
    d = avs_readdata;
  endtask

  task automatic expect_rd(input logic [11:0] off, input logic [31:0] e, input string what);
    logic [31:0] d;
    rd(off, d);
    check(d == e, $sformatf("%s: read %h exp %h", what, d, e));
  endtask

  initial begin
    logic [31:0] d;
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    check(pio_sel_src == SRC_PPS && pio_mode == ROLE_MASTER && !pio_reset && pio_delay == 0,
          "reset values");
    wr(PIO_SEL_SRC, 1);
    check(pio_sel_src == SRC_DELAY_GEN, "sel_src driven");
    wr(PIO_MODE, 1);
    check(pio_mode == ROLE_SLAVE, "mode driven");
    wr(PIO_DELAY, 32'h2A);
    check(pio_delay == 6'h2A, "delay driven");
    wr(PIO_RESET, 1);
    check(pio_reset, "reset pulse high");
    wr(PIO_RESET, 0);
    check(!pio_reset, "reset pulse low");
    check(pio_sel_src == SRC_DELAY_GEN && pio_mode == ROLE_SLAVE, "others kept");
    expect_rd(PIO_SEL_SRC, 1, "sel_src readback");
    expect_rd(PIO_MODE, 1, "mode readback");
    expect_rd(PIO_DELAY, 32'h2A, "delay readback");
    for (int k = 0; k < 10; k++) begin
      pio_cnt = 16'($urandom); pio_start = 16'($urandom); pio_stop = 16'($urandom);
      pio_delay_sign = 1'($urandom);
      expect_rd(PIO_CNT, 32'(pio_cnt), "cnt");
      expect_rd(PIO_START, 32'(pio_start), "start (line A)");
      expect_rd(PIO_STOP, 32'(pio_stop), "stop (line B)");
      expect_rd(PIO_DELAY_SIGN, 32'(pio_delay_sign), "delay sign");
    end
    pio_sfp_inserted = 2'b10;
    repeat (3) @(negedge clk);
    expect_rd(PIO_SFP_INSERTED, 2, "sfp inserted");
    expect_rd(PIO_DIGIT, 0, "digit reads zero");
    expect_rd(12'h000, 0, "unmapped offset");
    // ready interrupt
    wr(PIO_READY_READ + 8, 1);
    check(!irq, "no irq before ready");
    pio_ready_read = 1;
    repeat (4) @(negedge clk);
    check(irq, "irq after ready edge");
    expect_rd(PIO_READY_READ, 1, "ready level");
    expect_rd(PIO_READY_READ + 12, 1, "edge capture set");
    wr(PIO_READY_READ + 12, 1);
    check(!irq, "irq cleared by edge-capture write");
    repeat (4) @(negedge clk);
    check(!irq, "level alone does not re-raise irq");
    pio_ready_read = 0;
    repeat (4) @(negedge clk);
    wr(PIO_READY_READ + 8, 0);
    pio_ready_read = 1;
    repeat (4) @(negedge clk);
    check(!irq, "masked irq");
    expect_rd(PIO_READY_READ + 12, 1, "edge captured while masked");
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

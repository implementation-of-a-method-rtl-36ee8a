// tdc_system_top: FPGA logic of one station for comparing two time scales.
//
// Each station receives the PPS (pulse per second) of its atomic clock. The
// slave station sends its PPS to the master over an optical fiber; the master
// measures the time between the rising edge of its local PPS and the rising
// edge of the received one with a time-to-digital converter (coarse counter
// plus carry-chain delay lines), and its control processor reports the
// result to a PC.
//
// Data path:
//   pps_in --> PRBS15 scrambler --> sfp_tx          (PPS sent to the far end)
//   sfp_rx --> PRBS15 descrambler --> remote PPS
//   {pps_in, remote PPS} or {delay generator outputs}   (selected by sel_src)
//     --> normalizer (earlier edge = start) --> TDC --> raw counts, delta_fs
// Control: the processor reaches the PIO bank through the Avalon-MM port:
// it selects the source, sets the role and the generator delay, reads the
// counts (line A, line B, clock periods) and the sign after the ready
// interrupt, and pulses the measurement reset.
// In the slave role the PPS pair is not measured (its inputs to the
// normalizer are held low); the delay generator stays usable. The selected
// pair of signals is brought out on dbg_1/dbg_2.
//
// Clocks: t2d_clk, the 4 ns measurement clock; sel_clk, the scrambler clock
// (on the slave it must be the master's clock, received over a second fiber);
// clk, the processor clock. The processor, its peripherals (UARTs, I2C
// masters for the SFP modules, timer, memory) and the board parts are outside
// this module. The TDC reset is the processor's measurement reset OR the
// system reset. The slave-role gating and the hardware delta_fs output are
// this design's choices.
module tdc_system_top
  import tdc_pkg::*;
#(
  parameter int unsigned GEN_REPETITION = tdc_pkg::GEN_REPETITION  // delay generator period, clocks
) (
  input  logic                       clk,          // processor / bus clock
  input  logic                       rst,          // system reset, active high
  input  logic                       t2d_clk,      // measurement clock
  input  logic                       sel_clk,      // scrambler clock
  // Avalon-MM slave (from the processor)
  input  logic [9:0]                 avs_address,
  input  logic                       avs_read,
  input  logic                       avs_write,
  input  logic [31:0]                avs_writedata,
  output logic [31:0]                avs_readdata,
  output logic                       irq_ready,
  // time scale and fiber
  input  logic                       pps_in,
  input  logic                       sfp_rx,
  output logic                       sfp_tx,
  input  logic [1:0]                 sfp_inserted, // module A/B present
  // debug outputs of the extension board
  output logic                       dbg_1,
  output logic                       dbg_2,
  // measurement result
  output tdc_raw_t                   tdc_raw,
  output logic                       tdc_ready,
  output logic                       tdc_overflow,
  output logic signed [RESULT_W-1:0] delta_fs,
  output logic                       delta_valid
);
  timeunit 1ps;
  timeprecision 10fs;

  src_sel_e                sel_src;
  role_e                   mode;
  logic                    meas_reset_sw, meas_reset;
  logic [DELAY_CTRL_W-1:0] delay_ctrl;
  logic                    pps_remote;
  logic                    pps_l_gated, pps_r_gated;
  logic                    gen_start, gen_stop;
  logic                    start, stop, negative;

  assign meas_reset = meas_reset_sw || rst;

  nios_pio_bank u_pio (
    .clk              (clk),
    .rst              (rst),
    .avs_address      (avs_address),
    .avs_read         (avs_read),
    .avs_write        (avs_write),
    .avs_writedata    (avs_writedata),
    .avs_readdata     (avs_readdata),
    .irq              (irq_ready),
    .pio_sel_src      (sel_src),
    .pio_mode         (mode),
    .pio_reset        (meas_reset_sw),
    .pio_delay        (delay_ctrl),
    .pio_delay_sign   (tdc_raw.negative),
    .pio_ready_read   (tdc_ready),
    .pio_cnt          (tdc_raw.n_clk),
    .pio_stop         (tdc_raw.n_b),
    .pio_start        (tdc_raw.n_a),
    .pio_sfp_inserted (sfp_inserted)
  );

  prbs15_scrambler u_scr (
    .clock (sel_clk), .rst (rst), .data_in (pps_in), .data_out (sfp_tx)
  );

  prbs15_descrambler u_dscr (
    .clock (sel_clk), .rst (rst), .data_in (sfp_rx), .data_out (pps_remote)
  );

  delay_generator #(.REPETITION(GEN_REPETITION)) u_gen (
    .reset (rst), .clock (t2d_clk), .delay (delay_ctrl),
    .output_1 (gen_start), .output_2 (gen_stop)
  );

  assign pps_l_gated = (mode == ROLE_MASTER) && pps_in;
  assign pps_r_gated = (mode == ROLE_MASTER) && pps_remote;

  pps_normalizer u_norm (
    .reset      (meas_reset),
    .sel_src    (sel_src),
    .pps_local  (pps_l_gated),
    .pps_remote (pps_r_gated),
    .gen_start  (gen_start),
    .gen_stop   (gen_stop),
    .start      (start),
    .stop       (stop),
    .negative   (negative),
    .dbg_1      (dbg_1),
    .dbg_2      (dbg_2)
  );

  tdc_core u_tdc (
    .clk         (t2d_clk),
    .reset       (meas_reset),
    .start       (start),
    .stop        (stop),
    .negative    (negative),
    .raw         (tdc_raw),
    .ready       (tdc_ready),
    .overflow    (tdc_overflow),
    .delta_fs    (delta_fs),
    .delta_valid (delta_valid)
  );
endmodule

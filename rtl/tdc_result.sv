// tdc_result: results processing, delta T = T_A + N * T_clk - T_B.
//
// T_A and T_B are the element counts of the two delay lines times the
// calibrated mean element delay TAU_FS; N is the coarse count of clock periods
// TCLK_FS. The magnitude is negated when `negative` says the second input's
// edge came first, so `delta_fs` is the signed time of input 2 minus input 1,
// in femtoseconds. The result is registered on the clock edge after `load`
// and `valid` rises with it (one clock of latency).
// The formula and the calibration constant (8.59 ps) follow the original
// design; the femtosecond fixed-point format and the hardware implementation
// of this step (originally done by the control processor) are this design's.
module tdc_result #(
  parameter int unsigned     ENC_W    = tdc_pkg::ENC_W,
  parameter int unsigned     CNT_W    = tdc_pkg::CNT_W,
  parameter int unsigned     RESULT_W = tdc_pkg::RESULT_W,
  parameter longint unsigned TAU_FS   = tdc_pkg::TAU_FS,
  parameter longint unsigned TCLK_FS  = tdc_pkg::TCLK_FS
) (
  input  logic                       clk,
  input  logic                       rst,      // asynchronous, active high
  input  logic                       load,
  input  logic [ENC_W-1:0]           n_a,
  input  logic [ENC_W-1:0]           n_b,
  input  logic [CNT_W-1:0]           n_clk,
  input  logic                       negative,
  output logic signed [RESULT_W-1:0] delta_fs,
  output logic                       valid
);
  timeunit 1ps;
  timeprecision 10fs;

  logic signed [RESULT_W-1:0] mag;
  longint                     sum;

  always_comb begin
    sum = longint'(n_clk) * longint'(TCLK_FS)
        + longint'(n_a)   * longint'(TAU_FS)
        - longint'(n_b)   * longint'(TAU_FS);
    mag = RESULT_W'(sum);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      delta_fs <= '0;
      valid    <= 1'b0;
    end else if (load) begin
      delta_fs <= negative ? -mag : mag;
      valid    <= 1'b1;
    end
  end
endmodule

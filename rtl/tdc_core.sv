// tdc_core: time-to-digital converter with coarse counter and two fine delay lines.
//
// Measures the time from the rising edge of `start` to the rising edge of
// `stop` as delta T = T_A + N * T_clk - T_B:
//   * T_A: start edge to the next clock edge, from carry delay line A;
//   * N:   clock periods between the clock edge that captures line A and the
//          clock edge that captures line B, from the coarse counter;
//   * T_B: stop edge to the next clock edge, from carry delay line B.
// The control logic launches each line on its input edge and captures it on
// the following clock edge; the two priority encoders turn the captured
// thermometer codes into element counts n_a and n_b; the results block scales
// them and the count by the calibration constants.
//
// Interface: `reset` (asynchronous, active high) arms the converter and must
// be pulsed between measurements (the control processor does this after
// reading a result). `ready` rises three clock edges after the clock edge that
// captures line B and then the raw fields in `raw` are stable; `delta_fs`
// becomes valid on the following edge. start must not come after stop (the
// normalizer in front of the converter ensures this). `negative` is passed to
// the results block as the sign of the measured interval.
// The structure follows the original design; the ready timing and the
// hardware results block are this design's choices.
module tdc_core
  import tdc_pkg::*;
#(
  parameter int unsigned DLINE_SIZE     = tdc_pkg::LINE_SIZE,
  parameter real         CARRY_DELAY_PS = 8.59,
  parameter int unsigned CNT_WIDTH      = tdc_pkg::CNT_W
) (
  input  logic                       clk,       // measurement clock (4 ns)
  input  logic                       reset,
  input  logic                       start,
  input  logic                       stop,
  input  logic                       negative,
  output tdc_raw_t                   raw,
  output logic                       ready,
  output logic                       overflow,
  output logic signed [RESULT_W-1:0] delta_fs,
  output logic                       delta_valid
);
  timeunit 1ps;
  timeprecision 10fs;

  logic start_a, start_b, stop_a, stop_b, count_en;
  logic [DLINE_SIZE-1:0] q_a, q_b;
  logic [ENC_W-1:0]     n_a, n_b;
  logic                 valid_a, valid_b;
  logic [CNT_WIDTH-1:0] n_clk;
  logic                 cnt_done;
  logic [1:0]           both_q;
  logic                 ready_q;

  tdc_sync_logic u_sync (
    .clock         (clk),
    .start         (start),
    .stop          (stop),
    .reset         (reset),
    .start_dline_A (start_a),
    .start_dline_B (start_b),
    .stop_dline_A  (stop_a),
    .stop_dline_B  (stop_b),
    .count_enable  (count_en)
  );

  carry_delay_line #(.LINE_SIZE(DLINE_SIZE), .CARRY_DELAY_PS(CARRY_DELAY_PS)) u_line_a (
    .clk (clk), .rst (reset), .op_load (1'b0), .op_a ('0), .op_b ('1),
    .start (start_a), .stop (stop_a), .q (q_a), .carry_out ()
  );

  carry_delay_line #(.LINE_SIZE(DLINE_SIZE), .CARRY_DELAY_PS(CARRY_DELAY_PS)) u_line_b (
    .clk (clk), .rst (reset), .op_load (1'b0), .op_a ('0), .op_b ('1),
    .start (start_b), .stop (stop_b), .q (q_b), .carry_out ()
  );

  prior_encoder #(.NUM_OF_IN_BITS(DLINE_SIZE), .NUM_OF_OUT_BITS(ENC_MSB)) u_enc_a (
    .clk (clk), .rst (reset), .decode (stop_a), .incoming_bits (q_a),
    .decoded_number (n_a), .valid (valid_a)
  );

  prior_encoder #(.NUM_OF_IN_BITS(DLINE_SIZE), .NUM_OF_OUT_BITS(ENC_MSB)) u_enc_b (
    .clk (clk), .rst (reset), .decode (stop_b), .incoming_bits (q_b),
    .decoded_number (n_b), .valid (valid_b)
  );

  coarse_counter #(.WIDTH(CNT_WIDTH)) u_cnt (
    .clk (clk), .rst (reset), .en (count_en),
    .count_out (n_clk), .done (cnt_done), .overflow (overflow)
  );

  // Both lines captured -> wait until encoders and counter buffer have settled.
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      both_q  <= '0;
      ready_q <= 1'b0;
    end else begin
      both_q  <= {both_q[0], stop_a && stop_b};
      ready_q <= both_q[1] && valid_a && valid_b;
    end
  end

  assign ready = ready_q;

  always_comb begin
    raw.n_a      = n_a;
    raw.n_b      = n_b;
    raw.n_clk    = CNT_W'(n_clk);
    raw.negative = negative;
  end

  tdc_result #(.ENC_W(ENC_W), .CNT_W(CNT_W), .RESULT_W(RESULT_W),
               .TAU_FS(TAU_FS), .TCLK_FS(TCLK_FS)) u_result (
    .clk (clk), .rst (reset),
    .load (ready_q && !delta_valid),
    .n_a (n_a), .n_b (n_b), .n_clk (CNT_W'(n_clk)), .negative (negative),
    .delta_fs (delta_fs), .valid (delta_valid)
  );
endmodule

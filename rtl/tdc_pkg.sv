// tdc_pkg: constants and types shared by the time-interval measurement design.
//
// The TDC combines a 16-bit coarse counter of the 4 ns measurement clock with
// two 759-element carry-chain delay lines for the fine parts T_A and T_B.
// The numbers below are the design's defaults: line length 759, encoder output
// 16 bits, counter 16 bits, element delay 8.59 ps and T_clk = 4 ns come from
// the original design; the femtosecond fixed-point result format and the PIO
// register offsets relative to the bank base are choices of this RTL (the
// offsets follow the base addresses of the processor system's PIO ports).
package tdc_pkg;
  timeunit 1ps;
  timeprecision 10fs;

  // Fine measurement
  localparam int unsigned LINE_SIZE   = 759;   // delay elements per line
  localparam int unsigned ENC_MSB     = 15;    // encoder output is [ENC_MSB:0]
  localparam int unsigned ENC_W       = ENC_MSB + 1;
  // Coarse measurement
  localparam int unsigned CNT_W       = 16;
  // Calibration of the result (femtoseconds)
  localparam longint unsigned TAU_FS  = 8590;       // mean carry element delay
  localparam longint unsigned TCLK_FS = 4_000_000;  // measurement clock period
  localparam int unsigned RESULT_W    = 48;         // signed delta T in fs
  // PRBS15 scrambler, x^15 + x^14 + 1
  localparam int unsigned PRBS_LEN    = 15;
  // Delay generator
  localparam int unsigned GEN_LINE_SIZE  = 256;
  localparam int unsigned GEN_REPETITION = 67_108_864;
  localparam int unsigned DELAY_CTRL_W   = 6;

  // PIO bank: byte offsets of each PIO from the bank base (bank base = 0x0008_1000
  // in the processor's address map). Each PIO occupies 16 bytes: data at +0x0,
  // interrupt mask at +0x8, edge capture at +0xC.
  localparam logic [11:0] PIO_SEL_SRC      = 12'h0C0;
  localparam logic [11:0] PIO_DELAY_SIGN   = 12'h0D0;
  localparam logic [11:0] PIO_MODE         = 12'h0E0;
  localparam logic [11:0] PIO_RESET        = 12'h0F0;
  localparam logic [11:0] PIO_READY_READ   = 12'h100;
  localparam logic [11:0] PIO_DIGIT        = 12'h110;
  localparam logic [11:0] PIO_CNT          = 12'h120;
  localparam logic [11:0] PIO_STOP         = 12'h130;
  localparam logic [11:0] PIO_START        = 12'h140;
  localparam logic [11:0] PIO_DELAY        = 12'h150;
  localparam logic [11:0] PIO_SFP_INSERTED = 12'h160;

  // Source of the two TDC inputs
  typedef enum logic {SRC_PPS = 1'b0, SRC_DELAY_GEN = 1'b1} src_sel_e;
  // Station role
  typedef enum logic {ROLE_MASTER = 1'b0, ROLE_SLAVE = 1'b1} role_e;

  // Raw result of one measurement
  typedef struct packed {
    logic [ENC_W-1:0] n_a;     // elements passed in line A (T_A)
    logic [ENC_W-1:0] n_b;     // elements passed in line B (T_B)
    logic [CNT_W-1:0] n_clk;   // clock periods N
    logic             negative;// remote/second input edge came first
  } tdc_raw_t;
endpackage

// nios_pio_bank: the parallel I/O ports through which the control processor
// drives and reads the measurement logic, as one Avalon-MM slave.
//
// The processor system has one PIO per signal group; here they are gathered
// into a single register bank decoded from a 4 KiB window (word address =
// byte offset / 4, window base 0x0008_1000 in the processor's map). Each PIO
// sits at its own base offset (see tdc_pkg) and uses the usual PIO layout:
// data at +0x0, interrupt mask at +0x8, edge capture at +0xC.
//   outputs (read/write data): sel_src[0], mode[0], reset[0], delay[5:0]
//   inputs  (read-only data):  delay_sign[0], ready_read[0], cnt[15:0],
//                              stop[15:0] (line B count), start[15:0]
//                              (line A count), sfp_inserted[1:0]
// ready_read has an interrupt: a rising edge of the (synchronised) ready
// input sets its edge-capture bit, `irq` is edge capture AND mask, and any
// write to the edge-capture register clears it. The digit PIO has no
// documented function and reads as zero.
//
// Timing: writes take effect on the clock edge of the write; reads have a
// fixed latency of one clock (readdata is registered). ready_read and
// sfp_inserted pass through two-flop synchronisers; the measurement values are
// read directly, which is safe because they are stable while ready is high.
// The single-bank arrangement, register layout, read latency and reset
// values (all outputs 0, so the converter is armed after reset) are this
// design's choices; the PIO names, widths and base addresses are the
// original design's.
module nios_pio_bank
  import tdc_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,            // synchronous to clk, active high
  // Avalon-MM slave
  input  logic [9:0]              avs_address,    // word address
  input  logic                    avs_read,
  input  logic                    avs_write,
  input  logic [31:0]             avs_writedata,
  output logic [31:0]             avs_readdata,
  output logic                    irq,
  // to the measurement logic
  output src_sel_e                pio_sel_src,
  output role_e                   pio_mode,
  output logic                    pio_reset,
  output logic [DELAY_CTRL_W-1:0] pio_delay,
  // from the measurement logic
  input  logic                    pio_delay_sign,
  input  logic                    pio_ready_read,
  input  logic [CNT_W-1:0]        pio_cnt,
  input  logic [ENC_W-1:0]        pio_stop,
  input  logic [ENC_W-1:0]        pio_start,
  input  logic [1:0]              pio_sfp_inserted
);
  timeunit 1ps;
  timeprecision 10fs;

  logic [1:0] ready_sync;
  logic [1:0] sfp_sync0, sfp_sync1;
  logic       ready_q;
  logic       edge_cap, irq_mask;

  // word addresses of the registers
  function automatic logic [9:0] wa(input logic [11:0] byte_off);
    return byte_off[11:2];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      ready_sync <= '0;
      sfp_sync0  <= '0;
      sfp_sync1  <= '0;
      ready_q    <= 1'b0;
    end else begin
      ready_sync <= {ready_sync[0], pio_ready_read};
      sfp_sync0  <= pio_sfp_inserted;
      sfp_sync1  <= sfp_sync0;
      ready_q    <= ready_sync[1];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pio_sel_src <= SRC_PPS;
      pio_mode    <= ROLE_MASTER;
      pio_reset   <= 1'b0;
      pio_delay   <= '0;
      irq_mask    <= 1'b0;
      edge_cap    <= 1'b0;
    end else begin
      if (ready_sync[1] && !ready_q) edge_cap <= 1'b1;
      if (avs_write) begin
        unique case (avs_address)
          wa(PIO_SEL_SRC):          pio_sel_src <= src_sel_e'(avs_writedata[0]);
          wa(PIO_MODE):             pio_mode    <= role_e'(avs_writedata[0]);
          wa(PIO_RESET):            pio_reset   <= avs_writedata[0];
          wa(PIO_DELAY):            pio_delay   <= avs_writedata[DELAY_CTRL_W-1:0];
          wa(PIO_READY_READ + 8):   irq_mask    <= avs_writedata[0];
          wa(PIO_READY_READ + 12):  edge_cap    <= 1'b0;
          default: ;
        endcase
      end
    end
  end

  assign irq = edge_cap && irq_mask;

  always_ff @(posedge clk) begin
    if (rst) begin
      avs_readdata <= '0;
    end else if (avs_read) begin
      unique case (avs_address)
        wa(PIO_SEL_SRC):          avs_readdata <= 32'(pio_sel_src);
        wa(PIO_MODE):             avs_readdata <= 32'(pio_mode);
        wa(PIO_RESET):            avs_readdata <= 32'(pio_reset);
        wa(PIO_DELAY):            avs_readdata <= 32'(pio_delay);
        wa(PIO_DELAY_SIGN):       avs_readdata <= 32'(pio_delay_sign);
        wa(PIO_READY_READ):       avs_readdata <= 32'(ready_sync[1]);
        wa(PIO_READY_READ + 8):   avs_readdata <= 32'(irq_mask);
        wa(PIO_READY_READ + 12):  avs_readdata <= 32'(edge_cap);
        wa(PIO_CNT):              avs_readdata <= 32'(pio_cnt);
        wa(PIO_STOP):             avs_readdata <= 32'(pio_stop);
        wa(PIO_START):            avs_readdata <= 32'(pio_start);
        wa(PIO_SFP_INSERTED):     avs_readdata <= 32'(sfp_sync1);
        default:                  avs_readdata <= '0;
      endcase
    end
  end

  a_no_rw: assert property (@(posedge clk) disable iff (rst) !(avs_read && avs_write))
    else $error("Avalon read and write in the same cycle");
endmodule

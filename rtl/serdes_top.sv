// serdes_top: all-digital serializer/deserializer replacing a 10-bit Fibre Channel SerDes chip.
// Transmit side (bit clock domain): the clock multiplier turns REFCLK into the serial bit
// clock; tx_input_reg latches each 10-bit 8B/10B character T(0:9) on TBC (rising edge, or
// falling edge with TXRATE low) and the decade counter tx_byte_counter tells the serializer
// when to load it; the serializer sends T0 first through its retiming flip-flop. The EWRAP
// multiplexer either drives SO with that stream or, for loopback, holds SO HIGH and feeds the
// stream to the receiver instead of SI.
// Receive side (sampling clock domain, OSR x bit rate): clock_recovery oversamples the
// selected input and recovers one bit per bit period with an Alexander phase detector and a
// digital loop filter; comma_detect looks for K28.5 in both disparities and, with ENCDET high,
// marks the word boundary; tree_demux rebuilds the characters R(0:9) (R0 first received) with
// a 1:2 / 2x1:5 tree and flags commas on COMDET; rbc_gen makes RBC0/RBC1 at the rate of the
// receiver operation table; signal_detect drives RX_LOS from the amplitude check (si_amp_ok,
// made by the analog input buffer), the run-length check and the K28.5 check.
// Latency: in loopback a character taken from T reaches R a few characters later: the TBC
// synchroniser and the wait for the next load, ten bits of serialization, the input
// synchroniser, the ten-bit comma window and the ten bits the demultiplexer collects.
// The reset input and the status outputs (stat_*) are this design's additions for use and
// observation, as are the oversampling receiver and the digital loop filter (the block
// structure, rates, bit order, comma characters and EWRAP behaviour follow the document). The
// analog buffers (SI/SO differential pairs, EQAMP) are outside and appear as single-ended ports.
module serdes_top
  import serdes_pkg::*;
#(
  parameter int unsigned OSR = 4
) (
  input  logic        rst_n,
  // transmitter
  input  logic        refclk,
  input  logic        refrate,
  input  logic        txrate,
  input  logic        tbc,
  input  logic [0:9]  t,
  input  logic        ewrap,
  output logic        so,
  // receiver
  input  logic        si,
  input  logic        si_amp_ok,
  input  logic        rxrate,
  input  logic        rbcsync,
  input  logic        encdet,
  output logic [0:9]  r,
  output logic        comdet,
  output logic        rbc0,
  output logic        rbc1,
  output logic        rx_los,
  // internal clocks and status
  output logic        bit_clk,
  output logic        os_clk,
  output logic        pll_locked,
  output logic        stat_word_vld,
  output logic        stat_realign,
  output logic        stat_step_later,
  output logic        stat_step_earlier,
  output logic        stat_rll_err
);
  // ---------------- clocks
  clock_multiplier #(.OSR(OSR)) u_pll (
    .refclk, .refrate, .txrate, .rxrate, .bit_clk, .os_clk, .locked(pll_locked)
  );

  // ---------------- transmitter
  logic       tx_load, ser;
  logic [0:9] tx_word;

  tx_byte_counter #(.WORD_W(10)) u_cnt (
    .clk(bit_clk), .rst_n, .cnt(), .load(tx_load)
  );

  tx_input_reg #(.WORD_W(10)) u_tin (
    .clk(bit_clk), .rst_n, .tbc, .txrate, .t, .word(tx_word), .strobe()
  );

  serializer #(.WORD_W(10)) u_ser (
    .clk(bit_clk), .rst_n, .load(tx_load), .word(tx_word), .ser
  );

  // ---------------- loopback selection
  logic rx_in;
  loopback_mux u_mux (.ewrap, .ser, .si, .so, .rx_in);

  // ---------------- receiver
  logic       rbit, rbit_vld;
  logic [1:0] steps;
  logic       comma, dbit, dbit_vld, align;
  logic       bit_done;
  logic [3:0] bit_pos;

  clock_recovery #(.OSR(OSR)) u_cdr (
    .clk(os_clk), .rst_n, .rx_in, .bit_vld(rbit_vld), .bit_out(rbit), .phase_steps(steps)
  );

  comma_detect #(.WORD_W(10)) u_comma (
    .clk(os_clk), .rst_n, .encdet, .bit_vld(rbit_vld), .bit_in(rbit), .window(), .comma,
    .bit_dly(dbit), .bit_dly_vld(dbit_vld), .align
  );

  tree_demux #(.WORD_W(10)) u_demux (
    .clk(os_clk), .rst_n, .bit_vld(dbit_vld), .bit_in(dbit), .align, .r, .comdet,
    .word_vld(stat_word_vld), .realigned(stat_realign), .bit_done, .bit_pos
  );

  rbc_gen u_rbc (
    .clk(os_clk), .rst_n, .rxrate, .rbcsync, .bit_done, .word_vld(stat_word_vld), .bit_pos,
    .rbc0, .rbc1
  );

  signal_detect u_sd (
    .clk(os_clk), .rst_n, .bit_vld(rbit_vld), .bit_in(rbit), .comma, .amp_ok(si_amp_ok),
    .rx_los, .rll_err(stat_rll_err)
  );

  assign stat_step_later   = steps[1];
  assign stat_step_earlier = steps[0];
endmodule

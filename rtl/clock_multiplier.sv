// clock_multiplier: BEHAVIOURAL MODEL of the transmit/receive clock multiplier PLL; it is not
// synthesizable and stands for an FPGA PLL or clock generator.
// The document's clock multiplier is a PLL with a decade counter in its feedback path that
// multiplies REFCLK by 10, 20 or 40 (125 MHz in, 1.25 GHz bit clock out in the main case).
// This model measures the REFCLK period on every rising edge and, once one period is known,
// runs bit_clk at REFCLK * mult_ratio(refrate, txrate) and os_clk, the receiver's sampling
// clock, at OSR times the receive bit rate REFCLK * mult_ratio(refrate, rxrate). How REFRATE and
// TXRATE pick among x10/x20/x40 is this design's choice (see serdes_pkg::mult_ratio). os_clk is
// started a quarter of its own period after bit_clk so that their edges do not coincide.
// Delays follow the measured REFCLK period, so the model works in any time unit with a
// precision of 1 ps or finer. locked goes high after the second REFCLK edge. A ratio change
// takes effect from the next half period.
module clock_multiplier #(
  parameter int unsigned OSR = 4
) (
  input  logic refclk,
  input  logic refrate,
  input  logic txrate,
  input  logic rxrate,
  output logic bit_clk,
  output logic os_clk,
  output logic locked
);
  import serdes_pkg::*;

  realtime t_last = 0.0;
  realtime t_ref  = 0.0;
  logic    have_period = 1'b0;

  always @(posedge refclk) begin
    if (t_last > 0.0) begin
      t_ref       = $realtime - t_last;
      have_period = 1'b1;
    end
    t_last = $realtime;
  end

  assign locked = have_period;

  initial begin
    bit_clk = 1'b0;
    wait (have_period);
    forever #(t_ref / (2.0 * real'(mult_ratio(refrate, txrate)))) bit_clk = ~bit_clk;
  end

  initial begin
    os_clk = 1'b0;
    wait (have_period);
    #(t_ref / (4.0 * real'(OSR * mult_ratio(refrate, rxrate))));
    forever #(t_ref / (2.0 * real'(OSR * mult_ratio(refrate, rxrate)))) os_clk = ~os_clk;
  end
endmodule

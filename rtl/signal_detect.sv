// signal_detect: loss-of-signal flag RX_LOS (low while the input carries a valid signal).
// Combines the document's three checks. Transition detection is analog (a comparator on the
// input swing) and arrives here as amp_ok. Run-length check: more than RL_MAX (6) equal bits
// in a row on the recovered stream is a violation. K28.5 check: the comma detector's window must
// show K28.5, either disparity, regardless of ENCDET. RX_LOS goes high at once on amp_ok low or
// on a run-length violation, and is re-evaluated at the end of every WINDOW_BITS-bit window:
// it goes low only if that window saw at least one K28.5, no run-length violation and amp_ok
// held. The observation window, that immediate/windowed split and reset to RX_LOS high are
// this design's choices. rll_err pulses once per violation.
module signal_detect #(
  parameter int unsigned RL_MAX      = 6,
  parameter int unsigned WINDOW_BITS = 1280
) (
  input  logic clk,
  input  logic rst_n,
  input  logic bit_vld,
  input  logic bit_in,
  input  logic comma,
  input  logic amp_ok,
  output logic rx_los,
  output logic rll_err
);
  localparam int unsigned RW = $clog2(RL_MAX + 2);
  localparam int unsigned WW = $clog2(WINDOW_BITS);

  logic [RW-1:0] run;
  logic          last_bit;
  logic [WW-1:0] wcnt;
  logic          seen, bad, viol;

  assign viol = bit_vld && (bit_in == last_bit) && (run == RW'(RL_MAX));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run      <= '0;
      last_bit <= 1'b0;
      wcnt     <= '0;
      seen     <= 1'b0;
      bad      <= 1'b0;
      rx_los   <= 1'b1;
      rll_err  <= 1'b0;
    end else begin
      rll_err <= viol;
      if (bit_vld) begin
        last_bit <= bit_in;
        if (bit_in != last_bit)        run <= RW'(1);
        else if (run != RW'(RL_MAX+1)) run <= run + RW'(1);
      end
      if (!amp_ok) begin
        rx_los <= 1'b1;
        wcnt   <= '0;
        seen   <= 1'b0;
        bad    <= 1'b0;
      end else begin
        if (viol) rx_los <= 1'b1;
        if (bit_vld) begin
          if (wcnt == WW'(WINDOW_BITS - 1)) begin
            wcnt   <= '0;
            rx_los <= !((seen || comma) && !(bad || viol));
            seen   <= 1'b0;
            bad    <= 1'b0;
          end else begin
            wcnt <= wcnt + WW'(1);
            if (comma) seen <= 1'b1;
            if (viol)  bad  <= 1'b1;
          end
        end
      end
    end
  end
endmodule

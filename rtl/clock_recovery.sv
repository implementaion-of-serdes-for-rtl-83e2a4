// clock_recovery: all-digital clock and data recovery of the receiver.
// The serial input is sampled OSR times per bit on the local sampling clock, which comes from
// the same reference as the transmitter but is not locked to the far-end transmitter. After a
// two flip-flop synchroniser a bit timer counts sampling cycles; it marks an edge sample in the
// middle of the bit period and a data sample at its end. The Alexander phase detector compares
// previous data, edge and current data samples; the loop filter integrates its votes and, when
// it asks, the next bit period is made one sample longer (sample later) or one sample shorter
// (sample earlier). This keeps the edge sample on the data transitions and the data sample in
// the middle of the bit, tracking frequency offsets up to about one sample per LIMIT
// transitions. The document uses an analog PLL with an Alexander detector and a charge pump;
// the oversampling timer and the digital loop filter are this design's choices.
// Outputs: bit_out/bit_vld, one recovered bit per bit period (a one-cycle strobe, 3 to OSR+1
// cycles apart); phase_steps reports a step taken ({later, earlier}), for observation.
module clock_recovery #(
  parameter int unsigned OSR   = 4,
  parameter int unsigned LIMIT = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx_in,
  output logic       bit_vld,
  output logic       bit_out,
  output logic [1:0] phase_steps
);
  localparam int unsigned TW = $clog2(OSR + 2);
  localparam logic [TW-1:0] EDGE_AT = TW'(OSR / 2 - 1);

  logic [1:0]    sync;
  logic [TW-1:0] timer, last;
  logic          pend_later, pend_earlier;
  logic          edge_vld, data_vld;
  logic          early, late, step_later, step_earlier;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= '0;
    else        sync <= {sync[0], rx_in};
  end

  // length of the current bit period: OSR, one more or one less when the loop asked for it
  always_comb begin
    if (pend_later)        last = TW'(OSR);
    else if (pend_earlier) last = TW'(OSR - 2);
    else                   last = TW'(OSR - 1);
  end

  assign edge_vld = (timer == EDGE_AT);
  assign data_vld = (timer == last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer        <= '0;
      pend_later   <= 1'b0;
      pend_earlier <= 1'b0;
      bit_vld      <= 1'b0;
      bit_out      <= 1'b0;
      phase_steps  <= '0;
    end else begin
      bit_vld     <= data_vld;
      phase_steps <= '0;
      if (data_vld) begin
        bit_out      <= sync[1];
        timer        <= '0;
        phase_steps  <= {pend_later, pend_earlier};
        pend_later   <= 1'b0;
        pend_earlier <= 1'b0;
      end else begin
        timer <= timer + TW'(1);
      end
      // a request arriving now applies to the next full bit period
      if (step_later)   pend_later   <= 1'b1;
      if (step_earlier) pend_earlier <= 1'b1;
    end
  end

  alexander_pd u_pd (
    .clk, .rst_n, .edge_vld, .data_vld, .sample(sync[1]), .early, .late
  );

  loop_filter #(.LIMIT(LIMIT)) u_lf (
    .clk, .rst_n, .early, .late, .step_later, .step_earlier
  );

  // the loop never asks for both directions at once, and a bit period is never dropped
  a_one_step: assert property (@(posedge clk) disable iff (!rst_n) !(step_later && step_earlier));
  a_bit_gap:  assert property (@(posedge clk) disable iff (!rst_n) bit_vld |=> !bit_vld);
endmodule

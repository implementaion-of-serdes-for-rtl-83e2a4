// loop_filter: digital stand-in for the charge pump and loop capacitor of the clock recovery.
// The document turns the phase detector's output into a voltage with a charge pump; in this
// all-digital version an up/down counter plays the capacitor: every early vote adds one,
// every late vote takes one away. When the count reaches +LIMIT the loop asks for the data
// sample to move one sample later (step_later) and when it reaches -LIMIT one sample earlier
// (step_earlier); the count then restarts from zero. The counter form and LIMIT are this
// design's choice. Outputs are one-cycle pulses registered from the vote.
module loop_filter #(
  parameter int unsigned LIMIT = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic early,
  input  logic late,
  output logic step_later,
  output logic step_earlier
);
  localparam int unsigned CW = $clog2(LIMIT + 1) + 1;
  logic signed [CW-1:0] acc, acc_nx;

  always_comb begin
    acc_nx = acc;
    if (early && !late)      acc_nx = acc + CW'(1);
    else if (late && !early) acc_nx = acc - CW'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc          <= '0;
      step_later   <= 1'b0;
      step_earlier <= 1'b0;
    end else begin
      step_later   <= 1'b0;
      step_earlier <= 1'b0;
      if (acc_nx >= $signed(CW'(LIMIT))) begin
        acc        <= '0;
        step_later <= 1'b1;
      end else if (acc_nx <= -$signed(CW'(LIMIT))) begin
        acc          <= '0;
        step_earlier <= 1'b1;
      end else begin
        acc <= acc_nx;
      end
    end
  end
endmodule

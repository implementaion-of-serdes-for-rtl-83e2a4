// tx_byte_counter: the decade counter of the transmit clock path.
// The clock multiplier is a PLL whose feedback path divides the bit clock by ten; in this
// digital design that divider is this counter running on the bit clock. cnt walks 0..WORD_W-1,
// one step per bit; load is high in the last bit of each character (cnt == WORD_W-1), so the
// serializer takes its next character on that edge and sends its first bit in the following
// bit period. Reset value 0 is this design's choice.
module tx_byte_counter #(
  parameter int unsigned WORD_W = 10
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic [3:0] cnt,
  output logic       load
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        cnt <= '0;
    else if (cnt == 4'(WORD_W - 1))    cnt <= '0;
    else                               cnt <= cnt + 4'd1;
  end

  assign load = (cnt == 4'(WORD_W - 1));
endmodule

// tx_input_reg: the input flip-flops on T(0:9).
// Takes the character from the protocol device and hands it to the bit-clock domain. TBC is
// brought into the bit clock domain through two synchronising flip-flops; a third stage finds
// its edge. With TXRATE high the character is taken at the rising edge of TBC, with TXRATE low
// (half speed) at the falling edge, as the document describes. T must therefore be stable for
// four bit periods after the chosen TBC edge, which it is since it changes once per character
// (ten or twenty bit periods). strobe is high for the one bit clock cycle in which word changed.
// Because TBC and the bit clock come from the same reference, this capture happens once per
// character at a fixed bit position, so the serializer's load never loses or repeats a word.
// The synchroniser depth and edge detector are this design's choice.
module tx_input_reg #(
  parameter int unsigned WORD_W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tbc,
  input  logic              txrate,
  input  logic [0:WORD_W-1] t,
  output logic [0:WORD_W-1] word,
  output logic              strobe
);
  logic [2:0] tbc_sync;   // [0] first stage, [2] previous value for edge detection
  logic       take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tbc_sync <= '0;
    else        tbc_sync <= {tbc_sync[1:0], tbc};
  end

  // rising edge of TBC at full speed, falling edge at half speed
  assign take = txrate ? ( tbc_sync[1] && !tbc_sync[2])
                       : (!tbc_sync[1] &&  tbc_sync[2]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word   <= '0;
      strobe <= 1'b0;
    end else begin
      strobe <= take;
      if (take) word <= t;
    end
  end
endmodule

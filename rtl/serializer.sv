// serializer: parallel to serial converter of the transmitter.
// A chain of WORD_W flip-flops, each fed by a two-way selection between the character bit
// (load) and the neighbouring stage (shift), followed by one retiming flip-flop on the serial
// output, as in the document's serializer circuit. On a clock edge with load high the chain
// takes word; otherwise it shifts one place toward the output. Bit 0 (T0) is the first bit
// sent. ser is the retiming flip-flop, so T0 appears on ser one bit clock after the loading
// edge and the character takes WORD_W bit clocks. Flip-flops reset to zero as in the
// document's simulation.
module serializer #(
  parameter int unsigned WORD_W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [0:WORD_W-1] word,
  output logic              ser
);
  logic [0:WORD_W-1] chain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chain <= '0;
      ser   <= 1'b0;
    end else begin
      ser <= chain[0];
      if (load) chain <= word;
      else      chain <= {chain[1:WORD_W-1], 1'b0};
    end
  end
endmodule

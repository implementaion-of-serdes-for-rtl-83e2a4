// comma_detect: K28.5 comma detector and word-boundary finder of the receiver.
// The recovered bits shift through a WORD_W-bit window (window[0] oldest). The window is
// compared with both disparities of K28.5, 0011111010 and 1100000101; comma is high while the
// window holds one, whatever ENCDET says (the loss-of-signal check uses it). The bit leaving
// the window is passed on (bit_dly, bit_dly_vld) to the demultiplexer, so the window doubles as
// a WORD_W-bit delay line: when the window holds a comma, the next bit to leave is the comma's
// first bit, and align marks it so the demultiplexer starts a word there. align is only given
// with ENCDET high. The delay-line arrangement is this design's choice.
module comma_detect
  import serdes_pkg::*;
#(
  parameter int unsigned WORD_W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              encdet,
  input  logic              bit_vld,
  input  logic              bit_in,
  output logic [0:WORD_W-1] window,
  output logic              comma,
  output logic              bit_dly,
  output logic              bit_dly_vld,
  output logic              align
);
  assign comma = (window == K28_5_NEG) || (window == K28_5_POS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      window      <= '0;
      bit_dly     <= 1'b0;
      bit_dly_vld <= 1'b0;
      align       <= 1'b0;
    end else begin
      bit_dly_vld <= bit_vld;
      if (bit_vld) begin
        window  <= {window[1:WORD_W-1], bit_in};
        bit_dly <= window[0];
        align   <= comma && encdet;
      end
    end
  end
endmodule

// rbc_gen: recovered byte clocks RBC0 and RBC1 (RBC1 is always the complement of RBC0).
// Their rate follows the receiver operation table: with RXRATE low and RBCSYNC high RBC runs
// at 1/10 of the bit rate (125 MHz for 1.25 Gb/s), so RBC0 rises with every new R character
// and stays high for five bit periods. In the other three settings RBC runs at 1/20 of the bit
// rate (62.5 MHz at 1.25 Gb/s, 125 MHz at 2.5 Gb/s): RBC0 toggles with each new R character,
// so successive characters go with the rising edges of RBC0 and RBC1 in turn. The clocks are
// generated as registered signals in the sampling clock domain and change one cycle after
// bit_done/word_vld. Their alignment to R is this design's choice.
module rbc_gen (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxrate,
  input  logic       rbcsync,
  input  logic       bit_done,
  input  logic       word_vld,
  input  logic [3:0] bit_pos,
  output logic       rbc0,
  output logic       rbc1
);
  logic div10;
  assign div10 = !rxrate && rbcsync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 rbc0 <= 1'b0;
    else if (div10) begin
      if (bit_done)             rbc0 <= (bit_pos == 4'd9) || (bit_pos < 4'd4);
    end else if (word_vld)      rbc0 <= ~rbc0;
  end

  assign rbc1 = ~rbc0;
endmodule

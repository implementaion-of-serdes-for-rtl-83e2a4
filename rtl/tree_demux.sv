// tree_demux: serial to parallel converter of the receiver, with the output register R(0:9).
// A two-level tree: the first level splits the stream into even and odd bits (a 1:2
// demultiplexer at half rate), the second level shifts each half into a five-stage register
// (1:5), and the divide-by-five count of bit pairs decides when a character is complete; then
// both branches are interleaved into R, R0 being the first bit received. The document restarts
// the division on a comma: align, given with the first bit of a comma, makes that bit position
// 0 and drops a partly collected character (realigned pulses then). comdet is high with an R
// that holds K28.5. word_vld pulses for one cycle when R changes. bit_done/bit_pos report the
// position in the character of each bit taken, for the recovered byte clock.
module tree_demux
  import serdes_pkg::*;
#(
  parameter int unsigned WORD_W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bit_vld,
  input  logic              bit_in,
  input  logic              align,
  output logic [0:WORD_W-1] r,
  output logic              comdet,
  output logic              word_vld,
  output logic              realigned,
  output logic              bit_done,
  output logic [3:0]        bit_pos
);
  localparam int unsigned HALF = WORD_W / 2;

  logic [0:HALF-1]   even_q, odd_q;   // second tree level, oldest bit at 0
  logic [3:0]        pos_cnt, cur_pos;
  logic [0:WORD_W-1] word_nx;

  assign cur_pos = align ? 4'd0 : pos_cnt;

  always_comb begin
    for (int k = 0; k < HALF; k++) begin
      word_nx[2*k] = even_q[k];
      word_nx[2*k+1] = (k == HALF - 1) ? bit_in : odd_q[k+1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      even_q    <= '0;
      odd_q     <= '0;
      pos_cnt   <= '0;
      r         <= '0;
      comdet    <= 1'b0;
      word_vld  <= 1'b0;
      realigned <= 1'b0;
      bit_done  <= 1'b0;
      bit_pos   <= '0;
    end else begin
      word_vld  <= 1'b0;
      realigned <= 1'b0;
      bit_done  <= bit_vld;
      if (bit_vld) begin
        bit_pos   <= cur_pos;
        realigned <= align && (pos_cnt != 4'd0);
        // first level: even/odd split
        if (!cur_pos[0]) even_q <= {even_q[1:HALF-1], bit_in};
        else             odd_q  <= {odd_q[1:HALF-1],  bit_in};
        // divide by five of the bit pairs
        if (cur_pos == 4'(WORD_W - 1)) begin
          pos_cnt  <= '0;
          r        <= word_nx;
          comdet   <= is_k28_5(word_nx);
          word_vld <= 1'b1;
        end else begin
          pos_cnt <= cur_pos + 4'd1;
        end
      end
    end
  end

  // a character is only completed by a bit in its last position
  a_word_on_last_bit: assert property (@(posedge clk) disable iff (!rst_n)
                                       word_vld |-> (bit_done && bit_pos == 4'(WORD_W - 1)));
endmodule

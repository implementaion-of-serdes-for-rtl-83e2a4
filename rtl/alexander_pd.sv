// alexander_pd: Alexander (bang-bang) phase detector of the clock recovery.
// As in the document's phase detector circuit, three samples are kept: B, the previous data
// sample; T, the sample taken on the expected edge between two bits; A, the current data
// sample. Two exclusive-ORs compare them: B^T says the transition came before the edge
// sample (the recovered clock is late), T^A says it came after (the clock is early). With no
// transition both are equal and nothing is reported. Here the samples arrive as strobed bits
// from the oversampling front end (edge_vld, data_vld) instead of two clock phases; that is
// this design's choice. early/late are one-cycle pulses in the cycle after data_vld.
module alexander_pd (
  input  logic clk,
  input  logic rst_n,
  input  logic edge_vld,
  input  logic data_vld,
  input  logic sample,
  output logic early,
  output logic late
);
  logic a_q;   // last data sample (becomes B)
  logic t_q;   // edge sample
  logic x_bt, x_ta;

  assign x_bt = a_q ^ t_q;     // previous data vs edge
  assign x_ta = t_q ^ sample;  // edge vs current data

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= 1'b0;
      t_q   <= 1'b0;
      early <= 1'b0;
      late  <= 1'b0;
    end else begin
      early <= 1'b0;
      late  <= 1'b0;
      if (edge_vld) t_q <= sample;
      if (data_vld) begin
        a_q   <= sample;
        early <= x_ta && !x_bt;
        late  <= x_bt && !x_ta;
      end
    end
  end
endmodule

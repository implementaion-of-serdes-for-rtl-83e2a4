// tb_comma_detect: shifts a random bit stream with K28.5 characters of both disparities
// inserted at random places through the detector. A reference window kept by the testbench
// gives the expected comma flag, the bit leaving the ten-bit window (delayed by ten bits) and
// align, which must mark exactly the first bit of each comma with ENCDET high and never with
// ENCDET low.
module tb_comma_detect;
  logic clk = 1'b0, rst_n = 1'b0, encdet = 1'b1;
  logic bit_vld = 1'b0, bit_in = 1'b0;
  logic [0:9] window;
  logic comma, bit_dly, bit_dly_vld, align;
  int checks = 0, failures = 0, n_align = 0, n_comma = 0;
  logic [0:9] ref_w = '0;
  logic stream [$];

  comma_detect dut (.clk, .rst_n, .encdet, .bit_vld, .bit_in, .window, .comma, .bit_dly,
                    .bit_dly_vld, .align);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      int k;
      k = $urandom % 12;
      if (k == 0)      for (int b = 0; b < 10; b++) stream.push_back(1'(10'b0011111010 >> (9 - b)));
      else if (k == 1) for (int b = 0; b < 10; b++) stream.push_back(1'(10'b1100000101 >> (9 - b)));
      else             stream.push_back(1'($urandom));
    end
    @(posedge clk); #1 rst_n = 1'b1;
    for (int i = 0; i < stream.size(); i++) begin
      logic exp_comma, exp_align;
      logic exp_dly;
      encdet = (i >= stream.size() * 3 / 4) ? 1'b0 : 1'b1;
      exp_comma = (ref_w == 10'b0011111010) || (ref_w == 10'b1100000101);
      checks++;
      if (comma != exp_comma || window != ref_w) begin
        failures++;
        $display("bit %0d: comma=%0b expected %0b", i, comma, exp_comma);
      end
      if (exp_comma) n_comma++;
      exp_align = exp_comma && encdet;
      exp_dly = ref_w[0];
      bit_vld = 1'b1; bit_in = stream[i];
      @(posedge clk); #1;
      bit_vld = 1'b0;
      ref_w = {ref_w[1:9], stream[i]};
      checks++;
      if (!bit_dly_vld || bit_dly != exp_dly || align != exp_align) begin
        failures++;
        $display("bit %0d: bit_dly=%0b/%0b align=%0b expected %0b", i, bit_dly, exp_dly, align, exp_align);
      end
      if (align) n_align++;
      // idle cycles between bits, as in the receiver
      repeat ($urandom % 3) begin
        @(posedge clk); #1;
        checks++;
        if (bit_dly_vld) begin failures++; $display("bit_dly_vld without a bit"); end
      end
    end
    checks++;
    if (n_align == 0 || n_comma == 0) begin failures++; $display("no comma seen"); end
    $display("commas %0d, aligns %0d", n_comma, n_align);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

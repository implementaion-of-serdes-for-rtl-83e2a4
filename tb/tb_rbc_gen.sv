// tb_rbc_gen: walks the four RXRATE/RBCSYNC rows of the receiver operation table with a
// steady stream of bit positions 0..9 (a word strobe on position 9) and checks RBC1 = ~RBC0,
// the RBC0 rate (one rising edge per character with RXRATE=0/RBCSYNC=1, one per two characters
// otherwise) and, in the 1/10 mode, RBC0 high exactly in the five bit periods after R changes.
module tb_rbc_gen;
  logic clk = 1'b0, rst_n = 1'b0, rxrate = 1'b0, rbcsync = 1'b0;
  logic bit_done = 1'b0, word_vld = 1'b0;
  logic [3:0] bit_pos = '0;
  logic rbc0, rbc1, rbc0_q;
  int checks = 0, failures = 0, rises;

  rbc_gen dut (.clk, .rst_n, .rxrate, .rbcsync, .bit_done, .word_vld, .bit_pos, .rbc0, .rbc1);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1 rst_n = 1'b1;
    for (int mode = 0; mode < 4; mode++) begin
      bit div10;
      {rxrate, rbcsync} = 2'(mode);
      div10 = (mode == 1);
      rises = 0;
      rbc0_q = rbc0;
      for (int i = 0; i < 200; i++) begin
        bit_done = 1'b1; bit_pos = 4'(i % 10); word_vld = (i % 10 == 9);
        @(posedge clk); #1;
        bit_done = 1'b0; word_vld = 1'b0;
        checks++;
        if (rbc1 != ~rbc0) begin failures++; $display("rbc1 not complement"); end
        if (div10 && i >= 10) begin
          checks++;
          if (rbc0 != ((i % 10 == 9) || (i % 10 < 4))) begin
            failures++;
            $display("mode %0d bit %0d: rbc0=%0b", mode, i % 10, rbc0);
          end
        end
        if (rbc0 && !rbc0_q) rises++;
        rbc0_q = rbc0;
        // idle sampling cycles between bits
        repeat (3) @(posedge clk);
        #1;
      end
      checks++;
      if (rises < (div10 ? 19 : 9) || rises > (div10 ? 21 : 11)) begin
        failures++;
        $display("mode %0d: %0d RBC0 rising edges in 20 characters", mode, rises);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_serializer: loads a new character every ten clocks (as the decade counter does) and
// checks that the serial output carries each character with T0 first, one bit per clock,
// back to back, starting one clock after the loading edge. The first characters are the
// all-ones / all-zeros pattern of the reference simulation, then random characters.
module tb_serializer;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0;
  logic [0:9] word = '0;
  logic ser;
  int checks = 0, failures = 0;
  logic [0:9] words [0:39];

  serializer dut (.clk, .rst_n, .load, .word, .ser);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    words[0] = '1;
    words[1] = '0;
    for (int i = 2; i < 40; i++) words[i] = 10'($urandom);
    @(posedge clk); #1 rst_n = 1'b1;
    checks++;
    if (ser !== 1'b0) begin failures++; $display("ser not reset"); end
    for (int w = 0; w < 40; w++) begin
      for (int b = 0; b < 10; b++) begin
        load = (b == 0);
        word = words[w];
        @(posedge clk); #1;
        // after the edge of bit b, ser shows bit b-1 of this word (or bit 9 of the previous)
        if (w > 0 || b > 0) begin
          logic exp_bit;
          exp_bit = (b == 0) ? words[w-1][9] : words[w][b-1];
          checks++;
          if (ser != exp_bit) begin
            failures++;
            $display("word %0d bit %0d: ser=%0b expected %0b", w, b, ser, exp_bit);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

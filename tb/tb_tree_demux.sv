// tb_tree_demux: feeds a bit stream made of characters, with align on the first bit of every
// K28.5. A few stray bits are inserted before some commas so the demultiplexer has to drop a
// partial character and realign. A reference model (the characters the testbench meant to send
// since the last alignment) gives the expected R, COMDET, word strobe and realigned pulses;
// R0 must be the first bit of each character.
module tb_tree_demux;
  logic clk = 1'b0, rst_n = 1'b0;
  logic bit_vld = 1'b0, bit_in = 1'b0, align = 1'b0;
  logic [0:9] r;
  logic comdet, word_vld, realigned, bit_done;
  logic [3:0] bit_pos;
  int checks = 0, failures = 0, n_words = 0, n_realign = 0, n_comdet = 0;
  logic [0:9] exp_q [$];
  bit exp_realign;

  tree_demux dut (.clk, .rst_n, .bit_vld, .bit_in, .align, .r, .comdet, .word_vld,
                  .realigned, .bit_done, .bit_pos);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_bit(input logic b, input logic al, input int exp_pos);
    bit_vld = 1'b1; bit_in = b; align = al;
    @(posedge clk); #1;
    bit_vld = 1'b0; align = 1'b0;
    checks++;
    if (!bit_done || bit_pos != 4'(exp_pos)) begin
      failures++;
      $display("bit position %0d expected %0d", bit_pos, exp_pos);
    end
    if (exp_pos == 9) begin
      logic [0:9] e;
      e = exp_q.pop_front();
      checks++;
      if (!word_vld || r != e || comdet != (e == 10'b0011111010 || e == 10'b1100000101)) begin
        failures++;
        $display("R=%b comdet=%0b word_vld=%0b expected %b", r, comdet, word_vld, e);
      end
      n_words++;
      if (comdet) n_comdet++;
    end else begin
      checks++;
      if (word_vld) begin failures++; $display("unexpected word strobe"); end
    end
    checks++;
    if (realigned != exp_realign) begin failures++; $display("realigned=%0b expected %0b", realigned, exp_realign); end
    if (realigned) n_realign++;
    exp_realign = 0;
    repeat ($urandom % 3) @(posedge clk);
    #0;
  endtask

  initial begin
    int pos;
    pos = 0;
    exp_realign = 0;
    @(posedge clk); #1 rst_n = 1'b1;
    for (int w = 0; w < 200; w++) begin
      logic [0:9] c;
      bit is_comma;
      is_comma = (w % 7 == 0);
      c = is_comma ? ((w % 2) ? 10'b1100000101 : 10'b0011111010) : 10'($urandom);
      if (!is_comma && (c == 10'b1100000101 || c == 10'b0011111010)) c = 10'b1010101010;
      // stray bits before some commas push the boundary off
      if (is_comma && w % 3 == 0) begin
        int n;
        n = 1 + $urandom % 9;
        for (int s = 0; s < n; s++) begin
          send_bit(1'($urandom), 1'b0, pos);
          pos = (pos + 1) % 10;
        end
      end
      exp_q.push_back(c);
      for (int b = 0; b < 10; b++) begin
        if (b == 0 && is_comma) begin
          exp_realign = (pos != 0);
          pos = 0;
        end
        send_bit(c[b], is_comma && b == 0, pos);
        pos = (pos + 1) % 10;
      end
    end
    checks++;
    if (n_realign == 0 || n_comdet == 0) begin failures++; $display("realign %0d comdet %0d", n_realign, n_comdet); end
    $display("words %0d, realignments %0d, commas %0d", n_words, n_realign, n_comdet);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

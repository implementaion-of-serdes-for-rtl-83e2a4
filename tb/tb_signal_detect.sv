// tb_signal_detect: runs RX_LOS through its cases with the default 6-bit run limit and
// 1280-bit window. A clean 8B/10B stream with K28.5 characters must bring RX_LOS low after
// a window; a run of 7 equal bits must raise it at once (with an rll_err pulse) while a run of
// 6 must not; a window without K28.5 must raise it at the window's end; amp_ok low must raise
// it at once; a clean window afterwards must clear it again.
module tb_signal_detect;
  localparam int W = 1280;
  logic clk = 1'b0, rst_n = 1'b0;
  logic bit_vld = 1'b0, bit_in = 1'b0, comma, amp_ok = 1'b1;
  logic rx_los, rll_err;
  logic [0:9] win = '0;
  int checks = 0, failures = 0, n_rll = 0;

  // reference comma window kept by the testbench
  assign comma = (win == 10'b0011111010) || (win == 10'b1100000101);

  signal_detect dut (.clk, .rst_n, .bit_vld, .bit_in, .comma, .amp_ok, .rx_los, .rll_err);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && rll_err) n_rll++;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic b);
    bit_vld = 1'b1; bit_in = b;
    @(posedge clk); #1;
    bit_vld = 1'b0;
    win = {win[1:9], b};
    @(posedge clk); #1;
  endtask

  task automatic send_char(input logic [0:9] c);
    for (int b = 0; b < 10; b++) send(c[b]);
  endtask

  // n characters; with_comma puts K28.5 as every fourth one
  task automatic send_chars(input int n, input bit with_comma);
    for (int i = 0; i < n; i++)
      send_char((with_comma && i % 4 == 0) ? ((i % 8) ? 10'b1100000101 : 10'b0011111010)
                                           : ((i % 2) ? 10'b1010101010 : 10'b1001110100));
  endtask

  task automatic expect_los(input logic v, input string what);
    checks++;
    if (rx_los != v) begin failures++; $display("%s: rx_los=%0b expected %0b", what, rx_los, v); end
  endtask

  initial begin
    @(posedge clk); #1 rst_n = 1'b1;
    expect_los(1'b1, "after reset");
    send_chars(2 * W / 10, 1'b1);
    expect_los(1'b0, "clean stream");
    // a run of six is allowed
    for (int i = 0; i < 6; i++) send(1'b1);
    send(1'b0);
    expect_los(1'b0, "run of six");
    // a run of seven is a violation (the zero above starts the run)
    for (int i = 0; i < 6; i++) send(1'b0);
    expect_los(1'b1, "run of seven");
    checks++;
    if (n_rll != 1) begin failures++; $display("rll_err pulses %0d", n_rll); end
    send(1'b1);
    send_chars(2 * W / 10 + 2, 1'b1);
    expect_los(1'b0, "recovered after run-length violation");
    // no comma for two windows
    send_chars(2 * W / 10 + 2, 1'b0);
    expect_los(1'b1, "no K28.5");
    send_chars(2 * W / 10 + 2, 1'b1);
    expect_los(1'b0, "commas back");
    // amplitude lost
    amp_ok = 1'b0;
    @(posedge clk); #1;
    @(posedge clk); #1;
    expect_los(1'b1, "amplitude low");
    send_chars(10, 1'b1);
    expect_los(1'b1, "amplitude still low");
    amp_ok = 1'b1;
    send_chars(2 * W / 10 + 2, 1'b1);
    expect_los(1'b0, "amplitude back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tx_byte_counter: checks that the decade counter walks 0..9 and raises load exactly once
// every ten bit clocks, in the tenth position. Expected values come from a cycle counter kept
// by the testbench.
module tb_tx_byte_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] cnt;
  logic load;
  int checks = 0, failures = 0;
  int cyc, loads;

  tx_byte_counter dut (.clk, .rst_n, .cnt, .load);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    loads = 0;
    for (cyc = 0; cyc < 200; cyc++) begin
      #1;
      checks++;
      if (cnt != 4'(cyc % 10) || load != (cyc % 10 == 9)) begin
        failures++;
        $display("cycle %0d: cnt=%0d load=%0b", cyc, cnt, load);
      end
      if (load) loads++;
      @(posedge clk);
    end
    checks++;
    if (loads != 20) begin failures++; $display("loads=%0d, expected 20", loads); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

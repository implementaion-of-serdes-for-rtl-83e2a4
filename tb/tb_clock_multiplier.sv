// tb_clock_multiplier: drives REFCLK at 125 MHz (8 ns) and 62.5 MHz and, for each REFRATE /
// TXRATE / RXRATE setting, counts bit clock and sampling clock edges over REFCLK periods.
// Expected: bit clock = REFCLK x 10/20/40 and sampling clock = OSR (4) x the receive bit rate.
// Time unit is 1 ns.
module tb_clock_multiplier;
  logic refclk = 1'b0, refrate = 1'b1, txrate = 1'b0, rxrate = 1'b0;
  logic bit_clk, os_clk, locked;
  real  half = 4.0;
  int checks = 0, failures = 0;
  int nbit = 0, nos = 0;

  clock_multiplier dut (.refclk, .refrate, .txrate, .rxrate, .bit_clk, .os_clk, .locked);

  always #(half) refclk = ~refclk;
  always @(posedge bit_clk) nbit++;
  always @(posedge os_clk)  nos++;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input logic rr, input logic tr, input logic xr, input int exp_tx, input int exp_rx);
    refrate = rr; txrate = tr; rxrate = xr;
    half = rr ? 4.0 : 8.0;
    // let the model see two periods at the new frequency
    repeat (4) @(posedge refclk);
    @(posedge refclk);
    nbit = 0; nos = 0;
    repeat (10) @(posedge refclk);
    checks++;
    if (nbit < 10 * exp_tx - 1 || nbit > 10 * exp_tx + 1 || nos < 40 * exp_rx - 1 || nos > 40 * exp_rx + 1) begin
      failures++;
      $display("refrate=%0b txrate=%0b rxrate=%0b: %0d bit clocks, %0d sampling clocks in 10 REFCLK periods",
               rr, tr, xr, nbit, nos);
    end
  endtask

  initial begin
    wait (locked);
    checks++;
    measure(1'b1, 1'b0, 1'b0, 10, 10);
    measure(1'b1, 1'b1, 1'b0, 20, 10);
    measure(1'b1, 1'b0, 1'b1, 10, 20);
    measure(1'b0, 1'b0, 1'b0, 20, 20);
    measure(1'b0, 1'b1, 1'b1, 40, 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

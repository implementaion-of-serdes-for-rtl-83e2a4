// tb_loop_filter: random early/late votes against a reference integrator kept in the
// testbench: the count moves by +1/-1, and on reaching +LIMIT or -LIMIT (4) a one-cycle
// step_later or step_earlier follows and the count restarts at zero.
module tb_loop_filter;
  logic clk = 1'b0, rst_n = 1'b0;
  logic early = 1'b0, late = 1'b0;
  logic step_later, step_earlier;
  int checks = 0, failures = 0, acc = 0, n_l = 0, n_e = 0;

  loop_filter #(.LIMIT(4)) dut (.clk, .rst_n, .early, .late, .step_later, .step_earlier);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      logic exp_l, exp_e;
      int bias;
      bias = (i / 500) % 2;   // alternate phases biased toward early and toward late
      early = ($urandom % 4) < (bias != 0 ? 3 : 1);
      late  = ($urandom % 4) < (bias != 0 ? 1 : 3);
      if (early && !late) acc++;
      else if (late && !early) acc--;
      exp_l = (acc >= 4);
      exp_e = (acc <= -4);
      if (exp_l || exp_e) acc = 0;
      @(posedge clk); #1;
      checks++;
      if (step_later != exp_l || step_earlier != exp_e) begin
        failures++;
        $display("vote %0d: step_later=%0b step_earlier=%0b expected %0b %0b", i, step_later, step_earlier, exp_l, exp_e);
      end
      if (step_later) n_l++;
      if (step_earlier) n_e++;
    end
    checks++;
    if (n_l == 0 || n_e == 0) begin failures++; $display("steps: later %0d earlier %0d", n_l, n_e); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

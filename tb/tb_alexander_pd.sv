// tb_alexander_pd: feeds random (previous data, edge, current data) sample triples through the
// edge/data strobes and checks the early/late pulse against the rule: a transition with the
// edge sample equal to the previous bit means the clock is early, equal to the new bit means it
// is late; no transition (or an edge sample unlike both) gives no vote.
module tb_alexander_pd;
  logic clk = 1'b0, rst_n = 1'b0;
  logic edge_vld = 1'b0, data_vld = 1'b0, sample = 1'b0;
  logic early, late;
  int checks = 0, failures = 0, n_early = 0, n_late = 0;
  logic prev;

  alexander_pd dut (.clk, .rst_n, .edge_vld, .data_vld, .sample, .early, .late);

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
    // first data sample sets the history to 0
    data_vld = 1'b1; sample = 1'b0;
    @(posedge clk); #1 data_vld = 1'b0;
    prev = 1'b0;
    for (int i = 0; i < 400; i++) begin
      logic te, d, exp_early, exp_late;
      te = 1'($urandom); d = 1'($urandom);
      edge_vld = 1'b1; sample = te;
      @(posedge clk); #1 edge_vld = 1'b0;
      @(posedge clk); #1;
      data_vld = 1'b1; sample = d;
      @(posedge clk); #1 data_vld = 1'b0;
      exp_early = (prev != d) && (te == prev);
      exp_late  = (prev != d) && (te == d);
      checks++;
      if (early != exp_early || late != exp_late) begin
        failures++;
        $display("B=%0b T=%0b A=%0b: early=%0b late=%0b", prev, te, d, early, late);
      end
      if (early) n_early++;
      if (late)  n_late++;
      @(posedge clk); #1;
      checks++;
      if (early || late) begin failures++; $display("vote longer than one cycle"); end
      prev = d;
    end
    checks++;
    if (n_early == 0 || n_late == 0) begin failures++; $display("no early or no late vote seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_clock_recovery: sends a stream of 8B/10B characters (K28.5 and data characters, runs of
// at most five equal bits) whose bit period is 0.3 % longer than OSR sampling periods for the
// first half and 0.3 % shorter for the second, so the loop must step the sampling phase both
// ways. After 200 bits of lock-in the recovered stream must match the sent stream at a fixed
// offset with no bit lost or repeated, and both step directions must have occurred.
// Time unit 1 ns, sampling clock period 1 ns.
module tb_clock_recovery;
  localparam int NBITS = 6000;
  logic clk = 1'b0, rst_n = 1'b0, rx_in = 1'b0;
  logic bit_vld, bit_out;
  logic [1:0] phase_steps;
  int checks = 0, failures = 0;
  logic sent [NBITS];
  logic rec [$];
  int n_later = 0, n_earlier = 0;
  bit tx_done = 0;

  clock_recovery #(.OSR(4), .LIMIT(4)) dut (.clk, .rst_n, .rx_in, .bit_vld, .bit_out, .phase_steps);

  always #0.5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a few valid 8B/10B characters, first bit on the left
  localparam logic [0:9] CHARS [6] = '{10'b0011111010, 10'b1100000101, 10'b1010101010,
                                       10'b0101010101, 10'b1001110100, 10'b0110001011};

  initial begin
    for (int w = 0; w < NBITS / 10; w++) begin
      logic [0:9] c;
      c = (w % 8 == 0) ? CHARS[w % 16 == 0 ? 0 : 1] : CHARS[2 + $urandom % 4];
      for (int b = 0; b < 10; b++) sent[10 * w + b] = c[b];
    end
  end

  always @(posedge clk) begin
    if (bit_vld) rec.push_back(bit_out);
    if (phase_steps[1]) n_later++;
    if (phase_steps[0]) n_earlier++;
  end

  initial begin
    #3.3 rst_n = 1'b1;
    for (int i = 0; i < NBITS; i++) begin
      rx_in = sent[i];
      #((i < NBITS / 2) ? 4.012 : 3.988);
    end
    tx_done = 1;
  end

  initial begin
    int off;
    bit found;
    wait (tx_done);
    #20;
    // find the offset of the recovered stream against the sent one after lock-in
    found = 0;
    for (off = -8; off <= 8 && !found; off++) begin
      bit ok;
      ok = 1;
      for (int j = 200; j < 400; j++) if (rec[j] != sent[j + off]) ok = 0;
      if (ok) begin
        found = 1;
        for (int j = 200; j < NBITS - 20; j++) begin
          checks++;
          if (j >= rec.size() || rec[j] != sent[j + off]) begin
            failures++;
            if (failures < 10) $display("recovered bit %0d differs (offset %0d)", j, off);
          end
        end
      end
    end
    checks++;
    if (!found) begin failures++; $display("recovered stream never matched the sent stream"); end
    checks++;
    if (n_later == 0 || n_earlier == 0) begin
      failures++;
      $display("phase steps: later %0d earlier %0d", n_later, n_earlier);
    end
    $display("recovered %0d bits, phase steps later %0d earlier %0d", rec.size(), n_later, n_earlier);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

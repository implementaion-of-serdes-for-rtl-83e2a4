// tb_tx_input_reg: drives TBC at one tenth of the bit clock and a new random character on every
// rising TBC edge (held until the next one). With TXRATE high the register must take the
// character of the rising edge; with TXRATE low the one present at the falling edge (the same
// character, since T changes only on rising edges, but taken five bit clocks later). Checks
// the captured word, one strobe per TBC period and the strobe position relative to the edge
// (three bit clocks after the rising or falling edge).
module tb_tx_input_reg;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tbc = 1'b0, txrate = 1'b1;
  logic [0:9] t = '0, word;
  logic strobe;
  int checks = 0, failures = 0;
  int edge_cyc, cyc = 0;
  logic [0:9] expect_w;

  tx_input_reg dut (.clk, .rst_n, .tbc, .txrate, .t, .word, .strobe);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // TBC: 10 bit clocks per period, edges placed between bit clock edges
  task automatic tbc_period(input logic [0:9] nt);
    #2;
    tbc = 1'b1; t = nt;
    #50;
    tbc = 1'b0;
    #48;
  endtask

  task automatic run(input logic rate);
    int strobes;
    txrate = rate;
    strobes = 0;
    for (int i = 0; i < 20; i++) begin
      logic [0:9] nt;
      nt = 10'($urandom);
      fork
        tbc_period(nt);
        begin
          // the edge used is at 2 ns (rising) or 52 ns (falling) into this period
          int wait_cyc;
          wait_cyc = rate ? 3 : 8;
          repeat (wait_cyc) @(posedge clk);
          #1;
          checks++;
          if (!strobe || word != nt) begin
            failures++;
            $display("rate=%0b period %0d: strobe=%0b word=%b expected %b", rate, i, strobe, word, nt);
          end
        end
      join
    end
  endtask

  int strobe_cnt = 0;
  always @(posedge clk) if (strobe) strobe_cnt <= strobe_cnt + 1;

  initial begin
    @(posedge clk); #3;
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    #1; // align: the process of each period starts 1 ns after a bit clock edge
    for (int k = 0; k < 2; k++) begin
      int n_before;
      n_before = strobe_cnt;
      run(k == 0);
      checks++;
      if (strobe_cnt - n_before < 19 || strobe_cnt - n_before > 21) begin
        failures++;
        $display("strobes %0d in 20 TBC periods", strobe_cnt - n_before);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

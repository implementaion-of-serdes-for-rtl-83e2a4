// tb_loopback_mux: exhaustive check of the EWRAP selection: with EWRAP high SO is HIGH and the
// receiver sees the serializer output; with EWRAP low SO carries the serializer output and the
// receiver sees SI.
module tb_loopback_mux;
  logic ewrap, ser, si, so, rx_in;
  int checks = 0, failures = 0;

  loopback_mux dut (.ewrap, .ser, .si, .so, .rx_in);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {ewrap, ser, si} = 3'(v);
      #1;
      checks++;
      if (ewrap ? (so != 1'b1 || rx_in != ser) : (so != ser || rx_in != si)) begin
        failures++;
        $display("ewrap=%0b ser=%0b si=%0b: so=%0b rx_in=%0b", ewrap, ser, si, so, rx_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

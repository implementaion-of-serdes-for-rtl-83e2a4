// loopback_mux: the EWRAP selection between the line and the internal wrap path.
// EWRAP high: the serializer output is routed internally to the receiver (multiplexer input 1)
// and the SO output is held HIGH. EWRAP low: the receiver takes SI (multiplexer input 0) and the
// serializer output is transmitted on SO. Purely combinational, as in the document; the
// differential buffers around it are analog and outside this module.
module loopback_mux (
  input  logic ewrap,
  input  logic ser,
  input  logic si,
  output logic so,
  output logic rx_in
);
  always_comb begin
    rx_in = ewrap ? ser  : si;
    so    = ewrap ? 1'b1 : ser;
  end
endmodule

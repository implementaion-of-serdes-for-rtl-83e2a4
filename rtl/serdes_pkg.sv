// serdes_pkg: constants and small helpers shared by the SerDes modules.
// Characters are 10-bit 8B/10B transmission characters held as logic [0:9], index 0 being the
// first bit on the wire (T0 / R0). The two K28.5 comma characters are the ones the receiver
// must recognise in either running disparity.
package serdes_pkg;
  localparam int unsigned CHAR_W = 10;
  typedef logic [0:CHAR_W-1] char_t;

  // K28.5, negative and positive running disparity, written first bit on the left.
  localparam char_t K28_5_NEG = 10'b0011111010;
  localparam char_t K28_5_POS = 10'b1100000101;

  function automatic logic is_k28_5(char_t c);
    return (c == K28_5_NEG) || (c == K28_5_POS);
  endfunction

  // Clock multiplier ratio: bit rate / REFCLK. REFRATE high means REFCLK runs at the full
  // character rate (x10, x20 with TXRATE high), low means half of it (x20, x40).
  function automatic int unsigned mult_ratio(logic refrate, logic txrate);
    int unsigned r;
    r = refrate ? 10 : 20;
    return txrate ? 2 * r : r;
  endfunction
endpackage

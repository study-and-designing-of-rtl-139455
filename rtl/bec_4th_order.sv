// Fourth-order bubble error correction (BEC) for a WIDTH-bit thermometer
// code t[WIDTH:1] (t[1] is the lowest comparator, t[WIDTH] the highest).
//
// A bubble is a run of up to four 0s sitting under a 1 of the code (for
// example 0000111100001111 has a fourth-order bubble). The circuit is two
// levels of OR gates and keeps no state:
//   level 1  y[i] = t[i] | t[i+1] | t[i+2] | t[i+3]   (4-input OR)
//            near the top the window is cut off by the code's end, which
//            leaves one 3-input OR (i = WIDTH-2) and one 2-input OR
//            (i = WIDTH-1); the top bit is not touched, y[WIDTH] = t[WIDTH]
//   level 2  c[i] = y[i] | y[i+1]   (2-input OR), c[WIDTH] = t[WIDTH]
// so each corrected bit is the OR of a five-bit window, c[i] = t[i] | ...
// | t[i+4], and any run of at most four 0s below a 1 is filled in. The
// level-1 equations and the gate mix follow the document; the second
// level of 2-input gates that joins neighbouring level-1 outputs is read
// from its gate-level schematic, and taking those gates as ORs (which is
// what gives fourth-order correction) is this design's reading.
//
// A stray 1 standing above the true transition is not removed: like the
// document's correction table, the circuit treats it as the top of the
// code and fills up to four 0s below it.
//
// Interface: therm_in / therm_out, WIDTH bits each. Timing: purely
// combinational, two gate levels.
module bec_4th_order #(
  parameter int unsigned WIDTH = 63   // 2^N-1 comparators, N = 6
) (
  input  logic [WIDTH:1] therm_in,
  output logic [WIDTH:1] therm_out
);

  // Level-1 OR outputs.
  logic [WIDTH:1] y;

  for (genvar i = 1; i <= WIDTH; i++) begin : g_level1
    // Upper end of this gate's window: 4 inputs, fewer near the top.
    localparam int unsigned HI = (i + 3 > WIDTH) ? WIDTH : i + 3;
    assign y[i] = |therm_in[HI:i];
  end

  assign therm_out[WIDTH] = therm_in[WIDTH];

  for (genvar i = 1; i < WIDTH; i++) begin : g_level2
    assign therm_out[i] = y[i] | y[i+1];
  end

endmodule

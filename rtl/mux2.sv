// 2:1 multiplexer, the only cell of the MUX-based thermometer-to-binary
// encoder: y = d1 when sel is 1, otherwise d0. Purely combinational.
module mux2 (
  input  logic d0,
  input  logic d1,
  input  logic sel,
  output logic y
);

  assign y = sel ? d1 : d0;

endmodule

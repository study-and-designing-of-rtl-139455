// Proposed thermometer-to-binary (TH2B) encoder of the flash ADC: the
// fourth-order bubble error correction sub-circuit followed by the MUX-based
// encoding sub-circuit, for a (2^N_BITS-1)-bit thermometer code.
//
// therm_raw comes straight from the comparators and may hold bubbles of up
// to four consecutive 0s; bec_4th_order repairs them, and mux_encoder turns
// the repaired code into N_BITS binary bits. The corrected code is brought
// out as therm_bec for observation. The split into these two sub-circuits
// follows the document's block diagram.
// Timing: purely combinational (two OR levels, then the mux tree).
module bec_mux_encoder #(
  parameter int unsigned N_BITS = 6
) (
  input  logic [(1 << N_BITS) - 1:1] therm_raw,
  output logic [(1 << N_BITS) - 1:1] therm_bec,
  output logic [N_BITS-1:0]          bin
);

  bec_4th_order #(.WIDTH((1 << N_BITS) - 1)) u_bec (
    .therm_in  (therm_raw),
    .therm_out (therm_bec)
  );

  mux_encoder #(.N_BITS(N_BITS)) u_enc (
    .therm (therm_bec),
    .bin   (bin)
  );

endmodule

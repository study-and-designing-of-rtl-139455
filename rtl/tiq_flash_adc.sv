// N_BITS-bit flash ADC with threshold inverter quantization (TIQ), fourth-
// order bubble error correction and a MUX-based thermometer-to-binary
// encoder. Behavioural at the analog front end (real-valued ports), RTL
// from the thermometer code on.
//
// Signal path: the input voltage drives 2^N_BITS-1 TIQ comparators in
// parallel. Comparator k switches at its own Vm_k (set in silicon by the
// inverter sizing, no resistor ladder); here Vm_k is spread evenly from
// VM_LO to VM_HI, one LSB apart. Each comparator feeds a gain booster that
// restores a full logic level, giving the raw thermometer code therm_raw.
// Comparator offsets vos[k] (mismatch) move individual thresholds and can
// put bubbles into that code; the BEC sub-circuit removes bubbles of up to
// fourth order and the MUX-based encoder produces bin, the number of
// comparators whose threshold lies below vin (with ideal comparators).
// The chain comparator -> gain booster -> BEC -> MUX encoder follows the
// document's block diagram; the voltages and the offset inputs are this
// design's own choices.
//
// Interface: vin (volts), vos[k] (offset of comparator k, volts; tie to 0
// for an ideal converter), therm_raw, therm_bec, bin.
// Timing: no clock; the output follows the input through the static models
// and the combinational encoder (a sampling register, if wanted, goes
// outside this module).
module tiq_flash_adc
  import flash_adc_pkg::*;
#(
  parameter int unsigned N_BITS = N_BITS_DEFAULT,
  parameter real         VM_LO  = VM_LO_DEFAULT,
  parameter real         VM_HI  = VM_HI_DEFAULT,
  parameter real         VDD    = VDD_DEFAULT
) (
  input  real                         vin,
  input  real                         vos [1:(1 << N_BITS) - 1],
  output logic [(1 << N_BITS) - 1:1]  therm_raw,
  output logic [(1 << N_BITS) - 1:1]  therm_bec,
  output logic [N_BITS-1:0]           bin
);

  localparam int unsigned NCMP = (1 << N_BITS) - 1;

  for (genvar k = 1; k <= NCMP; k++) begin : g_cmp
    real v_cmp1, v_cmp, v_boost;

    tiq_comparator #(
      .VM  (comparator_vm(k, N_BITS, VM_LO, VM_HI)),
      .VDD (VDD)
    ) u_cmp (
      .vin     (vin),
      .voffset (vos[k]),
      .vout1   (v_cmp1),
      .vout    (v_cmp)
    );

    gain_booster #(.VDD(VDD)) u_boost (
      .vin  (v_cmp),
      .vout (v_boost),
      .dout (therm_raw[k])
    );
  end

  bec_mux_encoder #(.N_BITS(N_BITS)) u_th2b (
    .therm_raw (therm_raw),
    .therm_bec (therm_bec),
    .bin       (bin)
  );

endmodule

// Behavioural model (not synthesizable) of one TIQ comparator: two cascaded
// CMOS inverters of equal sizing.
//
// The first inverter compares vin with its own switching voltage VM, which
// the transistor widths and lengths set; the second inverter re-inverts and
// adds gain, so vout rises towards VDD when vin is above VM and falls
// towards 0 when it is below. The structure (two inverters, threshold set
// by sizing, output '1' for an input above the threshold) follows the
// document. Each inverter is modelled by a clipped linear transfer curve of
// slope -GAIN through (VM, VM); the gain value is this design's choice.
//
// voffset models the input-referred offset that device mismatch adds to
// the threshold (0 for an ideal comparator); it is the cause of bubbles.
//
// Interface: vin, voffset and vout are voltages (real); vout1 is the
// internal node between the inverters. Timing: none, the model is static.
module tiq_comparator
  import flash_adc_pkg::*;
#(
  parameter real VM   = 0.9,          // switching voltage of both inverters
  parameter real GAIN = INV_GAIN,     // gain of one inverter
  parameter real VDD  = VDD_DEFAULT
) (
  input  real vin,
  input  real voffset,
  output real vout1,
  output real vout
);

  // First inverter: the threshold is VM moved by the offset.
  assign vout1 = inv_vtc(vin - voffset, VM, GAIN, VDD);
  // Second inverter: same sizing, so the same switching voltage.
  assign vout  = inv_vtc(vout1, VM, GAIN, VDD);

endmodule

// Shared constants and the analog helper functions used by the behavioural
// models of the TIQ (threshold inverter quantization) flash ADC front end.
//
// The front end has no resistor ladder: each comparator is a pair of CMOS
// inverters and its threshold is the switching voltage Vm of the first
// inverter, set by the transistor sizing. tiq_vm() gives Vm from the
// classic square-law expression for an inverter:
//   Vm = (r * (VDD - |VTP|) + VTN) / (1 + r),  r = sqrt(kp / kn)
// where kp/kn is the ratio of the PMOS and NMOS transconductance factors
// (mobility times W/L). inv_vtc() is a piecewise-linear inverter transfer
// curve: it passes through (Vm, Vm), falls with slope -gain and is clipped
// to the rails. The supply voltage, the threshold range and the gains are
// this design's own choices; the document gives none of them.
package flash_adc_pkg;

  // Default resolution: the 63-to-6 thermometer-to-binary encoder.
  localparam int unsigned N_BITS_DEFAULT = 6;

  // Supply and front-end defaults (volts), chosen for a generic CMOS process.
  localparam real VDD_DEFAULT   = 1.8;
  localparam real VM_LO_DEFAULT = 0.5;   // switching voltage of comparator 1
  localparam real VM_HI_DEFAULT = 1.3;   // switching voltage of comparator 2^N-1
  localparam real INV_GAIN      = 40.0;  // small-signal gain of one inverter

  // Switching voltage of a CMOS inverter from its strength ratio.
  function automatic real tiq_vm(real kp_over_kn, real vdd, real vtp, real vtn);
    real r;
    r = $sqrt(kp_over_kn);
    return (r * (vdd - ((vtp < 0.0) ? -vtp : vtp)) + vtn) / (1.0 + r);
  endfunction

  // Piecewise-linear inverter transfer curve through (vm, vm).
  function automatic real inv_vtc(real vin, real vm, real gain, real vdd);
    real v;
    v = vm - gain * (vin - vm);
    if (v < 0.0) v = 0.0;
    if (v > vdd) v = vdd;
    return v;
  endfunction

  // Switching voltage of comparator k (1-based) out of 2^n_bits-1, evenly
  // spread between vm_lo and vm_hi (one LSB apart).
  function automatic real comparator_vm(int unsigned k, int unsigned n_bits,
                                        real vm_lo, real vm_hi);
    return vm_lo + real'(k - 1) * (vm_hi - vm_lo) / real'((1 << n_bits) - 2);
  endfunction

endpackage

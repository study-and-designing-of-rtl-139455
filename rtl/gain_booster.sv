// Behavioural model (not synthesizable) of the gain booster that follows
// each TIQ comparator: two more cascaded inverters, sized differently from
// the comparator's, that sharpen the comparator output into a full logic
// level.
//
// Both booster inverters switch at mid-supply (VDD/2), a symmetric sizing
// that is this design's choice; the document says only that the booster is
// two cascaded inverters with different sizing from the comparator's.
// dout is the thermometer-code bit: 1 when the boosted voltage is above
// VDD/2. Interface: vin and vout are voltages (real), dout is logic.
// Timing: none, the model is static.
module gain_booster
  import flash_adc_pkg::*;
#(
  parameter real GAIN = INV_GAIN,
  parameter real VDD  = VDD_DEFAULT
) (
  input  real  vin,
  output real  vout,
  output logic dout
);

  real vmid;

  assign vmid = inv_vtc(vin,  VDD / 2.0, GAIN, VDD);
  assign vout = inv_vtc(vmid, VDD / 2.0, GAIN, VDD);
  assign dout = (vout > VDD / 2.0);

endmodule

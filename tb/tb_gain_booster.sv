// Self-checking testbench for the gain_booster behavioural model: sweeps
// the input over the supply range and checks that the logic output is 1
// above mid-supply and 0 below, and that the boosted voltage sits at the
// rails away from the switching point.
module tb_gain_booster;
  import flash_adc_pkg::*;

  real vin, vo;
  logic d;
  int checks = 0, failures = 0;

  gain_booster dut (.vin(vin), .vout(vo), .dout(d));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i <= 180; i++) begin
      vin = 0.01 * i;
      #1;
      if (vin > VDD_DEFAULT / 2.0 + 0.005) begin
        checks += 2;
        if (d !== 1'b1) begin failures++; $display("FAIL dout at %f", vin); end
        if (vo < VDD_DEFAULT - 0.01) begin failures++; $display("FAIL vout at %f: %f", vin, vo); end
      end else if (vin < VDD_DEFAULT / 2.0 - 0.005) begin
        checks += 2;
        if (d !== 1'b0) begin failures++; $display("FAIL dout at %f", vin); end
        if (vo > 0.01) begin failures++; $display("FAIL vout at %f: %f", vin, vo); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// Self-checking testbench for the tiq_comparator behavioural model and the
// analog helper functions of flash_adc_pkg.
//
// Sweeps the input across the threshold and checks that the output is near
// VDD above VM and near 0 below it, that the first inverter's node is
// inverted, that an offset moves the threshold by its own amount, and that
// tiq_vm() gives hand-computed switching voltages.
module tb_tiq_comparator;
  import flash_adc_pkg::*;

  localparam real VM = 0.75;

  real vin, vos, v1, vo;
  int checks = 0, failures = 0;

  tiq_comparator #(.VM(VM)) dut (.vin(vin), .voffset(vos), .vout1(v1), .vout(vo));

  task automatic expect_near(real got, real exp, real tol, string what);
    checks++;
    if (got < exp - tol || got > exp + tol) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Square-law switching voltage: r = sqrt(kp/kn).
    expect_near(tiq_vm(1.0, 1.8, -0.4, 0.4), 0.9, 1e-9, "Vm, r=1");
    expect_near(tiq_vm(4.0, 1.8, -0.4, 0.4), (2.0 * 1.4 + 0.4) / 3.0, 1e-9, "Vm, r=2");
    expect_near(tiq_vm(0.25, 2.5, 0.5, 0.5), (0.5 * 2.0 + 0.5) / 1.5, 1e-9, "Vm, r=0.5");

    for (int off = 0; off < 2; off++) begin
      vos = (off == 0) ? 0.0 : 0.1;
      for (int i = 0; i <= 180; i++) begin
        vin = 0.01 * i;
        #1;
        if (vin > VM + vos + 0.005) begin
          expect_near(vo, VDD_DEFAULT, 0.01, "output high above threshold");
          expect_near(v1, 0.0, VM, "inner node low above threshold");
        end else if (vin < VM + vos - 0.005) begin
          expect_near(vo, 0.0, 0.01, "output low below threshold");
          checks++;
          if (v1 <= VM) begin
            failures++;
            $display("FAIL inner node not above VM at vin=%f", vin);
          end
        end
      end
    end

    // At the switching point the first inverter sits at VM.
    vos = 0.0;
    vin = VM;
    #1;
    expect_near(v1, VM, 1e-9, "Vin = Vout at VM");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

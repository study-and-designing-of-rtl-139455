// End-to-end testbench for tiq_flash_adc at its default size (6 bits, 63
// comparators), with no parameter overrides.
//
// Phase 1, ideal comparators: the input is swept from below the lowest to
// above the highest threshold; at each point (kept 2 mV away from every
// threshold) the output must equal the number of thresholds below the
// input, worked out here from the threshold spacing, and the raw code must
// be a clean thermometer code.
// Phase 2, mismatched comparators: for input levels across the range,
// one to four adjacent comparators just below the level get a large
// positive offset so that they read 0. The raw code then holds a bubble of
// that order; the corrected code and the output must still be exact.
// Each bubble order is counted, and an order that never occurred fails.
// Phase 3: a fifth-order bubble, beyond the circuit's reach, must be seen
// to leave a 0 in the corrected code (the stated limit of the design).
module tb_tiq_flash_adc;
  import flash_adc_pkg::*;

  localparam int N    = N_BITS_DEFAULT;
  localparam int NCMP = (1 << N) - 1;
  localparam real LSB = (VM_HI_DEFAULT - VM_LO_DEFAULT) / real'(NCMP - 1);

  real vin;
  real vos [1:NCMP];
  logic [NCMP:1] therm_raw, therm_bec;
  logic [N-1:0]  bin;

  int checks = 0, failures = 0;
  int bubbles_seen[6];

  tiq_flash_adc dut (
    .vin(vin), .vos(vos), .therm_raw(therm_raw), .therm_bec(therm_bec), .bin(bin)
  );

  function automatic logic [NCMP:1] ideal(int lvl);
    logic [NCMP:1] v = '0;
    for (int i = 1; i <= lvl; i++) v[i] = 1'b1;
    return v;
  endfunction

  // Input voltage in the middle of the code bin of level lvl (1..NCMP-1).
  function automatic real mid_of(int lvl);
    return VM_LO_DEFAULT + (real'(lvl) - 0.5) * LSB;
  endfunction

  initial begin : watchdog
    #10ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expect_lvl, nsteps;
    real pos;
    foreach (vos[k]) vos[k] = 0.0;
    foreach (bubbles_seen[i]) bubbles_seen[i] = 0;
    vin = 0.0;
    #1;

    // Phase 1: ideal sweep in 1 mV steps.
    nsteps = 0;
    for (int i = 0; i <= 1000; i++) begin
      vin = VM_LO_DEFAULT - 0.1 + 0.001 * i;
      pos = (vin - VM_LO_DEFAULT) / LSB;          // thresholds sit at pos = 0..NCMP-1
      if (pos > -0.2 && (pos - $floor(pos + 0.5) < 0.16) && (pos - $floor(pos + 0.5) > -0.16)
          && pos < real'(NCMP) - 0.8)
        continue;                                 // too close to a threshold
      if (pos < 0.0) expect_lvl = 0;
      else expect_lvl = ($floor(pos) + 1 > NCMP) ? NCMP : int'($floor(pos)) + 1;
      #1;
      nsteps++;
      checks += 2;
      if (bin !== N'(expect_lvl)) begin
        failures++;
        $display("FAIL ideal vin=%f bin=%0d expected %0d", vin, bin, expect_lvl);
      end
      if (therm_raw !== ideal(expect_lvl)) begin
        failures++;
        $display("FAIL ideal vin=%f raw code not clean", vin);
      end
    end
    $display("ideal sweep: %0d points", nsteps);

    // Phase 2: bubbles of order 1..4 made by comparator offsets.
    for (int lvl = 2; lvl < NCMP; lvl++) begin
      for (int ord = 1; ord <= 4; ord++) begin
        for (int p = 1; p + ord - 1 < lvl; p += 3) begin
          foreach (vos[k]) vos[k] = 0.0;
          for (int q = p; q < p + ord; q++) vos[q] = 1.0;  // pushed above the input
          vin = mid_of(lvl);
          #1;
          checks += 3;
          if (therm_raw === ideal(lvl)) begin
            failures++;
            $display("FAIL no bubble appeared at lvl=%0d ord=%0d p=%0d", lvl, ord, p);
          end else bubbles_seen[ord]++;
          if (therm_bec !== ideal(lvl)) begin
            failures++;
            $display("FAIL bubble not corrected lvl=%0d ord=%0d p=%0d", lvl, ord, p);
          end
          if (bin !== N'(lvl)) begin
            failures++;
            $display("FAIL lvl=%0d ord=%0d p=%0d bin=%0d", lvl, ord, p, bin);
          end
        end
      end
    end

    // Phase 3: a fifth-order bubble stays.
    foreach (vos[k]) vos[k] = 0.0;
    for (int q = 20; q < 25; q++) vos[q] = 1.0;
    vin = mid_of(40);
    #1;
    checks++;
    if (therm_bec === ideal(40)) begin
      failures++;
      $display("FAIL fifth-order bubble unexpectedly corrected");
    end else bubbles_seen[5]++;

    for (int ord = 1; ord <= 5; ord++) begin
      $display("order-%0d bubbles produced: %0d", ord, bubbles_seen[ord]);
      checks++;
      if (bubbles_seen[ord] == 0) begin
        failures++;
        $display("FAIL no order-%0d bubble was produced", ord);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

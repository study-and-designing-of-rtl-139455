// Self-checking testbench for bec_mux_encoder, the BEC plus MUX encoder.
//
// For the 15-to-4 and the default 63-to-6 versions, every ideal thermometer
// code with a bubble of order 0..4 at every place below its top 1 must give
// the code's level, and the corrected code must be the ideal one. The three
// bubbled codes of the worked correction table must give 10, 11 and 10.
// The testbench also counts how many of the bubbled codes would have been
// encoded wrongly without correction (by a binary-search reference applied
// to the raw code), to show the correction is doing work.
module tb_bec_mux_encoder;

  logic [15:1] raw4, bec4;
  logic [3:0]  bin4;
  logic [63:1] raw6, bec6;
  logic [5:0]  bin6;

  int checks = 0, failures = 0;
  int saved[5];   // bubbles per order that a bare encoder would have missed

  bec_mux_encoder #(.N_BITS(4)) dut4 (.therm_raw(raw4), .therm_bec(bec4), .bin(bin4));
  bec_mux_encoder               dut6 (.therm_raw(raw6), .therm_bec(bec6), .bin(bin6));

  function automatic int unsigned search(logic [63:1] t, int nb);
    int unsigned base = 0;
    for (int k = nb - 1; k >= 0; k--)
      if (t[base + (1 << k)]) base += (1 << k);
    return base;
  endfunction

  initial begin : watchdog
    #10ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:1] ideal, stim;
    raw4 = '0; raw6 = '0;
    foreach (saved[i]) saved[i] = 0;
    #1;

    raw4 = 15'b000001111011111; #1; checks++;
    if (bin4 !== 4'd10) begin failures++; $display("FAIL column A -> %0d", bin4); end
    raw4 = 15'b000011001111111; #1; checks++;
    if (bin4 !== 4'd11) begin failures++; $display("FAIL column B -> %0d", bin4); end
    raw4 = 15'b000001111100011; #1; checks++;
    if (bin4 !== 4'd10) begin failures++; $display("FAIL column C -> %0d", bin4); end

    for (int nb = 4; nb <= 6; nb += 2) begin
      int width;
      width = (1 << nb) - 1;
      for (int lvl = 0; lvl <= width; lvl++) begin
        ideal = '0;
        for (int i = 1; i <= lvl; i++) ideal[i] = 1'b1;
        for (int ord = 0; ord <= 4; ord++) begin
          for (int p = 1; (ord == 0) ? (p == 1) : (p + ord - 1 < lvl); p++) begin
            stim = ideal;
            for (int q = p; q < p + ord; q++) stim[q] = 1'b0;
            if (ord > 0 && search(stim, nb) != lvl) saved[ord]++;
            if (nb == 4) begin
              raw4 = stim[15:1];
              #1;
              checks++;
              if (bin4 !== 4'(lvl) || bec4 !== ideal[15:1]) begin
                failures++;
                $display("FAIL n=4 lvl=%0d ord=%0d p=%0d bin=%0d", lvl, ord, p, bin4);
              end
            end else begin
              raw6 = stim;
              #1;
              checks++;
              if (bin6 !== 6'(lvl) || bec6 !== ideal) begin
                failures++;
                $display("FAIL n=6 lvl=%0d ord=%0d p=%0d bin=%0d", lvl, ord, p, bin6);
              end
            end
          end
        end
      end
    end

    for (int ord = 1; ord <= 4; ord++) begin
      $display("order %0d bubbles that an uncorrected encoder gets wrong: %0d", ord, saved[ord]);
      checks++;
      if (saved[ord] == 0) begin
        failures++;
        $display("FAIL no order-%0d bubble exercised the correction", ord);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

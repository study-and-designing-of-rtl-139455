// Self-checking testbench for bec_4th_order.
//
// 1. The three bubbled 15-bit codes of the worked correction table
//    (first-, second- and third-order bubbles) against their corrected codes.
// 2. Every ideal code of the 15-bit and the 63-bit version with one bubble of
//    order 1..4 at every possible place below the top 1: the output must be
//    the ideal code again. A fifth-order bubble must stay visible (the limit).
// 3. All 2^7 inputs of the 7-bit version (the schematic's size) and all
//    2^15 inputs of the 15-bit version against a five-bit-window OR
//    reference computed bit by bit here.
// A watchdog ends the run if it does not finish in time.
module tb_bec_4th_order;

  localparam int unsigned W15 = 15;
  localparam int unsigned W63 = 63;

  logic [W15:1] in15, out15;
  logic [W63:1] in63, out63;
  logic [7:1]   in7, out7;

  int checks = 0, failures = 0;

  bec_4th_order #(.WIDTH(W15)) dut15 (.therm_in(in15), .therm_out(out15));
  bec_4th_order                dut63 (.therm_in(in63), .therm_out(out63));
  bec_4th_order #(.WIDTH(7))   dut7  (.therm_in(in7),  .therm_out(out7));

  function automatic logic [W63:1] ideal63(int lvl);
    logic [W63:1] v = '0;
    for (int i = 1; i <= lvl; i++) v[i] = 1'b1;
    return v;
  endfunction

  task automatic check15(logic [W15:1] stim, logic [W15:1] exp, string what);
    in15 = stim;
    #1;
    checks++;
    if (out15 !== exp) begin
      failures++;
      $display("FAIL %s: in=%b out=%b exp=%b", what, stim, out15, exp);
    end
  endtask

  task automatic check63(logic [W63:1] stim, logic [W63:1] exp, string what);
    in63 = stim;
    #1;
    checks++;
    if (out63 !== exp) begin
      failures++;
      $display("FAIL %s: in=%h out=%h exp=%h", what, stim, out63, exp);
    end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W63:1] stim, ideal, refv;
    in15 = '0;
    in63 = '0;
    in7  = '0;
    #1;

    // 1. Table columns, written T15 ... T1.
    check15(15'b000001111011111, 15'b000001111111111, "table column A");
    check15(15'b000011001111111, 15'b000011111111111, "table column B");
    check15(15'b000001111100011, 15'b000001111111111, "table column C");

    // 2. Bubbles of order 1..4 in every ideal code, both widths.
    for (int w = 0; w < 2; w++) begin
      int width;
      width = (w == 0) ? W15 : W63;
      for (int lvl = 2; lvl <= width; lvl++) begin
        ideal = ideal63(lvl);
        for (int ord = 1; ord <= 5; ord++) begin
          // zeros at p .. p+ord-1, all below the top 1 at lvl
          for (int p = 1; p + ord - 1 < lvl; p++) begin
            stim = ideal;
            for (int q = p; q < p + ord; q++) stim[q] = 1'b0;
            if (ord <= 4) begin
              if (w == 0) check15(stim[W15:1], ideal[W15:1], "bubble 15");
              else        check63(stim, ideal, "bubble 63");
            end else begin
              // fifth order: beyond the circuit's reach, one 0 survives
              if (w == 0) in15 = stim[W15:1]; else in63 = stim;
              #1;
              checks++;
              if (((w == 0) ? {48'b0, out15} : out63) === ideal) begin
                failures++;
                $display("FAIL fifth-order bubble unexpectedly corrected");
              end
            end
          end
        end
      end
    end

    // 3. Exhaustive 7-bit check: T7 passes, T6 = T7|T6, T5 = T7|T6|T5, and
    // every lower output is the OR of its own and the four inputs above.
    for (int v = 0; v < 128; v++) begin
      logic [7:1] r;
      in7 = v[6:0];
      #1;
      r[7] = in7[7];
      r[6] = in7[7] | in7[6];
      r[5] = in7[7] | in7[6] | in7[5];
      r[4] = |in7[7:4];
      r[3] = |in7[7:3];
      r[2] = |in7[6:2];
      r[1] = |in7[5:1];
      checks++;
      if (out7 !== r) begin
        failures++;
        $display("FAIL 7-bit in=%b out=%b exp=%b", in7, out7, r);
      end
    end

    // Exhaustive 15-bit check against a window reference.
    for (int v = 0; v < (1 << W15); v++) begin
      logic [W15:1] r;
      for (int i = 1; i <= W15; i++) begin
        r[i] = 1'b0;
        for (int j = i; j <= i + 4 && j <= W15; j++)
          if (v[j-1]) r[i] = 1'b1;
      end
      check15(v[W15-1:0], r, "exhaustive 15");
    end

    // A few random 63-bit words against the same reference.
    for (int n = 0; n < 2000; n++) begin
      stim = {$urandom, $urandom};
      for (int i = 1; i <= W63; i++) begin
        refv[i] = 1'b0;
        for (int j = i; j <= i + 4 && j <= W63; j++)
          if (stim[j]) refv[i] = 1'b1;
      end
      check63(stim, refv, "random 63");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

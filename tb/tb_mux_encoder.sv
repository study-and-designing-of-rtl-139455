// Self-checking testbench for mux_encoder.
//
// 1. N_BITS = 3, all 128 inputs, valid or not, against the three-mux 7-to-3
//    encoder equations B2 = T4, B1 = B2 ? T6 : T2,
//    B0 = B1 ? (B2 ? T7 : T3) : (B2 ? T5 : T1).
// 2. N_BITS = 4 and the default N_BITS = 6: every valid thermometer code
//    must give the number of 1s in it.
// 3. The default version: random codes against a binary-search reference
//    written as a loop here.
module tb_mux_encoder;

  logic [7:1]  t3;
  logic [2:0]  b3;
  logic [15:1] t4;
  logic [3:0]  b4;
  logic [63:1] t6;
  logic [5:0]  b6;

  int checks = 0, failures = 0;

  mux_encoder #(.N_BITS(3)) dut3 (.therm(t3), .bin(b3));
  mux_encoder #(.N_BITS(4)) dut4 (.therm(t4), .bin(b4));
  mux_encoder               dut6 (.therm(t6), .bin(b6));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    t3 = '0; t4 = '0; t6 = '0;
    #1;

    for (int v = 0; v < 128; v++) begin
      logic e2, e1, e0;
      t3 = v[6:0];
      #1;
      e2 = t3[4];
      e1 = e2 ? t3[6] : t3[2];
      e0 = e1 ? (e2 ? t3[7] : t3[3]) : (e2 ? t3[5] : t3[1]);
      checks++;
      if (b3 !== {e2, e1, e0}) begin
        failures++;
        $display("FAIL 7-to-3 in=%b out=%b exp=%b", t3, b3, {e2, e1, e0});
      end
    end

    for (int lvl = 0; lvl <= 15; lvl++) begin
      t4 = '0;
      for (int i = 1; i <= lvl; i++) t4[i] = 1'b1;
      #1;
      checks++;
      if (b4 !== 4'(lvl)) begin
        failures++;
        $display("FAIL 15-to-4 level %0d out=%0d", lvl, b4);
      end
    end

    for (int lvl = 0; lvl <= 63; lvl++) begin
      t6 = '0;
      for (int i = 1; i <= lvl; i++) t6[i] = 1'b1;
      #1;
      checks++;
      if (b6 !== 6'(lvl)) begin
        failures++;
        $display("FAIL 63-to-6 level %0d out=%0d", lvl, b6);
      end
    end

    // Arbitrary codes: walk the binary search by hand.
    for (int n = 0; n < 3000; n++) begin
      int unsigned base, e;
      t6 = {$urandom, $urandom};
      #1;
      base = 0;
      e = 0;
      for (int k = 5; k >= 0; k--) begin
        if (t6[base + (1 << k)]) begin
          e |= (1 << k);
          base += (1 << k);
        end
      end
      checks++;
      if (b6 !== 6'(e)) begin
        failures++;
        $display("FAIL random in=%h out=%0d exp=%0d", t6, b6, e);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

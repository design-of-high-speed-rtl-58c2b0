// Self-checking testbench for booth_encoder.
//
// Applies all eight triplets and compares the decoded digit
// (+-1 or +-2 from the flags, 0 when no magnitude flag is set) with the
// digit computed from the triplet's weights: -2*t[2] + t[1] + t[0].
// Also checks that a zero digit never carries the sign flag and that the
// two magnitude flags are never set together. Each digit value must be
// seen at least once. A watchdog ends the run if it hangs.
module booth_encoder_tb;
  import mbm_pkg::*;

  logic [2:0] triplet;
  booth_sel_t sel;
  int checks = 0, failures = 0;
  int seen [5];  // counts of digits -2..+2

  booth_encoder dut (.triplet(triplet), .sel(sel));

  function automatic int decode(input booth_sel_t s);
    int mag;
    mag = s.two ? 2 : (s.one ? 1 : 0);
    return s.neg ? -mag : mag;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected;
    for (int t = 0; t < 8; t++) begin
      triplet = 3'(t);
      #1;
      expected = -2 * int'(triplet[2]) + int'(triplet[1]) + int'(triplet[0]);
      checks++;
      if (decode(sel) != expected) begin
        failures++;
        $display("FAIL triplet=%b digit=%0d expected=%0d", triplet, decode(sel), expected);
      end
      checks++;
      if (sel.one && sel.two) begin
        failures++;
        $display("FAIL triplet=%b both magnitude flags set", triplet);
      end
      checks++;
      if (expected == 0 && sel.neg) begin
        failures++;
        $display("FAIL triplet=%b zero digit with sign flag", triplet);
      end
      seen[expected + 2]++;
    end
    for (int d = 0; d < 5; d++) begin
      checks++;
      if (seen[d] == 0) begin
        failures++;
        $display("FAIL digit %0d never produced", d - 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

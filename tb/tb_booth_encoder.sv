// tb_booth_encoder: exhaustive self-checking test of the radix-4 Booth encoder.
//
// Applies all eight triplets (y[i+1], y[i], y[i-1]). For each one the
// reference digit d = -2*y[i+1] + y[i] + y[i-1] is computed here, and the
// encoder lines are checked against what that digit requires: neg is the
// digit's sign bit, a zero digit must give z = 1 and x1_b = 1, a +/-1 digit
// x1_b = 0, a +/-2 digit x1_b = 1, x2_b = 0 and z = 0.
module tb_booth_encoder;
  import mac_pkg::*;

  logic [2:0] trip;
  booth_sel_t sel;
  int checks = 0, failures = 0;

  booth_encoder dut (.trip(trip), .sel(sel));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL trip=%b %s (x1_b=%b x2_b=%b neg=%b z=%b)", trip, what,
               sel.x1_b, sel.x2_b, sel.neg, sel.z);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++) begin
      int d;
      trip = t[2:0];
      #1;
      d = -2 * int'(trip[2]) + int'(trip[1]) + int'(trip[0]);
      check(sel.neg == trip[2], "neg");
      case (d)
        0:       check(sel.z && sel.x1_b, "zero digit");
        1, -1:   check(!sel.x1_b && sel.x2_b, "one digit");
        2, -2:   check(sel.x1_b && !sel.x2_b && !sel.z, "two digit");
        default: check(1'b0, "impossible digit");
      endcase
      // the lines of the encoding table, spelled out
      check(sel.z == (trip inside {3'b000, 3'b001, 3'b110, 3'b111}), "z column");
      check(sel.x1_b == (trip inside {3'b000, 3'b011, 3'b100, 3'b111}), "x1_b column");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

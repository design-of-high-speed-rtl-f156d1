// tb_cla2: exhaustive self-checking test of the 2-bit carry look-ahead adder.
// All 32 combinations of a, b and cin; expected {cout, s} = a + b + cin.
module tb_cla2;
  logic [1:0] a, b, s;
  logic       cin, cout;
  int checks = 0, failures = 0;

  cla2 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 32; t++) begin
      {a, b, cin} = t[4:0];
      #1;
      checks++;
      if ({cout, s} !== 3'(a) + 3'(b) + 3'(cin)) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d -> %0d", a, b, cin, {cout, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

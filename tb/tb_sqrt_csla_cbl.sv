// tb_sqrt_csla_cbl: self-checking test of the 16-bit square-root carry select
// adder. Random operands plus carry chains that cross every group boundary
// (all-ones plus one, alternating patterns); expected {cout, sum} is
// a + b + cin computed here. A second instance at W = 7 checks that the
// grouping rule also holds for a width whose last group is cut short.
module tb_sqrt_csla_cbl;
  localparam int W = 16;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  logic [6:0]   a7, b7, sum7;
  logic         cout7;
  int checks = 0, failures = 0;

  sqrt_csla_cbl #(.W(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  sqrt_csla_cbl #(.W(7)) dut7 (.a(a7), .b(b7), .cin(cin), .sum(sum7), .cout(cout7));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 20000; it++) begin
      case (it % 8)
        0: begin a = '1; b = '0; end
        1: begin a = 16'h5555; b = 16'hAAAA; end
        2: begin a = W'($urandom); b = ~a; end
        3: begin a = W'(1) << ($urandom % W); b = a - 1; end
        default: begin a = W'($urandom); b = W'($urandom); end
      endcase
      cin = 1'($urandom);
      a7  = 7'($urandom);
      b7  = 7'($urandom);
      #1;
      checks++;
      if ({cout, sum} !== (W+1)'(a) + (W+1)'(b) + (W+1)'(cin)) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%b -> %b %h", a, b, cin, cout, sum);
      end
      checks++;
      if ({cout7, sum7} !== 8'(a7) + 8'(b7) + 8'(cin)) begin
        failures++;
        $display("FAIL W=7 a=%h b=%h cin=%b -> %b %h", a7, b7, cin, cout7, sum7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_booth_decoder: self-checking test of one Booth partial product row.
//
// Drives the decoder with the encoder lines of every digit in
// {-2,-1,0,+1,+2} (all eight triplets) and with random and corner-case
// multiplicands. The expected (n+1)-bit row is worked out here: d*x for a
// non-negative digit, the bitwise inverse of |d|*x for a negative non-zero
// one, and 0 for a zero digit. Runs at the default width n = 16.
module tb_booth_decoder;
  import mac_pkg::*;

  localparam int N = 16;

  logic [N-1:0] x;
  booth_sel_t   sel;
  logic [N:0]   pp;
  int checks = 0, failures = 0;

  booth_decoder #(.N(N)) dut (.x(x), .sel(sel), .pp(pp));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 400; it++) begin
      case (it)
        0: x = '0;
        1: x = {1'b1, {(N-1){1'b0}}};      // most negative
        2: x = {1'b0, {(N-1){1'b1}}};      // most positive
        3: x = '1;                          // -1
        default: x = N'($urandom);
      endcase
      for (int t = 0; t < 8; t++) begin
        logic [2:0]   trip;
        int           d;
        longint       mag;
        logic [N:0]   exp;
        trip = t[2:0];
        d    = -2 * int'(trip[2]) + int'(trip[1]) + int'(trip[0]);
        // encoder lines, written from the encoding table
        sel.x1_b = (d == 0 || d == 2 || d == -2);
        sel.x2_b = !(d == 0 || d == 2 || d == -2);
        sel.neg  = trip[2];
        sel.z    = (trip inside {3'b000, 3'b001, 3'b110, 3'b111});
        #1;
        mag = (d < 0 ? -d : d) * longint'($signed(x));
        if (d == 0)      exp = '0;
        else if (d > 0)  exp = (N+1)'(mag);
        else             exp = ~((N+1)'(mag));
        checks++;
        if (pp !== exp) begin
          failures++;
          $display("FAIL x=%h d=%0d pp=%h exp=%h", x, d, pp, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

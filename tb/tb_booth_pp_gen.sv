// tb_booth_pp_gen: self-checking test of the Booth partial product generator.
//
// For random and corner-case signed operand pairs, adds up the n/2 aligned
// rows and the correction word modulo 2^(2n) and compares the total with
// a*b computed here with the simulator's own multiplication. Also checks
// that no row carries bits below its own column 2j (the array shape) and
// that the correction word holds only the N_j bits below column n.
module tb_booth_pp_gen;
  import mac_pkg::*;

  localparam int N = 16;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] rows [N/2];
  logic [2*N-1:0] corr;
  int checks = 0, failures = 0;

  booth_pp_gen #(.N(N)) dut (.a(a), .b(b), .rows(rows), .corr(corr));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] pick(int k);
    case (k % 6)
      0: return '0;
      1: return {1'b1, {(N-1){1'b0}}};
      2: return {1'b0, {(N-1){1'b1}}};
      3: return '1;
      default: return N'($urandom);
    endcase
  endfunction

  initial begin
    for (int it = 0; it < 3000; it++) begin
      logic [2*N-1:0] total, exp;
      logic [N-1:0]   nb;
      if (it < 36) begin
        a = pick(it);
        b = pick(it / 6);
      end else begin
        a = N'($urandom);
        b = N'($urandom);
      end
      #1;
      total = corr;
      for (int j = 0; j < N / 2; j++) total += rows[j];
      exp = (2*N)'(longint'($signed(a)) * longint'($signed(b)));
      checks++;
      if (total !== exp) begin
        failures++;
        $display("FAIL a=%h b=%h sum=%h exp=%h", a, b, total, exp);
      end
      // row j starts at column 2j
      for (int j = 1; j < N / 2; j++) begin
        checks++;
        if ((rows[j] & ((2*N)'(1) << (2 * j)) - 1) != 0) begin
          failures++;
          $display("FAIL row %0d has bits below column %0d", j, 2 * j);
        end
      end
      // N_j bits: one at column 2j exactly when digit j is negative, non-zero
      nb = '0;
      for (int j = 0; j < N / 2; j++) begin
        logic [2:0] trip;
        trip = (j == 0) ? {b[1:0], 1'b0} : b[2*j+1 -: 3];
        nb[2*j] = trip[2] && !(trip[1] && trip[0]);
      end
      checks++;
      if (corr[N-1:0] !== nb) begin
        failures++;
        $display("FAIL b=%h corr low=%h exp=%h", b, corr[N-1:0], nb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

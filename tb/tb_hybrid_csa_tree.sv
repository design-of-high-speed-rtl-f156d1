// tb_hybrid_csa_tree: self-checking test of the merged carry-save tree.
//
// Drives arbitrary words on every input row (not only real Booth rows) and
// a random fed-back state, then checks, modulo 2^(2n), that
//   z + 2^n * (s + c + cy) == sum(pp_rows) + corr + {s_fb, z_fb}
//                             + 2^n * (c_fb + cy_fb)
// and that z already equals the low n bits of that total (the low half is
// resolved in the tree, not in the final adder). Sums are formed here with
// plain integer addition. Also counts cases with cy = 1, so the low-to-high
// carry path is known to be exercised.
module tb_hybrid_csa_tree;
  import mac_pkg::*;

  localparam int N = 16;

  logic [2*N-1:0] pp_rows [N/2];
  logic [2*N-1:0] corr;
  logic [N-1:0]   s_fb, c_fb, z_fb, s, c, z;
  logic           cy_fb, cy;
  int checks = 0, failures = 0, carries = 0;

  hybrid_csa_tree #(.N(N)) dut (
    .pp_rows(pp_rows), .corr(corr), .s_fb(s_fb), .c_fb(c_fb), .z_fb(z_fb),
    .cy_fb(cy_fb), .s(s), .c(c), .z(z), .cy(cy)
  );

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 5000; it++) begin
      logic [2*N-1:0] exp, got;
      for (int j = 0; j < N / 2; j++)
        pp_rows[j] = (it % 4 == 0) ? '1 : {$urandom, $urandom};
      corr  = (it % 4 == 0) ? '1 : (2*N)'({$urandom, $urandom});
      s_fb  = N'($urandom);
      c_fb  = N'($urandom);
      z_fb  = (it % 4 == 1) ? '1 : N'($urandom);
      cy_fb = 1'($urandom);
      #1;
      exp = corr + {s_fb, z_fb} + ({c_fb, {N{1'b0}}}) + ((2*N)'(cy_fb) << N);
      for (int j = 0; j < N / 2; j++) exp += pp_rows[j];
      got = {N'(0), z} + ({s, {N{1'b0}}}) + ({c, {N{1'b0}}}) + ((2*N)'(cy) << N);
      checks++;
      if (got !== exp) begin
        failures++;
        $display("FAIL it=%0d got=%h exp=%h", it, got, exp);
      end
      checks++;
      if (z !== exp[N-1:0]) begin
        failures++;
        $display("FAIL it=%0d low half z=%h exp=%h", it, z, exp[N-1:0]);
      end
      if (cy) carries++;
    end
    checks++;
    if (carries == 0) begin
      failures++;
      $display("FAIL low-half carry never set");
    end
    $display("low-half carries seen: %0d", carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

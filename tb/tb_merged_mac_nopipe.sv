// tb_merged_mac_nopipe: self-checking test of the MAC built without the
// second pipeline register (PIPELINED = 0).
//
// In this build the result follows the stage-1 registers through the final
// adder, so the accumulated value of the operands taken at one edge must be
// on p right after that edge (one edge of latency instead of two). Random
// accumulations, restarts and idle cycles are compared with a 32-bit
// reference sum kept here; the number of restarts and idle cycles is
// counted and must not be zero.
module tb_merged_mac_nopipe;
  localparam int N = 16;

  logic           clk = 1'b0;
  logic           rst_n;
  logic           in_valid, acc_clr;
  logic [N-1:0]   a, b;
  logic           out_valid;
  logic [2*N-1:0] p;

  int checks = 0, failures = 0;
  int n_clr = 0, n_idle = 0;

  merged_mac #(.N(N), .PIPELINED(1'b0)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .acc_clr(acc_clr),
    .a(a), .b(b), .out_valid(out_valid), .p(p)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [2*N-1:0] acc;

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    acc_clr  = 1'b0;
    a        = '0;
    b        = '0;
    acc      = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 5000; k++) begin
      in_valid = ($urandom % 8) != 0;
      acc_clr  = ($urandom % 16) == 0;
      a        = N'($urandom);
      b        = N'($urandom);
      if (in_valid) begin
        acc = (acc_clr ? '0 : acc) +
              (2*N)'(longint'($signed(a)) * longint'($signed(b)));
        if (acc_clr) n_clr++;
      end else begin
        n_idle++;
      end
      @(posedge clk);
      #1;
      checks++;
      if (p !== acc || out_valid !== in_valid) begin
        failures++;
        $display("FAIL k=%0d p=%h exp=%h valid=%b", k, p, acc, out_valid);
      end
      @(negedge clk);
    end
    checks++;
    if (n_clr == 0 || n_idle == 0) begin
      failures++;
      $display("FAIL restart or idle never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

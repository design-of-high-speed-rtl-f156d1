// tb_merged_mac: end-to-end self-checking test of the pipelined merged MAC.
//
// Runs the MAC at its default size (16 x 16 bits, 32-bit result, two
// pipeline stages) with no parameter overrides. A reference model kept here
// accumulates a*b in a 32-bit integer (restarting on acc_clr, wrapping
// modulo 2^32) and queues each expected result with the cycle it is due.
// Every out_valid is matched against the queue: value and latency (exactly
// two clock edges after the operands were taken, so a new result can leave
// every cycle). Idle cycles must not change the accumulator.
//
// The test drives, and counts, each mechanism of the design, failing if
// one never happened: back-to-back accumulation (no bubble between inputs),
// restart with acc_clr, idle (in_valid low) cycles holding the state, a wrap
// of the 32-bit accumulator, a carry out of the low half of the tree into
// the high half, negative products, and extreme operands (-2^15 x -2^15).
module tb_merged_mac;
  localparam int N = 16;

  logic           clk = 1'b0;
  logic           rst_n;
  logic           in_valid, acc_clr;
  logic [N-1:0]   a, b;
  logic           out_valid;
  logic [2*N-1:0] p;

  int checks = 0, failures = 0;
  int cycle = 0;

  merged_mac dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .acc_clr(acc_clr),
    .a(a), .b(b), .out_valid(out_valid), .p(p)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  logic [2*N-1:0] acc;
  logic [2*N-1:0] exp_q [$];
  int             due_q [$];

  // mechanism counters
  int n_b2b = 0, n_clr = 0, n_idle = 0, n_wrap = 0, n_lowcarry = 0;
  int n_neg = 0, n_extreme = 0, n_out = 0;
  logic prev_valid = 1'b0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (out_valid) begin
        n_out++;
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL cycle %0d: unexpected result %h", cycle, p);
        end else begin
          logic [2*N-1:0] e;
          int             d;
          e = exp_q.pop_front();
          d = due_q.pop_front();
          if (p !== e || d != cycle) begin
            failures++;
            $display("FAIL cycle %0d: p=%h exp=%h (due cycle %0d)", cycle, p, e, d);
          end
        end
      end
      if (dut.cy_q) n_lowcarry++;
    end
  end

  // take one operand pair (or idle) at the next rising edge
  task automatic drive(input bit v, input bit clr, input logic [N-1:0] x,
                       input logic [N-1:0] y);
    logic [2*N-1:0] prod, base;
    @(negedge clk);
    in_valid = v;
    acc_clr  = clr;
    a        = x;
    b        = y;
    if (v) begin
      prod = (2*N)'(longint'($signed(x)) * longint'($signed(y)));
      base = clr ? '0 : acc;
      if (!clr && ({1'b0, base} + {1'b0, prod}) > {1'b0, {(2*N){1'b1}}}) n_wrap++;
      acc = base + prod;
      // taken at the coming edge (cycle+1 once counted), visible two edges on
      exp_q.push_back(acc);
      due_q.push_back(cycle + 2);
      if (clr) n_clr++;
      if (prev_valid) n_b2b++;
      if ($signed(x) * $signed(y) < 0) n_neg++;
      if (x == {1'b1, {(N-1){1'b0}}} && y == x) n_extreme++;
    end else begin
      n_idle++;
    end
    prev_valid = v;
  endtask

  function automatic logic [N-1:0] rnd();
    case ($urandom % 8)
      0: return {1'b1, {(N-1){1'b0}}};
      1: return {1'b0, {(N-1){1'b1}}};
      2: return '1;
      3: return '0;
      default: return N'($urandom);
    endcase
  endfunction

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    acc_clr  = 1'b0;
    a        = '0;
    b        = '0;
    acc      = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // a short worked example: 3*4 = 12, then +(-5)*7 = -23, then +100*100
    drive(1, 1, 16'd3, 16'd4);
    drive(1, 0, -16'sd5, 16'd7);
    drive(1, 0, 16'd100, 16'd100);
    drive(0, 0, '0, '0);
    // repeated extreme products grow the sum until the 32-bit result wraps
    for (int k = 0; k < 6; k++) drive(1, k == 0, 16'h8000, 16'h8000);
    // random traffic: accumulations, restarts and idle cycles
    for (int k = 0; k < 20000; k++) begin
      int r;
      r = $urandom % 16;
      if (r == 0)      drive(0, 0, rnd(), rnd());
      else             drive(1, r == 1, rnd(), rnd());
    end
    drive(0, 0, '0, '0);
    repeat (4) @(posedge clk);

    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results never appeared", exp_q.size());
    end
    $display("results %0d, back-to-back %0d, restarts %0d, idle %0d, wraps %0d",
             n_out, n_b2b, n_clr, n_idle, n_wrap);
    $display("low-half carries %0d, negative products %0d, extreme products %0d",
             n_lowcarry, n_neg, n_extreme);
    checks += 7;
    if (n_b2b == 0)      begin failures++; $display("FAIL no back-to-back input"); end
    if (n_clr == 0)      begin failures++; $display("FAIL no restart"); end
    if (n_idle == 0)     begin failures++; $display("FAIL no idle cycle"); end
    if (n_wrap == 0)     begin failures++; $display("FAIL no accumulator wrap"); end
    if (n_lowcarry == 0) begin failures++; $display("FAIL no low-half carry"); end
    if (n_neg == 0)      begin failures++; $display("FAIL no negative product"); end
    if (n_extreme == 0)  begin failures++; $display("FAIL no extreme product"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

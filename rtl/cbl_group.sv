// cbl_group: one group of the carry select adder, built on Common Boolean Logic.
//
// For every bit position the two possible outcomes share one XOR: with a
// carry in of 0 the sum bit is a^b and the carry out is a&b; with a carry in
// of 1 the sum bit is the inverse, ~(a^b), and the carry out is a|b. Within
// the group the carry runs through one 2:1 mux per bit, picking the "carry
// in 1" or "carry in 0" carry of that bit. With DUAL = 1 the group evaluates
// both assumed group carries (0 and 1) from the same shared terms and the
// true incoming carry selects the group's sum and carry out, as in a carry
// select adder. With DUAL = 0 (the first group) a single chain is driven by
// the real carry in. Sharing the XOR/inverter and the AND/OR pair is the
// Common Boolean Logic of the published design; the per-bit mux chain is this design's
// reading of it. Purely combinational.
module cbl_group #(
  parameter int unsigned W    = 4,  // group width
  parameter bit          DUAL = 1'b1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W-1:0] s0, s1, g, p;   // shared Common Boolean terms
  logic [W-1:0] sum0, sum1;      // group sums for group carry in 0 and 1
  logic         k0, k1;          // group carries out for carry in 0 and 1

  assign s0 = a ^ b;
  assign s1 = ~s0;
  assign g  = a & b;
  assign p  = a | b;

  always_comb begin
    // the carry of each chain passes through one 2:1 mux per bit
    k0 = DUAL ? 1'b0 : cin;
    k1 = 1'b1;
    for (int i = 0; i < W; i++) begin
      sum0[i] = k0 ? s1[i] : s0[i];
      k0      = k0 ? p[i]  : g[i];
      sum1[i] = k1 ? s1[i] : s0[i];
      k1      = k1 ? p[i]  : g[i];
    end
    // group select: the true carry in picks one of the two results
    sum  = (DUAL && cin) ? sum1 : sum0;
    cout = (DUAL && cin) ? k1   : k0;
  end

endmodule

// cla2: 2-bit carry look-ahead adder.
//
// Adds two 2-bit words and a carry in (five inputs) with generate/propagate
// look-ahead: both internal carries come straight from g, p and cin, not
// through a ripple. In the hybrid CSA tree a chain of these resolves the low
// half of the result into final binary form while the high half stays in
// carry-save form. The published design only names this five-input adder; the
// look-ahead equations are the textbook ones. Purely combinational.
module cla2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       cin,
  output logic [1:0] s,
  output logic       cout
);

  logic [1:0] g, p;
  logic       c1;

  assign g    = a & b;
  assign p    = a ^ b;
  assign c1   = g[0] | (p[0] & cin);
  assign cout = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
  assign s    = p ^ {c1, cin};

endmodule

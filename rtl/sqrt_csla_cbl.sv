// sqrt_csla_cbl: square-root carry select adder built on Common Boolean Logic.
//
// The final adder of the MAC. A W-bit addition is split into groups whose
// width grows by one bit per group (2, 2, 3, 4, 5 for W = 16), so that each
// group has its two candidate results ready just as the carry from the
// groups below arrives: the delay grows with about the square root of W
// rather than with W. Group 0 is a plain chain fed by cin; every later
// group computes its "carry in 0" and "carry in 1" results from shared
// Common Boolean Logic terms (see cbl_group) and the incoming group carry
// selects one. For W other than 16 the same rule continues (2, 2, 3, 4, 5,
// 6, ...), the last group taking whatever bits remain.
// The five-group 16-bit split follows the published 16-bit square-root
// carry select adder; continuing it for other widths is this design's own.
// Purely combinational: sum = a + b + cin, cout = carry out of the top.
module sqrt_csla_cbl #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  function automatic int unsigned grp_size(int unsigned g);
    return (g == 0) ? 2 : g + 1;
  endfunction

  function automatic int unsigned grp_start(int unsigned g);
    int unsigned st;
    st = 0;
    for (int unsigned k = 0; k < g; k++) st = st + grp_size(k);
    return st;
  endfunction

  function automatic int unsigned num_groups();
    int unsigned g, st;
    g  = 0;
    st = 0;
    while (st < W) begin
      st = st + grp_size(g);
      g  = g + 1;
    end
    return g;
  endfunction

  localparam int unsigned NG = num_groups();

  logic [NG:0] gc;   // carries between groups
  assign gc[0] = cin;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    localparam int unsigned LO = grp_start(g);
    localparam int unsigned GW = (LO + grp_size(g) > W) ? W - LO : grp_size(g);
    cbl_group #(.W(GW), .DUAL(g != 0)) u_grp (
      .a    (a[LO +: GW]),
      .b    (b[LO +: GW]),
      .cin  (gc[g]),
      .sum  (sum[LO +: GW]),
      .cout (gc[g+1])
    );
  end

  assign cout = gc[NG];

endmodule

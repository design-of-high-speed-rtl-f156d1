// hybrid_csa_tree: carry-save tree that merges multiplication and accumulation.
//
// Adds the n/2 Booth partial product rows, their correction row and the
// previous accumulator state in one carry-save tree, so that accumulation
// costs no separate adder. The accumulator state has three parts, all fed
// back from the stage-1 registers:
//   z_fb   low n bits of the accumulated value, already in binary form
//   s_fb, c_fb   high n bits, in carry-save (sum, carry) form
//   cy_fb  carry out of the low half, still owed to the high half (weight 2^n)
// so that the accumulated value is z + 2^n * (s + c + cy) modulo 2^(2n).
//
// The tree reduces its n/2 + 4 rows with levels of word-wide 3:2 carry-save adders
// (Wallace style: every level turns each group of three rows into two) until
// two rows remain. The low n columns of those two rows are then added "in
// advance" by a chain of n/2 two-bit carry look-ahead adders, giving the
// final low bits z and a carry cy; the high n columns stay as s and c. Only
// the high half ever reaches the final adder.
// The published design draws this tree only for 8x8 bits; its exact placement of
// half and full adders is not reproduced: this row-wise Wallace reduction is
// this design's own, and so is carrying cy as a separate bit. Combinational;
// the surrounding MAC registers the outputs.
module hybrid_csa_tree
  import mac_pkg::*;
#(
  parameter int unsigned N = MAC_N   // operand width (even)
) (
  input  logic [2*N-1:0] pp_rows [N/2],  // aligned Booth rows
  input  logic [2*N-1:0] corr,           // sign constant + N_j bits
  input  logic [N-1:0]   s_fb,           // S' fed back
  input  logic [N-1:0]   c_fb,           // C' fed back
  input  logic [N-1:0]   z_fb,           // Z' fed back
  input  logic           cy_fb,          // low-half carry fed back
  output logic [N-1:0]   s,              // high half, sum word
  output logic [N-1:0]   c,              // high half, carry word
  output logic [N-1:0]   z,              // low half, final binary
  output logic           cy              // carry out of the low half
);

  localparam int unsigned W  = 2 * N;
  localparam int unsigned R0 = N / 2 + 4;

  // rows left after lv levels of 3:2 reduction
  function automatic int unsigned rows_after(int unsigned lv);
    int unsigned r;
    r = R0;
    for (int unsigned i = 0; i < lv; i++) r = (r / 3) * 2 + r % 3;
    return r;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned r, lv;
    r  = R0;
    lv = 0;
    while (r > 2) begin
      r  = (r / 3) * 2 + r % 3;
      lv = lv + 1;
    end
    return lv;
  endfunction

  localparam int unsigned LV = num_levels();

  // one word-wide 3:2 carry-save adder (a row of full adders); the carry
  // word is shifted one place left and the top carry is dropped (mod 2^W)
  function automatic void csa(input  logic [W-1:0] x0, x1, x2,
                              output logic [W-1:0] so, co);
    logic [W-1:0] maj;
    so  = x0 ^ x1 ^ x2;
    maj = (x0 & x1) | (x0 & x2) | (x1 & x2);
    co  = maj << 1;
  endfunction

  logic [W-1:0] fs, fc;   // the two rows left at the bottom of the tree

  always_comb begin
    logic [W-1:0] cur [R0];
    logic [W-1:0] nxt [R0];
    int unsigned  rl, grp;
    for (int unsigned k = 0; k < N / 2; k++) cur[k] = pp_rows[k];
    cur[N/2]   = corr;
    cur[N/2+1] = {s_fb, z_fb};
    cur[N/2+2] = {c_fb, {N{1'b0}}};
    cur[N/2+3] = {{(N-1){1'b0}}, cy_fb, {N{1'b0}}};
    for (int unsigned l = 0; l < LV; l++) begin
      rl  = rows_after(l);
      grp = rl / 3;
      for (int unsigned k = 0; k < R0; k++) nxt[k] = '0;
      for (int unsigned g = 0; g < R0 / 3; g++) begin
        if (g < grp) csa(cur[3*g], cur[3*g+1], cur[3*g+2], nxt[2*g], nxt[2*g+1]);
      end
      // rows left over when rl is not a multiple of three pass straight down
      for (int unsigned r = 0; r < 2; r++) begin
        if (r < rl % 3) nxt[2*grp+r] = cur[3*grp+r];
      end
      cur = nxt;
    end
    fs = cur[0];
    fc = cur[1];
  end

  // low half: resolve in advance with a chain of 2-bit CLAs
  logic [N/2:0] lc;

  assign lc[0] = 1'b0;

  for (genvar k = 0; k < N / 2; k++) begin : g_low
    cla2 u_cla (
      .a    (fs[2*k+1 -: 2]),
      .b    (fc[2*k+1 -: 2]),
      .cin  (lc[k]),
      .s    (z[2*k+1 -: 2]),
      .cout (lc[k+1])
    );
  end

  assign cy = lc[N/2];
  assign s  = fs[W-1:N];
  assign c  = fc[W-1:N];

endmodule

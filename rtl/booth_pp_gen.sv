// booth_pp_gen: radix-4 modified Booth partial product generator.
//
// Multiplies an n-bit two's complement multiplicand a by an n-bit two's
// complement multiplier b, producing n/2 partial product rows instead of n.
// Multiplier bits are grouped into overlapping triplets starting at the LSB
// (the first triplet uses an implied 0 below b[0]); each triplet drives one
// booth_encoder, whose lines drive one booth_decoder that forms the (n+1)-bit
// 1's complement row for that digit.
//
// The rows are returned already placed in the 2n-bit result frame:
//   rows[j] = { ~s_j, pp_j[n-1:0] } << 2j
// where s_j = pp_j[n] is the row's sign bit. Instead of sign-extending every
// row, its sign bit is inverted and one constant K = -(sum_j 2^(2j+n)) mod
// 2^(2n) is added once. corr carries that constant together with the
// 1's-to-2's complement correction bits N_j (a 1 at column 2j when the digit
// is negative and non-zero). Hence, modulo 2^(2n),
//   sum_j rows[j] + corr == a * b.
// Forming rows with inverted sign bits, one shared constant and N_j bits
// follows the published array (S_i simplifying the sign bit, N_i turning
// 1's complement into 2's complement); the exact constant and where the bits
// sit are this design's own. n must be even. Purely combinational.
module booth_pp_gen
  import mac_pkg::*;
#(
  parameter int unsigned N = MAC_N   // operand width (even)
) (
  input  logic [N-1:0]   a,               // multiplicand
  input  logic [N-1:0]   b,               // multiplier
  output logic [2*N-1:0] rows [N/2],      // aligned partial product rows
  output logic [2*N-1:0] corr             // sign constant + N_j bits
);

  localparam int unsigned R = N / 2;

  // -(sum_j 2^(2j+N)) modulo 2^(2N)
  function automatic logic [2*N-1:0] sign_const();
    logic [2*N-1:0] k;
    k = '0;
    for (int unsigned j = 0; j < R; j++) begin
      k = k - ({{(2*N-1){1'b0}}, 1'b1} << (2 * j + N));
    end
    return k;
  endfunction

  localparam logic [2*N-1:0] K = sign_const();

  logic [N:0]   bx;                 // multiplier with the implied 0 below b[0]
  booth_sel_t   sel [R];
  logic [N:0]   pp  [R];
  logic [R-1:0] nbit;

  assign bx = {b, 1'b0};

  for (genvar j = 0; j < R; j++) begin : g_digit
    booth_encoder u_enc (
      .trip (bx[2*j+2 -: 3]),
      .sel  (sel[j])
    );
    booth_decoder #(.N(N)) u_dec (
      .x   (a),
      .sel (sel[j]),
      .pp  (pp[j])
    );
    // negative non-zero digit: the row is a 1's complement, add 1 at its LSB
    assign nbit[j] = sel[j].neg & ~(sel[j].x1_b & sel[j].z);
    assign rows[j] = {{(N-1){1'b0}}, ~pp[j][N], pp[j][N-1:0]} << (2 * j);
  end

  always_comb begin
    corr = K;
    for (int unsigned j = 0; j < R; j++) begin
      corr[2*j] = nbit[j];   // K has no bits below column N
    end
  end

endmodule

// booth_decoder: builds one radix-4 Booth partial product row.
//
// From the n-bit two's complement multiplicand x and the encoder lines of
// one digit it forms the (n+1)-bit row d*x in 1's complement form: for a
// negative digit the row is the bitwise inverse of |d|*x, and the missing +1
// is added elsewhere in the array (the N_j bit made by booth_pp_gen).
// Bit i of the row is
//   pp[i] = ~( (x1_b | ~(x[i] ^ neg)) & (x2_b | z | ~(x[i-1] ^ neg)) )
// with x[-1] = 0 and x[n] = x[n-1] (sign extension of the multiplicand).
// A zero digit (z = 1, x1_b = 1) gives an all-zero row whatever neg is.
// The published design gives the decoder only as a logic diagram; this one-gate-per-bit
// form is this design's choice. Purely combinational.
module booth_decoder
  import mac_pkg::*;
#(
  parameter int unsigned N = MAC_N   // multiplicand width
) (
  input  logic [N-1:0] x,    // multiplicand, two's complement
  input  booth_sel_t   sel,  // encoder lines of this digit
  output logic [N:0]   pp    // partial product row, 1's complement
);

  // xe[i+1] = x[i]; xe[0] = x[-1] = 0; xe[N+1] = x[N] = sign of x
  logic [N+1:0] xe;
  assign xe = {x[N-1], x, 1'b0};

  always_comb begin
    for (int i = 0; i <= N; i++) begin
      pp[i] = ~((sel.x1_b | ~(xe[i+1] ^ sel.neg)) &
                (sel.x2_b | sel.z | ~(xe[i] ^ sel.neg)));
    end
  end

endmodule

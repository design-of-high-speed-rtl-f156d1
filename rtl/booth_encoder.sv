// booth_encoder: radix-4 modified Booth encoder for one multiplier digit.
//
// The multiplier is scanned in overlapping triplets (y[i+1], y[i], y[i-1]),
// one triplet per pair of multiplier bits, the first one using an implied 0
// below the LSB. Each triplet stands for a digit in {-2,-1,0,+1,+2}. The
// encoder turns it into the four lines of the modified Booth encoding table:
//   x1_b = ~(y[i] ^ y[i-1])   active low, digit is +/-1
//   x2_b =   y[i] ^ y[i-1]    active low, digit is +/-2 (when z = 0)
//   neg  =   y[i+1]           digit is negative (1's complement row)
//   z    = ~(y[i+1] ^ y[i])   with x1_b = 1 the digit is 0
// Purely combinational. The equations are read off the encoding table; the
// gate-level arrangement is this design's own.
module booth_encoder
  import mac_pkg::*;
(
  input  logic [2:0]  trip,  // {y[i+1], y[i], y[i-1]}
  output booth_sel_t  sel
);

  always_comb begin
    sel.x1_b = ~(trip[1] ^ trip[0]);
    sel.x2_b =   trip[1] ^ trip[0];
    sel.neg  =   trip[2];
    sel.z    = ~(trip[2] ^ trip[1]);
  end

endmodule

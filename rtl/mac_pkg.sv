// mac_pkg: types and constants shared by the merged multiply-accumulate unit.
//
// booth_sel_t is the bundle a radix-4 Booth encoder hands to its decoder:
// the active-low "select 1x" and "select 2x" lines, the negate line and the
// zero line, exactly the four encoder outputs of the modified Booth encoding
// table. MAC_N is the operand width of the main configuration (16 x 16 bits).
package mac_pkg;

  // Operand width of the main configuration.
  localparam int unsigned MAC_N = 16;

  // Encoder-to-decoder bundle of one Booth digit.
  typedef struct packed {
    logic x1_b;  // 0: partial product is +/- 1 x multiplicand
    logic x2_b;  // 0 (with z = 0): partial product is +/- 2 x multiplicand
    logic neg;   // digit is negative: decoder emits the 1's complement
    logic z;     // 1 together with x1_b = 1: digit is zero
  } booth_sel_t;

endpackage

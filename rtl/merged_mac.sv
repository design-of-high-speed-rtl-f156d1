// merged_mac: two-stage pipelined merged multiply-accumulate unit.
//
// Computes P = A * B + Z for signed (two's complement) n-bit operands, where
// Z is the running sum of the previous products, kept modulo 2^(2n). The
// accumulation is not done by an adder after the multiplier: the previous
// result is fed back into the multiplier's carry-save tree as one more set
// of rows, and it is fed back in its intermediate form - the low n bits in
// binary (Z), the high n bits as a sum word S and a carry word C, plus one
// pending carry - so the carry-propagating final adder is never in the loop.
//
//   stage 1: radix-4 Booth partial products (booth_pp_gen) and the hybrid
//            CSA tree with the fed-back state (hybrid_csa_tree); the new
//            S, C, Z and carry are registered.
//   stage 2: the final adder (sqrt_csla_cbl, carry select on Common Boolean
//            Logic) adds S + C + carry for the high n bits; the result is
//            registered together with Z as P.
//
// Interface and timing: a and b are taken at a rising clock edge when
// in_valid is high. If acc_clr is high in that same cycle the fed-back state
// is ignored and the accumulation restarts with P = a * b; otherwise the
// product is added to the running sum. With PIPELINED = 1 (the main
// configuration) the matching P appears one edge later, out_valid marks it,
// and a new operand pair can be taken every cycle. With PIPELINED = 0 the
// second-stage register is left out and P follows the stage-1 registers
// through the final adder combinationally (result after one edge). When
// in_valid is low the state holds. rst_n is an asynchronous active-low
// reset that clears the accumulator.
// Two stages split between the tree and the final adder, the fed-back S, C
// and Z, and the 2n-bit result follow the published design; in_valid, acc_clr,
// out_valid, the reset and the separate pending-carry bit are this design's
// own.
module merged_mac
  import mac_pkg::*;
#(
  parameter int unsigned N         = MAC_N, // operand width (even)
  parameter bit          PIPELINED = 1'b1   // register the final adder output
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,  // take a, b this cycle
  input  logic           acc_clr,   // start a new accumulation with a*b
  input  logic [N-1:0]   a,         // multiplicand, two's complement
  input  logic [N-1:0]   b,         // multiplier, two's complement
  output logic           out_valid, // p holds a new result
  output logic [2*N-1:0] p          // accumulated result modulo 2^(2n)
);

  // ---------------------------------------------------------------- stage 1
  logic [2*N-1:0] pp_rows [N/2];
  logic [2*N-1:0] corr;

  booth_pp_gen #(.N(N)) u_ppg (
    .a    (a),
    .b    (b),
    .rows (pp_rows),
    .corr (corr)
  );

  // accumulator state (stage-1 registers)
  logic [N-1:0] s_q, c_q, z_q;
  logic         cy_q;
  logic         v1_q;

  // fed-back state, dropped when a new accumulation starts
  logic [N-1:0] s_fb, c_fb, z_fb;
  logic         cy_fb;

  assign s_fb  = acc_clr ? '0   : s_q;
  assign c_fb  = acc_clr ? '0   : c_q;
  assign z_fb  = acc_clr ? '0   : z_q;
  assign cy_fb = acc_clr ? 1'b0 : cy_q;

  logic [N-1:0] s_d, c_d, z_d;
  logic         cy_d;

  hybrid_csa_tree #(.N(N)) u_tree (
    .pp_rows (pp_rows),
    .corr    (corr),
    .s_fb    (s_fb),
    .c_fb    (c_fb),
    .z_fb    (z_fb),
    .cy_fb   (cy_fb),
    .s       (s_d),
    .c       (c_d),
    .z       (z_d),
    .cy      (cy_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q  <= '0;
      c_q  <= '0;
      z_q  <= '0;
      cy_q <= 1'b0;
      v1_q <= 1'b0;
    end else begin
      v1_q <= in_valid;
      if (in_valid) begin
        s_q  <= s_d;
        c_q  <= c_d;
        z_q  <= z_d;
        cy_q <= cy_d;
      end
    end
  end

  // ---------------------------------------------------------------- stage 2
  logic [N-1:0] hi;
  logic         hi_cout;   // carry out of bit 2n-1: dropped (modulo 2^(2n))

  sqrt_csla_cbl #(.W(N)) u_fadd (
    .a    (s_q),
    .b    (c_q),
    .cin  (cy_q),
    .sum  (hi),
    .cout (hi_cout)
  );

  if (PIPELINED) begin : g_pipe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        p         <= '0;
        out_valid <= 1'b0;
      end else begin
        out_valid <= v1_q;
        if (v1_q) p <= {hi, z_q};
      end
    end
  end else begin : g_comb
    assign p         = {hi, z_q};
    assign out_valid = v1_q;
  end

endmodule

// rsc_block_encoder: the 3GPP RSC constituent encoder unrolled over a whole
// block of K bits, giving all parity and tail bits in one clock.
//
// This is the "parallel computation" form of the constituent encoder: the
// trellis recursion of rsc_encoder (feedback 1 + D^2 + D^3, feed-forward
// 1 + D + D^3, zero start state) is written as a K-step combinational chain,
// followed by the three termination steps.  Purely combinational; the caller
// registers the result.  The logic depth grows linearly with K, which is the
// price of the one-clock encode the design asks for.  The design only states
// that the parallel method computes the block in one clock; the unrolled chain
// is this implementation's way of doing so.
//   x        : information bits, x[0] first
//   parity   : parity bit of each information bit
//   tail_sys : systematic tail bits (first tail step in bit 0)
//   tail_par : parity tail bits
module rsc_block_encoder #(
  parameter int unsigned K = 1148
) (
  input  logic [K-1:0] x,
  output logic [K-1:0] parity,
  output logic [2:0]   tail_sys,
  output logic [2:0]   tail_par
);

  always_comb begin
    logic d1, d2, d3, a, u;
    d1 = 1'b0;
    d2 = 1'b0;
    d3 = 1'b0;
    for (int unsigned k = 0; k < K; k++) begin
      a         = x[k] ^ d2 ^ d3;
      parity[k] = a ^ d1 ^ d3;
      d3 = d2;
      d2 = d1;
      d1 = a;
    end
    for (int t = 0; t < 3; t++) begin
      u           = d2 ^ d3;       // feedback drives the register to zero
      tail_sys[t] = u;
      tail_par[t] = d1 ^ d3;       // a = 0 in termination
      d3 = d2;
      d2 = d1;
      d1 = 1'b0;
    end
  end

endmodule

// rsc_encoder: 8-state recursive systematic convolutional (RSC) encoder, one
// bit per clock, as used twice in the 3GPP turbo code.
//
// Transfer function G(D) = [1, g1(D)/g0(D)] with feedback g0 = 1 + D^2 + D^3
// and feed-forward g1 = 1 + D + D^3.  With the three delay cells d1 (newest),
// d2, d3:
//   a      = u ^ d2 ^ d3          (feedback sum entering d1)
//   parity = a ^ d1 ^ d3
// In termination (term = 1) the input is taken from the feedback, u = d2 ^ d3,
// so a = 0 and three steps return the register to zero; the systematic output
// is then that u (a tail bit) and the parity output a parity tail bit.
//
// Interface: sys_out/par_out are combinational from the current state and
// din/term; the state advances on a clock edge with en = 1.  clear (synchronous)
// or rst returns the state to zero, the start state the design requires.  The
// polynomials and termination are the 3GPP ones shown in the encoder diagram;
// the clear/en/term control is this implementation's.
module rsc_encoder (
  input  logic       clk,
  input  logic       rst,      // synchronous, active high
  input  logic       clear,    // synchronous: state <= 0
  input  logic       en,       // advance one trellis step
  input  logic       term,     // termination step (input from feedback)
  input  logic       din,      // information bit
  output logic       sys_out,  // systematic bit of this step
  output logic       par_out,  // parity bit of this step
  output logic [2:0] state     // {d3, d2, d1}
);

  logic fb_in;   // input bit actually applied
  logic a;       // feedback sum

  always_comb begin
    fb_in   = term ? (state[1] ^ state[2]) : din;
    a       = fb_in ^ state[1] ^ state[2];
    sys_out = fb_in;
    par_out = a ^ state[0] ^ state[2];
  end

  always_ff @(posedge clk) begin
    if (rst || clear)
      state <= 3'b000;
    else if (en)
      state <= {state[1], state[0], a};
  end

endmodule

// te_output_buffer: the coded-block register of the turbo encoder.
//
// N = 3*K + 12 bits laid out as systematic | tail1 | tail2 | parity1 | ptail1 |
// parity2 | ptail2 (offsets in tenc_pkg), which is the output order of the
// design.  It is filled in one of two ways and then shifted out:
//   - bit writes: two independent write ports (a, b) for the serial encoder,
//     which produces one or two coded bits per clock;
//   - load: the whole block at once, for the parallel encoder.
// shift moves the register one place towards bit 0; dout = bit 0, so the
// coded bits leave in buffer order, one per clock, straight from a flip-flop.
// Priority: load, then shift, then the bit writes.  No reset: every bit is
// written before it is shifted out.  The field order is the design's; the
// port structure is this implementation's.
module te_output_buffer #(
  parameter int unsigned N  = 3456,
  parameter int unsigned NW = $clog2(N)
) (
  input  logic          clk,
  input  logic          we_a,
  input  logic [NW-1:0] addr_a,
  input  logic          d_a,
  input  logic          we_b,
  input  logic [NW-1:0] addr_b,
  input  logic          d_b,
  input  logic          load,
  input  logic [N-1:0]  load_data,
  input  logic          shift,
  output logic          dout
);

  logic [N-1:0] buffer;

  always_ff @(posedge clk) begin
    if (load) begin
      buffer <= load_data;
    end else if (shift) begin
      buffer <= {1'b0, buffer[N-1:1]};
    end else begin
      if (we_a) buffer[addr_a] <= d_a;
      if (we_b) buffer[addr_b] <= d_b;
    end
  end

  assign dout = buffer[0];

endmodule

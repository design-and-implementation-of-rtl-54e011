// msd_input_reg: serial-in input register for the MSD+CRC block.
//
// The block arrives one bit per clock.  Each clock with shift = 1 moves the
// register one place towards bit 0 and puts din at the top, so after K shifts
// the first bit received is in data[0] and the last in data[K-1].  The
// register holds its contents until the next block is read, which lets the
// serial encoder address it bit by bit and the parallel encoder take it as one
// word.  No reset: every bit is written before it is used.  Reading the block
// into a register first follows the design; the shift structure is this
// implementation's choice.
module msd_input_reg #(
  parameter int unsigned K = 1148
) (
  input  logic         clk,
  input  logic         shift,
  input  logic         din,
  output logic [K-1:0] data
);

  always_ff @(posedge clk) begin
    if (shift)
      data <= {din, data[K-1:1]};
  end

endmodule

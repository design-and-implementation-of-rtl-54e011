// tenc_pkg: constants, types and layout helpers shared by the turbo encoder blocks.
//
// The encoder is the rate-1/3 turbo code of the 3GPP standards applied to the
// 1148-bit MSD+CRC block of an in-vehicle eCall modem (IVS).  A block of K bits
// gives 3*K + 12 coded bits: the K systematic bits, the K parity bits of each
// of the two constituent encoders and 3 + 3 tail bits from each encoder.
//
// The coded block is held in one buffer in this order (bit 0 leaves first):
//   systematic[K] | tail1[3] | tail2[3] | parity1[K] | ptail1[3] | parity2[K] | ptail2[3]
// tail1/tail2 are the systematic tail bits of encoder 1/2, ptail1/ptail2 their
// parity tail bits.  The block length, the output length and this order are the
// published design's; the enum encodings are this implementation's choice.
package tenc_pkg;

  // Block length of the MSD+CRC input and number of tail steps per encoder.
  localparam int unsigned MSD_BITS  = 1148;
  localparam int unsigned TAIL_BITS = 3;

  // Encoding method, selected per block by the `mode` input.
  typedef enum logic {
    MODE_SERIAL   = 1'b0,   // one bit per clock, phases of Eq. (1)
    MODE_PARALLEL = 1'b1    // whole block in one clock, Eq. (2)
  } mode_e;

  // Controller phases.  The serial method runs READ, BUILD, PAR1, TAIL1, PAR2,
  // TAIL2, WRITE; the parallel method runs READ, ENCODE, WRITE.
  typedef enum logic [3:0] {
    PH_IDLE   = 4'd0,
    PH_READ   = 4'd1,   // shift the K input bits in
    PH_BUILD  = 4'd2,   // copy the systematic bits into the output buffer
    PH_PAR1   = 4'd3,   // constituent encoder 1, natural order
    PH_TAIL1  = 4'd4,   // terminate encoder 1
    PH_PAR2   = 4'd5,   // constituent encoder 2, interleaved order
    PH_TAIL2  = 4'd6,   // terminate encoder 2
    PH_ENCODE = 4'd7,   // one-clock block encode (parallel method)
    PH_WRITE  = 4'd8    // shift the coded block out
  } phase_e;

  // Coded length for block length k.
  function automatic int unsigned coded_len(int unsigned k);
    return 3 * k + 4 * TAIL_BITS;
  endfunction

  // Offsets of the seven fields in the output buffer.
  function automatic int unsigned off_tail1(int unsigned k);  return k;                      endfunction
  function automatic int unsigned off_tail2(int unsigned k);  return k + TAIL_BITS;          endfunction
  function automatic int unsigned off_par1(int unsigned k);   return k + 2 * TAIL_BITS;      endfunction
  function automatic int unsigned off_ptail1(int unsigned k); return 2 * k + 2 * TAIL_BITS;  endfunction
  function automatic int unsigned off_par2(int unsigned k);   return 2 * k + 3 * TAIL_BITS;  endfunction
  function automatic int unsigned off_ptail2(int unsigned k); return 3 * k + 3 * TAIL_BITS;  endfunction

endpackage

// turbo_encoder: rate-1/3 3GPP turbo encoder for the 1148-bit MSD+CRC block of
// an in-vehicle eCall modem, with a serial and a parallel encoding method.
//
// Structure: the block is read bit-serially into msd_input_reg.  Two 8-state
// RSC constituent encoders (feedback 1+D^2+D^3, feed-forward 1+D+D^3, zero
// start state) make the parity of the block in natural order and in the order
// of the 3GPP interleaver; each is then terminated in three steps.  The coded
// block of 3*K + 12 = 3456 bits is collected in te_output_buffer in the order
//   systematic | tail1 | tail2 | parity1 | ptail1 | parity2 | ptail2
// and shifted out on out_TE_data, one bit per clock, with out_valid high.
//
// mode (sampled with ack) selects the method for the block:
//   0, serial:   one bit per clock, phases READ K, BUILD K, PAR1 K, TAIL1 3,
//                PAR2 K, TAIL2 3, WRITE 3456 = 8054 clocks for K = 1148.
//                Uses rsc_encoder and the interleaver's address lookup.
//   1, parallel: READ K, one ENCODE clock that computes the whole coded block
//                (rsc_block_encoder on the block and on its interleaved copy),
//                WRITE 3456: 1 + 3456 = 3457 clocks after the input.
// te_controller sequences the phases with a cycle counter compared by a
// magnitude comparator.
//
// Interface timing: with busy low, a clock with ack = 1 starts a block; the K
// bits of in_MSD_CRC are sampled on the next K clocks, first bit first.  The
// first coded bit is on out_TE_data 2 clocks after the last input bit in the
// parallel mode and 3K + 7 clocks after it in the serial mode.  busy stays high
// until the last coded bit has been sent.
// The port names clk, rst, ack, mode, in_MSD_CRC and out_TE_data, the code,
// the output order and the phase lengths are the design's.  The meaning of ack
// as a start strobe, the out_valid and busy outputs, the synchronous
// active-high reset and the 3GPP TS 25.212 interleaver are this
// implementation's choices.
module turbo_encoder
  import tenc_pkg::*;
#(
  parameter int unsigned K     = MSD_BITS,   // MSD+CRC block length
  parameter int unsigned CNT_W = 32          // width of the phase counter
) (
  input  logic clk,
  input  logic rst,
  input  logic ack,
  input  logic mode,
  input  logic in_MSD_CRC,
  output logic out_TE_data,
  output logic out_valid,
  output logic busy
);

  localparam int unsigned N  = coded_len(K);
  localparam int unsigned AW = $clog2(K);
  localparam int unsigned NW = $clog2(N);

  phase_e           phase;
  mode_e            blk_mode;
  logic [CNT_W-1:0] cnt;
  logic [AW-1:0]    idx;       // bit index within the block
  logic [NW-1:0]    tidx;      // tail step index widened for buffer addresses

  logic [K-1:0]     msd;       // the block, msd[0] first
  logic [K-1:0]     msd_il;    // the block in interleaved order
  logic [AW-1:0]    il_addr;   // pi(idx)

  // serial constituent encoders
  logic enc1_en, enc1_term, enc1_sys, enc1_par;
  logic enc2_en, enc2_term, enc2_sys, enc2_par;
  logic [2:0] enc1_state, enc2_state;

  // parallel constituent encoders
  logic [K-1:0] blk_par1, blk_par2;
  logic [2:0]   blk_tsys1, blk_tpar1, blk_tsys2, blk_tpar2;

  // output buffer ports
  logic          we_a, we_b, d_a, d_b, load, shift;
  logic [NW-1:0] addr_a, addr_b;
  logic [N-1:0]  coded_blk;

  te_controller #(.K(K), .CNT_W(CNT_W)) u_ctrl (
    .clk     (clk),
    .rst     (rst),
    .ack     (ack),
    .mode_in (mode),
    .phase   (phase),
    .cnt     (cnt),
    .mode    (blk_mode),
    .busy    (busy)
  );

  assign idx  = cnt[AW-1:0];
  assign tidx = NW'(cnt[1:0]);

  msd_input_reg #(.K(K)) u_in (
    .clk   (clk),
    .shift (phase == PH_READ),
    .din   (in_MSD_CRC),
    .data  (msd)
  );

  turbo_interleaver #(.K(K), .AW(AW)) u_il (
    .rd_idx  (idx),
    .rd_addr (il_addr),
    .blk_in  (msd),
    .blk_out (msd_il)
  );

  // ---- serial method --------------------------------------------------------
  assign enc1_en   = (phase == PH_PAR1) || (phase == PH_TAIL1);
  assign enc1_term = (phase == PH_TAIL1);
  assign enc2_en   = (phase == PH_PAR2) || (phase == PH_TAIL2);
  assign enc2_term = (phase == PH_TAIL2);

  rsc_encoder u_enc1 (
    .clk     (clk),
    .rst     (rst),
    .clear   (phase == PH_READ),
    .en      (enc1_en),
    .term    (enc1_term),
    .din     (msd[idx]),
    .sys_out (enc1_sys),
    .par_out (enc1_par),
    .state   (enc1_state)
  );

  rsc_encoder u_enc2 (
    .clk     (clk),
    .rst     (rst),
    .clear   (phase == PH_READ),
    .en      (enc2_en),
    .term    (enc2_term),
    .din     (msd[il_addr]),
    .sys_out (enc2_sys),
    .par_out (enc2_par),
    .state   (enc2_state)
  );

  // buffer writes of the serial phases
  always_comb begin
    we_a   = 1'b0;
    we_b   = 1'b0;
    addr_a = '0;
    addr_b = '0;
    d_a    = 1'b0;
    d_b    = 1'b0;
    unique case (phase)
      PH_BUILD: begin
        we_a = 1'b1;  addr_a = NW'(idx);                     d_a = msd[idx];
      end
      PH_PAR1: begin
        we_a = 1'b1;  addr_a = NW'(off_par1(K)) + NW'(idx);  d_a = enc1_par;
      end
      PH_TAIL1: begin
        we_a = 1'b1;  addr_a = NW'(off_tail1(K)) + tidx;     d_a = enc1_sys;
        we_b = 1'b1;  addr_b = NW'(off_ptail1(K)) + tidx;    d_b = enc1_par;
      end
      PH_PAR2: begin
        we_a = 1'b1;  addr_a = NW'(off_par2(K)) + NW'(idx);  d_a = enc2_par;
      end
      PH_TAIL2: begin
        we_a = 1'b1;  addr_a = NW'(off_tail2(K)) + tidx;     d_a = enc2_sys;
        we_b = 1'b1;  addr_b = NW'(off_ptail2(K)) + tidx;    d_b = enc2_par;
      end
      default: ;
    endcase
  end

  // ---- parallel method ------------------------------------------------------
  rsc_block_encoder #(.K(K)) u_blk1 (
    .x        (msd),
    .parity   (blk_par1),
    .tail_sys (blk_tsys1),
    .tail_par (blk_tpar1)
  );

  rsc_block_encoder #(.K(K)) u_blk2 (
    .x        (msd_il),
    .parity   (blk_par2),
    .tail_sys (blk_tsys2),
    .tail_par (blk_tpar2)
  );

  assign coded_blk = {blk_tpar2, blk_par2, blk_tpar1, blk_par1, blk_tsys2, blk_tsys1, msd};
  assign load      = (phase == PH_ENCODE);

  // ---- output ---------------------------------------------------------------
  assign shift = (phase == PH_WRITE);

  te_output_buffer #(.N(N), .NW(NW)) u_obuf (
    .clk       (clk),
    .we_a      (we_a),
    .addr_a    (addr_a),
    .d_a       (d_a),
    .we_b      (we_b),
    .addr_b    (addr_b),
    .d_b       (d_b),
    .load      (load),
    .load_data (coded_blk),
    .shift     (shift),
    .dout      (out_TE_data)
  );

  assign out_valid = (phase == PH_WRITE);

  // the serial encoders are back in the zero state after their tails
  a_enc1_terminated: assert property (@(posedge clk) disable iff (rst)
                                      (phase == PH_PAR2 && cnt == '0) |-> enc1_state == 3'b000);
  a_enc2_terminated: assert property (@(posedge clk) disable iff (rst)
                                      (phase == PH_WRITE && cnt == '0 && blk_mode == MODE_SERIAL)
                                      |-> enc2_state == 3'b000);

endmodule

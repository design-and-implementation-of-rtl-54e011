// te_controller: phase sequencer of the turbo encoder.
//
// A block starts on a clock with ack = 1 while the encoder is idle; the mode
// input is sampled on that clock.  The K input bits follow on the next K
// clocks.  Then, per mode:
//   serial   (mode 0): BUILD K, PAR1 K, TAIL1 3, PAR2 K, TAIL2 3, WRITE 3K+12
//   parallel (mode 1): ENCODE 1, WRITE 3K+12
// so READ..WRITE lasts 7K+18 clocks (8054 for K = 1148, Eq. (1)) in the serial
// mode and K + 1 + 3K+12 clocks in the parallel mode, of which 1 + 3456 = 3457
// after the input (Eq. (2)).  cnt counts the clocks of the current phase from
// 0; one magnitude comparator compares it with the last count of the phase:
// while cnt < last the phase goes on, otherwise the next phase starts with
// cnt = 0.  ack is ignored while busy.
// The phase lengths and the two modes are the design's; starting on ack, the
// phase encoding and the synchronous active-high reset are this
// implementation's choices.
module te_controller
  import tenc_pkg::*;
#(
  parameter int unsigned K     = MSD_BITS,
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst,      // synchronous, active high
  input  logic             ack,      // start of a block
  input  logic             mode_in,  // 0 serial, 1 parallel
  output phase_e           phase,
  output logic [CNT_W-1:0] cnt,
  output mode_e            mode,
  output logic             busy
);

  localparam int unsigned N = coded_len(K);

  logic [CNT_W-1:0] last;
  logic             cnt_lt, cnt_eq, cnt_gt;
  phase_e           next_phase;

  // last count of each phase
  always_comb begin
    unique case (phase)
      PH_READ, PH_BUILD, PH_PAR1, PH_PAR2: last = CNT_W'(K - 1);
      PH_TAIL1, PH_TAIL2:                  last = CNT_W'(TAIL_BITS - 1);
      PH_WRITE:                            last = CNT_W'(N - 1);
      default:                             last = '0;   // IDLE, ENCODE
    endcase
  end

  mag_comparator #(.W(CNT_W)) u_cmp (
    .a      (cnt),
    .b      (last),
    .a_lt_b (cnt_lt),
    .a_eq_b (cnt_eq),
    .a_gt_b (cnt_gt)
  );

  // phase that follows the current one
  always_comb begin
    unique case (phase)
      PH_IDLE:   next_phase = PH_READ;
      PH_READ:   next_phase = (mode == MODE_PARALLEL) ? PH_ENCODE : PH_BUILD;
      PH_BUILD:  next_phase = PH_PAR1;
      PH_PAR1:   next_phase = PH_TAIL1;
      PH_TAIL1:  next_phase = PH_PAR2;
      PH_PAR2:   next_phase = PH_TAIL2;
      PH_TAIL2:  next_phase = PH_WRITE;
      PH_ENCODE: next_phase = PH_WRITE;
      default:   next_phase = PH_IDLE;   // WRITE
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= PH_IDLE;
      cnt   <= '0;
      mode  <= MODE_SERIAL;
    end else if (phase == PH_IDLE) begin
      cnt <= '0;
      if (ack) begin
        phase <= PH_READ;
        mode  <= mode_e'(mode_in);
      end
    end else if (cnt_lt) begin
      cnt <= cnt + 1'b1;
    end else begin
      cnt   <= '0;
      phase <= next_phase;
    end
  end

  assign busy = (phase != PH_IDLE);

  // the counter never passes the last count of its phase
  a_cnt_in_range: assert property (@(posedge clk) disable iff (rst) !cnt_gt)
    else $error("te_controller: cnt %0d beyond last count %0d", cnt, last);

  // equality is only reached at the end of a phase, never skipped
  a_end_seen: assert property (@(posedge clk) disable iff (rst)
                               (busy && !cnt_lt) |-> cnt_eq);

endmodule

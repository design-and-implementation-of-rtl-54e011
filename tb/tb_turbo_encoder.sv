// tb_turbo_encoder: end-to-end test of the turbo encoder at its default size
// (K = 1148 MSD+CRC bits, 3456 coded bits).
//
// Runs a sequence of blocks through the encoder, in both modes and with a mode
// switch between consecutive blocks, and compares every coded bit with an
// independent reference model (tenc_ref_pkg).  It also checks the timing:
//   serial:   8054 clocks from the first input bit to the last coded bit
//   parallel: 3457 clocks from the last input bit to the last coded bit,
//             first coded bit 2 clocks after the last input bit
// and that ack is ignored while a block is in progress.  Each mechanism
// (serial block, parallel block, mode switch, ignored ack, non-zero
// termination of each encoder) is counted and must happen at least once.
module tb_turbo_encoder;
  import tenc_pkg::*;
  import tenc_ref_pkg::*;

  localparam int K = int'(MSD_BITS);
  localparam int N = 3 * K + 12;

  logic clk = 0, rst = 1, ack = 0, mode = 0, in_bit = 0;
  logic out_bit, out_valid, busy;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_serial = 0, n_parallel = 0, n_switch = 0, n_ack_ignored = 0;
  int n_tail1_nz = 0, n_tail2_nz = 0;

  turbo_encoder dut (
    .clk (clk), .rst (rst), .ack (ack), .mode (mode), .in_MSD_CRC (in_bit),
    .out_TE_data (out_bit), .out_valid (out_valid), .busy (busy)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // one block: start, feed K bits, collect N bits, check
  task automatic run_block(bit m, bit_q x, bit poke_ack);
    bit_q exp_y, got;
    int t_first_in = 0, t_last_in = 0, t_first_out = -1, t_last_out = -1;
    exp_y = ref_turbo(x);

    @(negedge clk);
    check(!busy, "busy before start");
    ack  = 1;
    mode = m;
    @(negedge clk);
    ack  = 0;
    mode = ~m;                      // mode is only sampled with ack
    for (int k = 0; k < K; k++) begin
      in_bit = x[k];
      if (k == 0) t_first_in = cyc;
      if (k == K - 1) t_last_in = cyc;
      if (poke_ack && k == 10) begin
        ack = 1;                    // must be ignored: block in progress
        n_ack_ignored++;
      end else begin
        ack = 0;
      end
      @(negedge clk);
    end
    ack = 0;
    while (busy) begin
      if (out_valid) begin
        if (t_first_out < 0) t_first_out = cyc;
        t_last_out = cyc;
        got.push_back(out_bit);
      end
      @(negedge clk);
    end

    check(got.size() == N, $sformatf("coded length %0d", got.size()));
    for (int i = 0; i < N && i < got.size(); i++)
      check(got[i] == exp_y[i], $sformatf("mode %0d coded bit %0d: got %0d expected %0d",
                                          m, i, got[i], exp_y[i]));
    if (m == 1'b0) begin
      check(t_last_out - t_first_in + 1 == 7 * K + 18,
            $sformatf("serial time %0d clocks", t_last_out - t_first_in + 1));
      check(t_first_out - t_last_in == 3 * K + 7,
            $sformatf("serial latency %0d clocks", t_first_out - t_last_in));
      n_serial++;
    end else begin
      check(t_last_out - t_last_in == 1 + N,
            $sformatf("parallel time after input %0d clocks", t_last_out - t_last_in));
      check(t_first_out - t_last_in == 2,
            $sformatf("parallel latency %0d clocks", t_first_out - t_last_in));
      n_parallel++;
    end
    // termination of each encoder starts from a non-zero state?
    if ((exp_y[K] | exp_y[K+1] | exp_y[K+2] | exp_y[2*K+6] | exp_y[2*K+7] | exp_y[2*K+8]) != 0)
      n_tail1_nz++;
    if ((exp_y[K+3] | exp_y[K+4] | exp_y[K+5] | exp_y[3*K+9] | exp_y[3*K+10] | exp_y[3*K+11]) != 0)
      n_tail2_nz++;
  endtask

  function automatic bit_q rand_block();
    bit_q x;
    for (int k = 0; k < K; k++) x.push_back(1'($urandom));
    return x;
  endfunction

  initial begin
    bit_q x;
    bit   last_mode;
    bit   modes[5] = '{1'b0, 1'b1, 1'b1, 1'b0, 1'b1};
    repeat (3) @(negedge clk);
    rst = 0;
    for (int b = 0; b < 5; b++) begin
      if (b == 2) begin
        x = {};
        for (int k = 0; k < K; k++) x.push_back(1'b0);     // all-zero block
      end else begin
        x = rand_block();
      end
      if (b > 0 && modes[b] != last_mode) n_switch++;
      run_block(modes[b], x, b == 1 || b == 3);
      last_mode = modes[b];
    end
    check(n_serial > 0,      "no serial block");
    check(n_parallel > 0,    "no parallel block");
    check(n_switch > 0,      "no mode switch");
    check(n_ack_ignored > 0, "no ack during a block");
    check(n_tail1_nz > 0,    "encoder 1 never terminated from a non-zero state");
    check(n_tail2_nz > 0,    "encoder 2 never terminated from a non-zero state");
    $display("serial=%0d parallel=%0d switches=%0d ignored_acks=%0d tail1_nz=%0d tail2_nz=%0d",
             n_serial, n_parallel, n_switch, n_ack_ignored, n_tail1_nz, n_tail2_nz);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

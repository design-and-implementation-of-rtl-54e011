// tb_te_controller: checks the phase sequence and phase lengths of the
// controller at the default block length (1148): serial blocks must run
// READ 1148, BUILD 1148, PAR1 1148, TAIL1 3, PAR2 1148, TAIL2 3, WRITE 3456
// (8054 clocks, Eq. (1)); parallel blocks READ 1148, ENCODE 1, WRITE 3456.
// Within a phase cnt must count 0, 1, 2, ...  Also checks that ack while busy
// is ignored, that mode is taken only with ack, and reset.
module tb_te_controller;
  import tenc_pkg::*;

  localparam int K = 1148;
  logic clk = 0, rst = 1, ack = 0, mode_in = 0;
  phase_e      phase;
  logic [31:0] cnt;
  mode_e       mode;
  logic        busy;
  int checks = 0, failures = 0;

  te_controller dut (.clk (clk), .rst (rst), .ack (ack), .mode_in (mode_in),
                     .phase (phase), .cnt (cnt), .mode (mode), .busy (busy));

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // follow one block and compare its phase trace with the expected one
  task automatic run(bit m);
    phase_e exp_ph[$];
    int     exp_len[$];
    int     total = 0;
    if (m) begin
      exp_ph  = '{PH_READ, PH_ENCODE, PH_WRITE};
      exp_len = '{K, 1, 3 * K + 12};
    end else begin
      exp_ph  = '{PH_READ, PH_BUILD, PH_PAR1, PH_TAIL1, PH_PAR2, PH_TAIL2, PH_WRITE};
      exp_len = '{K, K, K, 3, K, 3, 3 * K + 12};
    end
    @(negedge clk);
    ack = 1; mode_in = m;
    @(negedge clk);
    ack = 0; mode_in = ~m;
    check(mode == mode_e'(m), "mode sampled with ack");
    foreach (exp_ph[p]) begin
      for (int c = 0; c < exp_len[p]; c++) begin
        check(phase == exp_ph[p] && cnt == 32'(c) && busy,
              $sformatf("mode %0d: expected %s cnt %0d, got %s cnt %0d",
                        m, exp_ph[p].name(), c, phase.name(), cnt));
        if (p == 1 && c == 0) ack = 1;        // ignored while busy
        else ack = 0;
        total++;
        @(negedge clk);
      end
    end
    ack = 0;
    check(phase == PH_IDLE && !busy, "idle after block");
    check(total == (m ? K + 1 + 3 * K + 12 : 7 * K + 18), $sformatf("total %0d", total));
    if (!m) check(total == 8054, "serial total of Eq. (1)");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    check(phase == PH_IDLE && !busy, "idle after reset");
    run(1'b0);
    run(1'b1);
    run(1'b0);
    // reset in the middle of a block
    @(negedge clk);
    ack = 1; mode_in = 1'b0;
    @(negedge clk);
    ack = 0;
    repeat (50) @(negedge clk);
    rst = 1;
    @(negedge clk);
    rst = 0;
    check(phase == PH_IDLE && cnt == 0 && !busy, "reset mid-block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

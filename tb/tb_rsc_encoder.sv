// tb_rsc_encoder: checks the bit-serial RSC constituent encoder against the
// reference model: random blocks of several lengths are encoded one bit per
// clock, then terminated in three steps; parity, tail and final zero state
// are compared.  Also checks that en = 0 holds the state and clear resets it.
module tb_rsc_encoder;
  import tenc_ref_pkg::*;

  logic clk = 0, rst = 1, clear = 0, en = 0, term = 0, din = 0;
  logic sys_out, par_out;
  logic [2:0] state;
  int checks = 0, failures = 0;

  rsc_encoder dut (.clk (clk), .rst (rst), .clear (clear), .en (en), .term (term),
                   .din (din), .sys_out (sys_out), .par_out (par_out), .state (state));

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
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

  initial begin
    int lens[4] = '{1, 5, 40, 1148};
    bit_q x, par, tsys, tpar;
    logic [2:0] held;
    @(negedge clk);
    rst = 0;
    foreach (lens[l]) begin
      x = {};
      for (int k = 0; k < lens[l]; k++) x.push_back(1'($urandom));
      ref_rsc(x, par, tsys, tpar);
      clear = 1;
      @(negedge clk);
      clear = 0;
      check(state == 3'b000, "clear");
      for (int k = 0; k < lens[l]; k++) begin
        en = 1; term = 0; din = x[k];
        #1;
        check(sys_out == x[k], $sformatf("len %0d sys %0d", lens[l], k));
        check(par_out == par[k], $sformatf("len %0d parity %0d", lens[l], k));
        @(negedge clk);
        if (k == 0) begin           // a stall: en low keeps the state
          en = 0;
          held = state;
          din = 1'($urandom);
          @(negedge clk);
          check(state == held, "hold with en = 0");
        end
      end
      for (int t = 0; t < 3; t++) begin
        en = 1; term = 1; din = 1'($urandom);   // din ignored in termination
        #1;
        check(sys_out == tsys[t], $sformatf("len %0d tail sys %0d", lens[l], t));
        check(par_out == tpar[t], $sformatf("len %0d tail par %0d", lens[l], t));
        @(negedge clk);
      end
      en = 0; term = 0;
      check(state == 3'b000, $sformatf("len %0d terminated state %0d", lens[l], state));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

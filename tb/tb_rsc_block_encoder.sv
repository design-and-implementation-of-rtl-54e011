// tb_rsc_block_encoder: checks the one-clock block constituent encoder at its
// default block length (1148) and at 40 against the reference model, with
// random, all-zero and all-one blocks.
module tb_rsc_block_encoder;
  import tenc_ref_pkg::*;

  localparam int KA = 1148;
  localparam int KB = 40;

  logic [KA-1:0] xa, pa;
  logic [2:0]    tsa, tpa;
  logic [KB-1:0] xb, pb;
  logic [2:0]    tsb, tpb;
  int checks = 0, failures = 0;

  rsc_block_encoder dut_a (.x (xa), .parity (pa), .tail_sys (tsa), .tail_par (tpa));
  rsc_block_encoder #(.K(KB)) dut_b (.x (xb), .parity (pb), .tail_sys (tsb), .tail_par (tpb));

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

  initial begin
    bit_q x, par, tsys, tpar;
    for (int t = 0; t < 6; t++) begin
      x = {};
      for (int k = 0; k < KA; k++) x.push_back(t == 0 ? 1'b0 : t == 1 ? 1'b1 : 1'($urandom));
      for (int k = 0; k < KA; k++) xa[k] = x[k];
      for (int k = 0; k < KB; k++) xb[k] = x[k];
      #1;
      ref_rsc(x, par, tsys, tpar);
      for (int k = 0; k < KA; k++) check(pa[k] == par[k], $sformatf("K=%0d parity %0d", KA, k));
      for (int i = 0; i < 3; i++) begin
        check(tsa[i] == tsys[i], $sformatf("K=%0d tail sys %0d", KA, i));
        check(tpa[i] == tpar[i], $sformatf("K=%0d tail par %0d", KA, i));
      end
      x = x[0:KB-1];
      ref_rsc(x, par, tsys, tpar);
      for (int k = 0; k < KB; k++) check(pb[k] == par[k], $sformatf("K=%0d parity %0d", KB, k));
      for (int i = 0; i < 3; i++) begin
        check(tsb[i] == tsys[i], $sformatf("K=%0d tail sys %0d", KB, i));
        check(tpb[i] == tpar[i], $sformatf("K=%0d tail par %0d", KB, i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

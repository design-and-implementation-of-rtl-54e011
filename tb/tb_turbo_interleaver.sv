// tb_turbo_interleaver: checks the 3GPP interleaver ROM against an independent
// reference for block lengths that exercise every branch of the construction:
//   40   R = 5,  C = p+1 with the last-row exchange (K = R*C)
//   190  R = 10
//   512  p = 53 forced, C = p
//   1148 R = 20, C = p-1 (the MSD+CRC block)
//   2300 row pattern B
//   5114 largest block
// For each it compares the lookup port over all indices and the block
// permutation port with random data.
module tb_turbo_interleaver;
  import tenc_ref_pkg::*;

  int checks = 0, failures = 0;

  initial begin
    #10_000_000;
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

  // one DUT per block length, checked from a generate block
  for (genvar g = 0; g < 6; g++) begin : g_k
    localparam int unsigned KS[6] = '{40, 190, 512, 1148, 2300, 5114};
    localparam int unsigned K  = KS[g];
    localparam int unsigned AW = $clog2(K);
    logic [AW-1:0] idx, addr;
    logic [K-1:0]  din, dout;

    turbo_interleaver #(.K(K)) dut (
      .rd_idx (idx), .rd_addr (addr), .blk_in (din), .blk_out (dout)
    );

    task automatic run();
      int_q pi = ref_interleaver(int'(K));
      bit   seen[];
      check(pi.size() == int'(K), $sformatf("K=%0d reference size %0d", K, pi.size()));
      seen = new[K];
      for (int k = 0; k < int'(K); k++) begin
        idx = AW'(k);
        #1;
        check(int'(addr) == pi[k], $sformatf("K=%0d pi(%0d) = %0d, expected %0d", K, k, addr, pi[k]));
        if (addr < K) seen[addr] = 1;
      end
      for (int k = 0; k < int'(K); k++)
        check(seen[k], $sformatf("K=%0d position %0d never addressed", K, k));
      for (int t = 0; t < 3; t++) begin
        for (int k = 0; k < int'(K); k++) din[k] = 1'($urandom);
        #1;
        for (int k = 0; k < int'(K); k++)
          check(dout[k] == din[pi[k]], $sformatf("K=%0d block bit %0d", K, k));
      end
    endtask
  end

  initial begin
    #1;
    g_k[0].run();
    g_k[1].run();
    g_k[2].run();
    g_k[3].run();
    g_k[4].run();
    g_k[5].run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_msd_input_reg: shifts random blocks into the input register (default
// 1148 bits) and checks that the first bit received ends in data[0], that the
// register holds while shift is low, and that a second block replaces the first.
module tb_msd_input_reg;

  localparam int K = 1148;
  logic clk = 0, shift = 0, din = 0;
  logic [K-1:0] data;
  int checks = 0, failures = 0;

  msd_input_reg dut (.clk (clk), .shift (shift), .din (din), .data (data));

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit blk[K];
    for (int b = 0; b < 3; b++) begin
      foreach (blk[k]) blk[k] = 1'($urandom);
      for (int k = 0; k < K; k++) begin
        @(negedge clk);
        shift = 1;
        din   = blk[k];
        if (k == 100) begin          // a gap in the input
          shift = 0;
          din   = ~blk[k];
          @(negedge clk);
          shift = 1;
          din   = blk[k];
        end
      end
      @(negedge clk);
      shift = 0;
      din   = 1'($urandom);
      repeat (3) @(negedge clk);    // held
      for (int k = 0; k < K; k++) begin
        checks++;
        if (data[k] != blk[k]) begin
          failures++;
          if (failures < 20) $display("FAIL: block %0d bit %0d", b, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_te_output_buffer: checks the coded-block buffer at its default size
// (3456 bits): a block written through the two bit-write ports in random
// order, and a block loaded in one clock, must each leave on dout in buffer
// order, one bit per clock while shift is high, holding while it is low.
module tb_te_output_buffer;

  localparam int N  = 3456;
  localparam int NW = $clog2(N);

  logic clk = 0;
  logic we_a = 0, we_b = 0, d_a = 0, d_b = 0, load = 0, shift = 0;
  logic [NW-1:0] addr_a = '0, addr_b = '0;
  logic [N-1:0]  load_data = '0;
  logic dout;
  int checks = 0, failures = 0;

  te_output_buffer dut (.clk (clk), .we_a (we_a), .addr_a (addr_a), .d_a (d_a),
                        .we_b (we_b), .addr_b (addr_b), .d_b (d_b), .load (load),
                        .load_data (load_data), .shift (shift), .dout (dout));

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drain(bit exp_bits[N]);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (dout != exp_bits[i]) begin
        failures++;
        if (failures < 20) $display("FAIL: bit %0d got %0d", i, dout);
      end
      shift = 1;
      if (i == 7) begin             // pause: dout must hold
        shift = 0;
        @(negedge clk);
        checks++;
        if (dout != exp_bits[i]) failures++;
        shift = 1;
      end
      @(negedge clk);
    end
    shift = 0;
  endtask

  initial begin
    bit blk[N];
    int order[N];
    @(negedge clk);
    // bit writes, two per clock, positions in a scrambled order
    foreach (blk[i]) blk[i] = 1'($urandom);
    foreach (order[i]) order[i] = i;
    order.shuffle();
    for (int i = 0; i < N; i += 2) begin
      we_a = 1; addr_a = NW'(order[i]);     d_a = blk[order[i]];
      we_b = 1; addr_b = NW'(order[i + 1]); d_b = blk[order[i + 1]];
      @(negedge clk);
    end
    we_a = 0; we_b = 0;
    drain(blk);
    // one-clock load
    foreach (blk[i]) begin
      blk[i] = 1'($urandom);
      load_data[i] = blk[i];
    end
    load = 1;
    @(negedge clk);
    load = 0;
    drain(blk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

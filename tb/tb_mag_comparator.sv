// tb_mag_comparator: checks the magnitude comparator at its default width
// (32 bits) and at 5 bits, exhaustively for 5 bits and with random and
// edge-case operands for 32 bits.  Exactly one of lt/eq/gt must be high and it
// must match the arithmetic relation.
module tb_mag_comparator;

  int checks = 0, failures = 0;

  logic [31:0] a32, b32;
  logic        lt32, eq32, gt32;
  logic [4:0]  a5, b5;
  logic        lt5, eq5, gt5;

  mag_comparator dut32 (.a (a32), .b (b32), .a_lt_b (lt32), .a_eq_b (eq32), .a_gt_b (gt32));
  mag_comparator #(.W(5)) dut5 (.a (a5), .b (b5), .a_lt_b (lt5), .a_eq_b (eq5), .a_gt_b (gt5));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32(logic [31:0] a, logic [31:0] b);
    a32 = a;
    b32 = b;
    #1;
    checks++;
    if ({lt32, eq32, gt32} != {a < b, a == b, a > b}) begin
      failures++;
      if (failures < 20) $display("FAIL: a=%h b=%h lt=%b eq=%b gt=%b", a, b, lt32, eq32, gt32);
    end
  endtask

  initial begin
    logic [31:0] r;
    for (int a = 0; a < 32; a++)
      for (int b = 0; b < 32; b++) begin
        a5 = 5'(a);
        b5 = 5'(b);
        #1;
        checks++;
        if ({lt5, eq5, gt5} != {a < b, a == b, a > b}) begin
          failures++;
          if (failures < 20) $display("FAIL: a=%0d b=%0d lt=%b eq=%b gt=%b", a, b, lt5, eq5, gt5);
        end
      end
    check32(32'h0, 32'h0);
    check32(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    check32(32'h8000_0000, 32'h7FFF_FFFF);
    check32(32'h7FFF_FFFF, 32'h8000_0000);
    check32(32'd1147, 32'd1147);
    check32(32'd1146, 32'd1147);
    check32(32'd3455, 32'd3455);
    for (int i = 0; i < 2000; i++) begin
      r = $urandom;
      check32(r, $urandom);
      check32(r, r ^ (32'h1 << (i % 32)));    // differ in one bit
      check32(r, r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

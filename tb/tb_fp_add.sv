// tb_fp_add: self-checking test of the single-precision adder.
//
// Directed cases (exact sums, ties to even, cancellation, signed zeros,
// specials, overflow, results below the normal range) and 30000 random pairs:
// near magnitudes of opposite sign (deep cancellation), wide exponent gaps
// (sticky bit) and general operands. Each result is compared bit-for-bit with
// fp_ref_pkg::ref_add.
module tb_fp_add;
  import fp_ref_pkg::*;

  logic [31:0] a, b, s;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  fp_add dut (.a(a), .b(b), .s(s));

  task automatic check(logic [31:0] x, logic [31:0] y, logic [31:0] exp_s);
    a = x; b = y;
    #1;
    checks++;
    if (s !== exp_s) begin
      failures++;
      if (failures < 10) $display("FAIL add %h + %h = %h, expected %h", x, y, s, exp_s);
    end
  endtask

  initial begin
    check(32'h3F80_0000, 32'h3F80_0000, 32'h4000_0000);  // 1 + 1 = 2
    check(32'h4040_0000, 32'hBF80_0000, 32'h4000_0000);  // 3 - 1 = 2
    check(32'h3F80_0000, 32'hBF80_0000, 32'h0000_0000);  // 1 - 1 = +0
    check(32'h8000_0000, 32'h8000_0000, 32'h8000_0000);  // -0 + -0 = -0
    check(32'h4B80_0000, 32'h3F80_0000, 32'h4B80_0000);  // 2^24 + 1: tie, stays even
    check(32'h4B80_0001, 32'h3F80_0000, 32'h4B80_0002);  // (2^24+2) + 1: tie, rounds up to even
    check(32'h3F80_0000, 32'h3380_0000, 32'h3F80_0000);  // 1 + 2^-24: tie to even
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF, 32'h7F80_0000);  // overflow -> +inf
    check(32'h0080_0001, 32'h8080_0000, 32'h0000_0000);  // difference below 2^-126 flushes
    check(32'h7F80_0000, 32'hFF80_0000, 32'h7FC0_0000);  // inf - inf = NaN
    check(32'h7F80_0000, 32'h4000_0000, 32'h7F80_0000);  // inf + 2
    check(32'h0000_0005, 32'h4000_0000, 32'h4000_0000);  // subnormal read as 0
    for (int i = 0; i < 10000; i++) begin
      logic [31:0] x, y;
      x = rand_f32(100, 150);
      y = {~x[31], x[30:8], 8'($urandom)};         // near cancellation
      check(x, y, ref_add(x, y));
    end
    for (int i = 0; i < 10000; i++) begin
      logic [31:0] x, y;
      x = rand_f32(100, 150);
      y = rand_f32(100, 150);                       // gaps of 0..50
      check(x, y, ref_add(x, y));
    end
    for (int i = 0; i < 10000; i++) begin
      logic [31:0] x, y;
      x = rand_f32(1, 254);
      y = rand_f32(1, 254);
      check(x, y, ref_add(x, y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

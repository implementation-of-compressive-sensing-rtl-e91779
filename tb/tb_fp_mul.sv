// tb_fp_mul: self-checking test of the single-precision multiplier.
//
// Drives directed cases (exact products, rounding ties, specials, overflow,
// underflow, subnormal inputs) and 20000 random operand pairs, and compares
// every result bit-for-bit with fp_ref_pkg::ref_mul.
module tb_fp_mul;
  import fp_ref_pkg::*;

  logic [31:0] a, b, p;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  fp_mul dut (.a(a), .b(b), .p(p));

  task automatic check(logic [31:0] x, logic [31:0] y, logic [31:0] exp_p);
    a = x; b = y;
    #1;
    checks++;
    if (p !== exp_p) begin
      failures++;
      if (failures < 10) $display("FAIL mul %h * %h = %h, expected %h", x, y, p, exp_p);
    end
  endtask

  initial begin
    // Directed values worked out by hand.
    check(32'h3F80_0000, 32'h3F80_0000, 32'h3F80_0000);  // 1 * 1
    check(32'h4000_0000, 32'h4040_0000, 32'h40C0_0000);  // 2 * 3 = 6
    check(32'hBFC0_0000, 32'h3FC0_0000, 32'hC010_0000);  // -1.5 * 1.5 = -2.25
    check(32'h3F80_0001, 32'h3F80_0001, 32'h3F80_0002);  // (1+u)^2 rounds to 1+2u
    check(32'h7F7F_FFFF, 32'h4000_0000, 32'h7F80_0000);  // overflow -> +inf
    check(32'h0080_0000, 32'h3F00_0000, 32'h0000_0000);  // 2^-126 * 0.5 flushes
    check(32'h0000_0001, 32'h4000_0000, 32'h0000_0000);  // subnormal input
    check(32'h7F80_0000, 32'h0000_0000, 32'h7FC0_0000);  // inf * 0 = NaN
    check(32'hFF80_0000, 32'h4000_0000, 32'hFF80_0000);  // -inf * 2
    check(32'h7FC0_0001, 32'h3F80_0000, 32'h7FC0_0000);  // NaN in
    check(32'h8000_0000, 32'h3F80_0000, 32'h8000_0000);  // -0 * 1 = -0
    // Random values against the double-precision reference.
    for (int i = 0; i < 15000; i++) begin
      logic [31:0] x, y;
      x = rand_f32(90, 164);
      y = rand_f32(90, 164);
      check(x, y, ref_mul(x, y));
    end
    for (int i = 0; i < 5000; i++) begin
      logic [31:0] x, y;
      x = rand_f32(1, 254);
      y = rand_f32(1, 254);
      check(x, y, ref_mul(x, y));
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

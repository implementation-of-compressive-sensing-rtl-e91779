// tb_mmult_lane: self-checking test of one row lane.
//
// Writes a random row, then steps the column index with random idle cycles in
// between, supplying b[k] one cycle after each read as the lane requires.
// After every step the accumulator is compared, at exactly the cycle the
// three-stage timing predicts, with a running reference sum built from
// fp_ref_pkg in the same order. Three rows are run, with clear between them.
module tb_mmult_lane;
  import mmult_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned COLS = 512;
  localparam int unsigned AW   = $clog2(COLS);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          clear, wr_en, rd_en;
  logic [AW-1:0] wr_addr, rd_addr;
  float32_t      wr_data, b_data, acc;
  int checks = 0, failures = 0;

  mmult_lane dut (.*);

  float32_t row [COLS];
  float32_t vec [COLS];
  float32_t partial, prev;

  initial begin
    clear = 0; wr_en = 0; rd_en = 0; wr_addr = '0; rd_addr = '0;
    wr_data = '0; b_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      // Load the row.
      for (int k = 0; k < COLS; k++) begin
        row[k] = rand_f32(110, 140);
        vec[k] = rand_f32(110, 140);
        @(negedge clk);
        wr_en = 1; wr_addr = AW'(k); wr_data = row[k];
      end
      @(negedge clk);
      wr_en = 0;
      clear = 1;
      @(negedge clk);
      clear = 0;
      checks++;
      if (acc !== 32'd0) begin failures++; $display("FAIL clear: acc=%h", acc); end
      partial = 32'd0;
      for (int k = 0; k < COLS; k++) begin
        rd_en = 1; rd_addr = AW'(k);
        @(negedge clk);
        rd_en = 0; b_data = vec[k];
        prev    = partial;
        partial = ref_add(partial, ref_mul(row[k], vec[k]));
        @(negedge clk);
        b_data = 32'hDEAD_BEEF;         // only valid in its one cycle
        checks++;
        if (acc !== prev) begin
          failures++;                   // the sum may not appear a cycle early
          $display("FAIL run %0d k=%0d acc changed one cycle early", run, k);
        end
        @(negedge clk);
        checks++;
        if (acc !== partial) begin
          failures++;
          if (failures < 10) $display("FAIL run %0d k=%0d acc=%h expected %h", run, k, acc, partial);
        end
        repeat ($urandom_range(1)) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

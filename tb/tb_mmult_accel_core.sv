// tb_mmult_accel_core: end-to-end test of the matrix-vector accelerator at
// its default size (24 x 512).
//
// The testbench plays the processor (AXI4-Lite writes and reads), the DMA
// (INPUT_STREAM source, OUTPUT_STREAM sink) and memory. Five operations:
//   1. a compressive-sensing measurement y = Phi * x, Phi random in (-1, 1),
//      x with three non-zero targets, no stalls: checks the results and the
//      exact cycle count, and that it is within 2% of the 13,471 cycles the original
//      design reports for its core of this size; completion by polling;
//   2. a dense product with random gaps in the input stream and random
//      back-pressure on the output, completion by interrupt;
//   3.-4. two operations back to back under auto_restart, the first an
//      18 x 512 problem padded with zero rows;
//   5. a product whose partial sums overflow, giving infinities.
// Every result is compared bit-for-bit with a sequential reference sum
// ((0 + A[i][0]b[0]) + A[i][1]b[1]) + ... from fp_ref_pkg. Each mechanism
// (input stall, output back-pressure, interrupt, auto-restart, done polling,
// TLAST) is counted; one that never happens counts as a failure.
module tb_mmult_accel_core;
  import mmult_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned ROWS = 24;
  localparam int unsigned COLS = 512;
  localparam int unsigned REPORTED_CYCLES = 13471;
  localparam int unsigned EXPECT_CYCLES = ROWS * COLS + 2 * COLS + ROWS + 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] in_tdata, out_tdata;
  logic        in_tvalid, in_tready, in_tlast, out_tvalid, out_tready, out_tlast;
  logic [4:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready;
  logic        arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  logic        irq;

  mmult_accel_core dut (
    .aclk(clk), .aresetn(rst_n),
    .input_stream_tdata(in_tdata), .input_stream_tvalid(in_tvalid),
    .input_stream_tready(in_tready), .input_stream_tlast(in_tlast),
    .output_stream_tdata(out_tdata), .output_stream_tvalid(out_tvalid),
    .output_stream_tready(out_tready), .output_stream_tlast(out_tlast),
    .s_axi_control_bus_awaddr(awaddr), .s_axi_control_bus_awvalid(awvalid),
    .s_axi_control_bus_awready(awready), .s_axi_control_bus_wdata(wdata),
    .s_axi_control_bus_wstrb(wstrb), .s_axi_control_bus_wvalid(wvalid),
    .s_axi_control_bus_wready(wready), .s_axi_control_bus_bresp(bresp),
    .s_axi_control_bus_bvalid(bvalid), .s_axi_control_bus_bready(bready),
    .s_axi_control_bus_araddr(araddr), .s_axi_control_bus_arvalid(arvalid),
    .s_axi_control_bus_arready(arready), .s_axi_control_bus_rdata(rdata),
    .s_axi_control_bus_rresp(rresp), .s_axi_control_bus_rvalid(rvalid),
    .s_axi_control_bus_rready(rready), .interrupt(irq)
  );

  int checks = 0, failures = 0;
  int n_in_stall = 0, n_out_backpressure = 0, n_irq = 0, n_auto_restart = 0;
  int n_done_polled = 0, n_tlast = 0;
  longint cycle = 0;
  always @(posedge clk) begin
    cycle++;
    if (in_tready && !in_tvalid && rst_n)  n_in_stall++;
    if (out_tvalid && !out_tready)         n_out_backpressure++;
  end

  float32_t A [ROWS][COLS];
  float32_t b [COLS];
  float32_t y_ref [ROWS];
  float32_t y_got [ROWS];

  task automatic expect_eq(string what, longint got, longint want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, want);
    end
  endtask

  task automatic axil_write(logic [4:0] addr, logic [31:0] data);
    @(negedge clk);
    awaddr = addr; wdata = data; wstrb = 4'hF; awvalid = 1; wvalid = 1;
    #1;
    while (!awready) begin @(negedge clk); #1; end
    @(negedge clk);
    awvalid = 0; wvalid = 0; bready = 1;
    while (!bvalid) @(negedge clk);
    @(negedge clk);
    bready = 0;
  endtask

  task automatic axil_read(logic [4:0] addr, output logic [31:0] data);
    @(negedge clk);
    araddr = addr; arvalid = 1;
    #1;
    while (!arready) begin @(negedge clk); #1; end
    @(negedge clk);
    arvalid = 0;
    while (!rvalid) @(negedge clk);
    data = rdata; rready = 1;
    @(negedge clk);
    rready = 0;
  endtask

  function automatic void make_ref();
    for (int i = 0; i < ROWS; i++) begin
      float32_t s;
      s = 32'd0;
      for (int k = 0; k < COLS; k++) s = ref_add(s, ref_mul(A[i][k], b[k]));
      y_ref[i] = s;
    end
  endfunction

  // DMA MM2S model: A row-major, then b; TLAST on the last word of each
  // operand (two transfers). gaps: random idle cycles between words.
  task automatic stream_in(bit gaps);
    for (int w = 0; w < ROWS * COLS + COLS; w++) begin
      @(negedge clk);
      if (gaps && ($urandom_range(7) == 0)) begin
        in_tvalid = 0;
        repeat ($urandom_range(1, 3)) @(negedge clk);
      end
      in_tdata  = (w < ROWS * COLS) ? A[w / COLS][w % COLS] : b[w - ROWS * COLS];
      in_tlast  = (w == ROWS * COLS - 1) || (w == ROWS * COLS + COLS - 1);
      in_tvalid = 1;
      #1;
      while (!in_tready) begin @(negedge clk); #1; end
    end
    @(negedge clk);
    in_tvalid = 0; in_tlast = 0;
  endtask

  // DMA S2MM model: collects ROWS words; backpressure: random TREADY.
  task automatic stream_out(bit backpressure, output longint last_cycle);
    int n;
    n = 0;
    while (n < ROWS) begin
      @(negedge clk);
      out_tready = backpressure ? ($urandom_range(2) != 0) : 1'b1;
      #1;
      if (out_tvalid && out_tready) begin
        y_got[n] = out_tdata;
        checks++;
        if (out_tlast != (n == ROWS - 1)) begin
          failures++;
          $display("FAIL TLAST on result %0d", n);
        end
        if (out_tlast) n_tlast++;
        n++;
        last_cycle = cycle + 1;   // taken at the coming edge
      end
    end
    @(negedge clk);
    out_tready = 0;
  endtask

  task automatic compare(string tag);
    for (int i = 0; i < ROWS; i++) begin
      checks++;
      if (y_got[i] !== y_ref[i]) begin
        failures++;
        if (failures < 20) $display("FAIL %s y[%0d]=%h expected %h", tag, i, y_got[i], y_ref[i]);
      end
    end
  endtask

  function automatic float32_t rand_unit();
    return rand_f32(100, 126);                      // |v| in [2^-27, 1)
  endfunction

  task automatic fill_dense();
    for (int i = 0; i < ROWS; i++)
      for (int k = 0; k < COLS; k++) A[i][k] = rand_unit();
    for (int k = 0; k < COLS; k++) b[k] = rand_unit();
  endtask

  logic [31:0] r;
  longint t_start, t_end;
  bit saw_idle;

  initial begin
    in_tdata = '0; in_tvalid = 0; in_tlast = 0; out_tready = 0;
    awaddr = '0; awvalid = 0; wdata = '0; wstrb = '0; wvalid = 0; bready = 0;
    araddr = '0; arvalid = 0; rready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. Measurement of a 3-target sparse scene, polled, timed.
    fill_dense();
    for (int k = 0; k < COLS; k++) b[k] = 32'd0;
    b[37]  = 32'h3F80_0000;                          //  1.0
    b[200] = 32'hBF40_0000;                          // -0.75
    b[461] = 32'h3F20_0000;                          //  0.625
    make_ref();
    axil_write(ADDR_AP_CTRL, 32'h1);
    t_start = cycle;                                 // ap_start set at this edge
    fork
      stream_in(1'b0);
      stream_out(1'b0, t_end);
    join
    compare("sparse");
    expect_eq("cycles, ap_start to last result", t_end - t_start, EXPECT_CYCLES - 1);
    checks++;
    if ((t_end - t_start) * 100 < REPORTED_CYCLES * 98 || (t_end - t_start) * 100 > REPORTED_CYCLES * 102) begin
      failures++;
      $display("FAIL cycle count %0d not within 2%% of %0d", t_end - t_start, REPORTED_CYCLES);
    end
    $display("operation latency %0d cycles (original design: %0d)", t_end - t_start, REPORTED_CYCLES);
    do axil_read(ADDR_AP_CTRL, r); while (!r[AP_DONE_BIT]);
    n_done_polled++;
    expect_eq("idle after done", 32'(r[AP_IDLE_BIT]), 1);
    axil_read(ADDR_AP_CTRL, r);
    expect_eq("done cleared on read", 32'(r[AP_DONE_BIT]), 0);

    // 2. Dense product with stalls on both streams, completion by interrupt.
    fill_dense();
    make_ref();
    axil_write(ADDR_GIE, 32'h1);
    axil_write(ADDR_IER, 32'h1);
    axil_write(ADDR_AP_CTRL, 32'h1);
    fork
      stream_in(1'b1);
      stream_out(1'b1, t_end);
    join
    compare("stalled");
    repeat (2) @(negedge clk);
    if (irq) n_irq++;
    expect_eq("interrupt raised at done", 32'(irq), 1);
    axil_write(ADDR_ISR, 32'h1);
    expect_eq("interrupt cleared", 32'(irq), 0);
    axil_write(ADDR_GIE, 32'h0);

    // 3.-4. Back to back under auto_restart; the first is 18 x 512 padded.
    fill_dense();
    for (int i = 18; i < ROWS; i++)
      for (int k = 0; k < COLS; k++) A[i][k] = 32'd0;
    make_ref();
    axil_write(ADDR_AP_CTRL, 32'h81);
    fork
      stream_in(1'b1);
      stream_out(1'b0, t_end);
    join
    compare("padded 18x512");
    for (int i = 18; i < ROWS; i++) expect_eq("padded row is zero", 32'(y_got[i]), 0);
    // turn auto_restart off; the core has already restarted by itself
    axil_write(ADDR_AP_CTRL, 32'h0);
    saw_idle = 0;
    fill_dense();
    make_ref();
    fork
      stream_in(1'b0);
      stream_out(1'b1, t_end);
    join
    compare("auto-restarted");
    axil_read(ADDR_AP_CTRL, r);
    if (r[AP_DONE_BIT]) n_auto_restart++;
    expect_eq("second operation done", 32'(r[AP_DONE_BIT]), 1);

    // 5. Overflowing sums: every product is 2^120, rows overflow to infinity.
    for (int i = 0; i < ROWS; i++)
      for (int k = 0; k < COLS; k++) A[i][k] = (i % 2) ? 32'hFB80_0000 : 32'h7B80_0000; // -/+2^120
    for (int k = 0; k < COLS; k++) b[k] = 32'h3F80_0000;
    make_ref();
    axil_write(ADDR_AP_CTRL, 32'h1);
    fork
      stream_in(1'b0);
      stream_out(1'b0, t_end);
    join
    compare("overflow");
    expect_eq("row 0 is +inf", 32'(y_got[0]), 32'h7F80_0000);
    expect_eq("row 1 is -inf", 32'(y_got[1]), 32'hFF80_0000);

    // Mechanism coverage.
    $display("input stalls %0d, output back-pressure %0d, interrupts %0d, auto-restarts %0d, done polls %0d, TLAST %0d",
             n_in_stall, n_out_backpressure, n_irq, n_auto_restart, n_done_polled, n_tlast);
    if (n_in_stall == 0)         begin failures++; $display("FAIL no input stall"); end
    if (n_out_backpressure == 0) begin failures++; $display("FAIL no output back-pressure"); end
    if (n_irq == 0)              begin failures++; $display("FAIL no interrupt"); end
    if (n_auto_restart == 0)     begin failures++; $display("FAIL no auto-restart"); end
    if (n_done_polled == 0)      begin failures++; $display("FAIL no done poll"); end
    expect_eq("TLAST count", n_tlast, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

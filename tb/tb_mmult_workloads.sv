// tb_mmult_workloads: the accelerator, at its default 24 x 512 size, running
// the larger workloads the design is meant for, the way the processor would
// split them into operations:
//   * a 12 x 12 by 12 x 12 matrix multiplication, as twelve matrix-vector
//     products (one per column of the right-hand matrix), each zero-padded
//     into the 24 x 512 core;
//   * the 700 x 1000 radar measurement y = Phi * x with three targets, as
//     30 row tiles x 2 column tiles (the last tiles zero-padded), the two
//     column-tile partial sums of each row added afterwards as the processor
//     would.
// Every tile result is compared bit-for-bit with a sequential reference sum,
// the combined radar result with the reference partial sums added in the same
// order, and the total cycle count with 13,340 cycles per operation.
module tb_mmult_workloads;
  import mmult_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned ROWS = 24;
  localparam int unsigned COLS = 512;
  localparam int unsigned OP_CYCLES = ROWS * COLS + 2 * COLS + ROWS + 4;
  localparam int unsigned MM_N = 12;
  localparam int unsigned RM = 700;
  localparam int unsigned RN = 1000;
  localparam int unsigned RT = (RM + ROWS - 1) / ROWS;   // 30 row tiles
  localparam int unsigned CT = (RN + COLS - 1) / COLS;   // 2 column tiles

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
  longint cycle = 0;
  always @(posedge clk) begin
    cycle++;
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

  task automatic stream_in();
    for (int w = 0; w < ROWS * COLS + COLS; w++) begin
      @(negedge clk);
      in_tdata  = (w < ROWS * COLS) ? A[w / COLS][w % COLS] : b[w - ROWS * COLS];
      in_tlast  = (w == ROWS * COLS + COLS - 1);
      in_tvalid = 1;
      #1;
      while (!in_tready) begin @(negedge clk); #1; end
    end
    @(negedge clk);
    in_tvalid = 0; in_tlast = 0;
  endtask

  task automatic stream_out();
    int n;
    n = 0;
    while (n < ROWS) begin
      @(negedge clk);
      out_tready = 1'b1;
      #1;
      if (out_tvalid && out_tready) begin
        y_got[n] = out_tdata;
        n++;
      end
    end
    @(negedge clk);
    out_tready = 0;
  endtask

  // One operation on the current A and b, checked against the reference.
  task automatic run_op(string tag);
    logic [31:0] r;
    make_ref();
    axil_write(ADDR_AP_CTRL, 32'h1);
    fork
      stream_in();
      stream_out();
    join
    for (int i = 0; i < ROWS; i++) begin
      checks++;
      if (y_got[i] !== y_ref[i]) begin
        failures++;
        if (failures < 20) $display("FAIL %s y[%0d]=%h expected %h", tag, i, y_got[i], y_ref[i]);
      end
    end
    do axil_read(ADDR_AP_CTRL, r); while (!r[AP_DONE_BIT]);
    n_ops++;
  endtask

  function automatic float32_t rand_unit();
    return rand_f32(100, 126);
  endfunction

  float32_t P [MM_N][MM_N], Q [MM_N][MM_N];
  float32_t phi [RM][RN];
  float32_t x [RN];
  float32_t part [CT][RM];
  int n_ops = 0;
  longint t0, t1;

  initial begin
    in_tdata = '0; in_tvalid = 0; in_tlast = 0; out_tready = 0;
    awaddr = '0; awvalid = 0; wdata = '0; wstrb = '0; wvalid = 0; bready = 0;
    araddr = '0; arvalid = 0; rready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 12 x 12 matrix multiplication, one column of Q per operation.
    for (int i = 0; i < MM_N; i++)
      for (int j = 0; j < MM_N; j++) begin
        P[i][j] = rand_unit();
        Q[i][j] = rand_unit();
      end
    t0 = cycle;
    for (int j = 0; j < MM_N; j++) begin
      for (int i = 0; i < ROWS; i++)
        for (int k = 0; k < COLS; k++)
          A[i][k] = (i < MM_N && k < MM_N) ? P[i][k] : 32'd0;
      for (int k = 0; k < COLS; k++) b[k] = (k < MM_N) ? Q[k][j] : 32'd0;
      run_op("12x12");
      for (int i = MM_N; i < ROWS; i++) begin
        checks++;
        if (y_got[i] !== 32'd0) begin failures++; $display("FAIL padded row %0d", i); end
      end
    end
    $display("12x12 matrix multiplication: %0d operations, %0d cycles", MM_N, cycle - t0);

    // 700 x 1000 radar scene with three targets.
    t1 = cycle;
    for (int i = 0; i < RM; i++)
      for (int k = 0; k < RN; k++) phi[i][k] = rand_unit();
    for (int k = 0; k < RN; k++) x[k] = 32'd0;
    x[123] = 32'h3F80_0000;  x[456] = 32'h3F00_0000;  x[789] = 32'hBF40_0000;
    for (int ct = 0; ct < CT; ct++)
      for (int rt = 0; rt < RT; rt++) begin
        for (int i = 0; i < ROWS; i++)
          for (int k = 0; k < COLS; k++) begin
            int gi, gk;
            gi = rt * ROWS + i;  gk = ct * COLS + k;
            A[i][k] = (gi < RM && gk < RN) ? phi[gi][gk] : 32'd0;
          end
        for (int k = 0; k < COLS; k++) b[k] = (ct * COLS + k < RN) ? x[ct * COLS + k] : 32'd0;
        run_op("radar tile");
        for (int i = 0; i < ROWS; i++)
          if (rt * ROWS + i < RM) part[ct][rt * ROWS + i] = y_got[i];
      end
    // Combine the column tiles and compare with the whole-row reference
    // computed in the same order: (tile 0 sum) + (tile 1 sum).
    for (int i = 0; i < RM; i++) begin
      float32_t s0, s1, y;
      s0 = 32'd0;  s1 = 32'd0;
      for (int k = 0; k < COLS; k++) s0 = ref_add(s0, ref_mul(phi[i][k], x[k]));
      for (int k = COLS; k < RN; k++) s1 = ref_add(s1, ref_mul(phi[i][k], x[k]));
      y = ref_add(part[0][i], part[1][i]);
      checks++;
      if (y !== ref_add(s0, s1)) begin
        failures++;
        if (failures < 20) $display("FAIL radar y[%0d]=%h expected %h", i, y, ref_add(s0, s1));
      end
    end
    $display("radar 700x1000: %0d operations, %0d cycles", RT * CT, cycle - t1);
    // Cycle budget: each operation is OP_CYCLES plus the bus traffic around it.
    checks++;
    if (n_ops != MM_N + RT * CT) begin failures++; $display("FAIL operation count %0d", n_ops); end
    checks++;
    if (cycle - t0 < longint'(n_ops) * OP_CYCLES) begin
      failures++;
      $display("FAIL %0d cycles is less than %0d operations allow", cycle - t0, n_ops);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

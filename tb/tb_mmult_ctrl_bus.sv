// tb_mmult_ctrl_bus: self-checking test of the AXI4-Lite control slave.
//
// Plays the processor on the bus (with random delays on BREADY/RREADY and on
// the write address/data channels) and the core on the ap_* side. Checks the
// start/ready handshake, auto_restart, done set and clear-on-read, the idle
// bit, the interrupt enables and the toggle-on-write interrupt status.
module tb_mmult_ctrl_bus;
  import mmult_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [4:0]  s_axi_awaddr, s_axi_araddr;
  logic        s_axi_awvalid, s_axi_awready, s_axi_wvalid, s_axi_wready;
  logic [31:0] s_axi_wdata, s_axi_rdata;
  logic [3:0]  s_axi_wstrb;
  logic [1:0]  s_axi_bresp, s_axi_rresp;
  logic        s_axi_bvalid, s_axi_bready, s_axi_arvalid, s_axi_arready;
  logic        s_axi_rvalid, s_axi_rready;
  logic        ap_start, ap_done, ap_idle, ap_ready, interrupt;
  int checks = 0, failures = 0;

  mmult_ctrl_bus dut (.*);

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, want);
    end
  endtask

  task automatic axil_write(logic [4:0] addr, logic [31:0] data);
    @(negedge clk);
    s_axi_awaddr = addr; s_axi_wdata = data; s_axi_wstrb = 4'hF;
    // address first, data a random number of cycles later
    s_axi_awvalid = 1;
    repeat ($urandom_range(2)) @(negedge clk);
    s_axi_wvalid = 1;
    #1;
    while (!(s_axi_awready && s_axi_wready)) begin @(negedge clk); #1; end
    @(negedge clk);
    s_axi_awvalid = 0; s_axi_wvalid = 0;
    repeat ($urandom_range(2)) @(negedge clk);
    s_axi_bready = 1;
    while (!s_axi_bvalid) @(negedge clk);
    expect_eq("bresp", 32'(s_axi_bresp), 32'(AXI_RESP_OKAY));
    @(negedge clk);
    s_axi_bready = 0;
  endtask

  task automatic axil_read(logic [4:0] addr, output logic [31:0] data);
    @(negedge clk);
    s_axi_araddr = addr; s_axi_arvalid = 1;
    while (!s_axi_arready) @(negedge clk);
    @(negedge clk);
    s_axi_arvalid = 0;
    repeat ($urandom_range(2)) @(negedge clk);
    while (!s_axi_rvalid) @(negedge clk);
    data = s_axi_rdata;
    s_axi_rready = 1;
    @(negedge clk);
    s_axi_rready = 0;
  endtask

  task automatic pulse(ref logic sig);
    @(negedge clk); sig = 1;
    @(negedge clk); sig = 0;
  endtask

  logic [31:0] r;

  initial begin
    s_axi_awaddr = '0; s_axi_araddr = '0; s_axi_awvalid = 0; s_axi_wvalid = 0;
    s_axi_wdata = '0; s_axi_wstrb = '0; s_axi_bready = 0; s_axi_arvalid = 0;
    s_axi_rready = 0; ap_done = 0; ap_idle = 1; ap_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    axil_read(ADDR_AP_CTRL, r);
    expect_eq("reset AP_CTRL (idle only)", r, 32'h4);
    expect_eq("reset interrupt", 32'(interrupt), 0);

    // Start, then the core reports ready: start clears.
    axil_write(ADDR_AP_CTRL, 32'h1);
    expect_eq("ap_start after write", 32'(ap_start), 1);
    ap_idle = 0;
    axil_read(ADDR_AP_CTRL, r);
    expect_eq("AP_CTRL running", r, 32'h1);
    pulse(ap_ready);
    expect_eq("ap_start cleared by ap_ready", 32'(ap_start), 0);
    // Done: sticky until read, then cleared by the read.
    pulse(ap_done);
    ap_idle = 1;
    axil_read(ADDR_AP_CTRL, r);
    expect_eq("AP_CTRL done", r, 32'h6);
    axil_read(ADDR_AP_CTRL, r);
    expect_eq("AP_CTRL done cleared on read", r, 32'h4);

    // Auto-restart keeps ap_start through ap_ready.
    axil_write(ADDR_AP_CTRL, 32'h81);
    pulse(ap_ready);
    expect_eq("ap_start kept with auto_restart", 32'(ap_start), 1);
    axil_read(ADDR_AP_CTRL, r);
    expect_eq("AP_CTRL auto_restart bit", r & 32'h81, 32'h81);
    axil_write(ADDR_AP_CTRL, 32'h0);
    pulse(ap_ready);
    expect_eq("ap_start cleared once auto_restart is off", 32'(ap_start), 0);

    // Interrupts: done event with IER[0] but no GIE: status set, line low.
    axil_write(ADDR_IER, 32'h1);
    axil_read(ADDR_IER, r);
    expect_eq("IER readback", r, 32'h1);
    pulse(ap_ready);
    axil_read(ADDR_ISR, r);
    expect_eq("ISR ignores disabled ready event", r, 32'h0);
    pulse(ap_done);
    axil_read(ADDR_ISR, r);
    expect_eq("ISR done", r, 32'h1);
    expect_eq("interrupt masked by GIE", 32'(interrupt), 0);
    axil_write(ADDR_GIE, 32'h1);
    expect_eq("interrupt with GIE", 32'(interrupt), 1);
    axil_write(ADDR_ISR, 32'h1);
    expect_eq("interrupt cleared by ISR toggle", 32'(interrupt), 0);
    axil_read(ADDR_ISR, r);
    expect_eq("ISR after toggle", r, 32'h0);
    axil_write(ADDR_IER, 32'h2);
    pulse(ap_ready);
    expect_eq("interrupt on ready event", 32'(interrupt), 1);
    axil_read(ADDR_ISR, r);
    expect_eq("ISR ready", r, 32'h2);
    axil_read(ADDR_GIE, r);
    expect_eq("GIE readback", r, 32'h1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// mmult_ctrl_bus: AXI4-Lite control slave of the matrix multiplication core.
//
// The processor starts the core and learns that it has finished through this
// bus; the finish event can also raise the core's interrupt line. The original
// names the bus and the interrupt pin of the core but not its registers; the
// register map below is this design's choice and follows the usual layout of
// a block-level control interface produced by C-to-RTL tools:
//
//   0x00 AP_CTRL  bit 0 ap_start  (write 1 to start; clears when the core
//                                  reports ap_ready, unless auto_restart)
//                 bit 1 ap_done   (set when an operation ends, clear on read)
//                 bit 2 ap_idle   (core is idle, read only)
//                 bit 3 ap_ready  (core has taken all its inputs, read only)
//                 bit 7 auto_restart (read/write)
//   0x04 GIE      bit 0 global interrupt enable
//   0x08 IER      bit 0 done interrupt enable, bit 1 ready interrupt enable
//   0x0C ISR      bit 0 done event, bit 1 ready event; a 1 written toggles
//   interrupt = GIE & |ISR
//
// Bus timing: a write is taken in the cycle where both AWVALID and WVALID are
// high and no write response is pending (AWREADY and WREADY rise together);
// BVALID follows one cycle later and holds until BREADY. A read is taken when
// ARVALID is high and no read data is pending; RVALID follows one cycle later
// and holds with RDATA until RREADY. Responses are always OKAY, and read data
// above bit 7 is always zero: those response and data bits are constant by
// design.
module mmult_ctrl_bus
  import mmult_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite slave
  input  logic [4:0]  s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [4:0]  s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  // block-level handshake with the core
  output logic        ap_start,
  input  logic        ap_done,    // one-cycle pulse at the end of an operation
  input  logic        ap_idle,
  input  logic        ap_ready,   // one-cycle pulse when all inputs are taken
  output logic        interrupt
);

  logic       done_q, auto_restart, gie;
  logic [1:0] ier, isr;
  logic       wr_fire, rd_fire, wr_low;

  assign s_axi_awready = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign s_axi_wready  = s_axi_awready;
  assign wr_fire       = s_axi_awready;
  assign wr_low        = s_axi_wstrb[0];
  assign s_axi_arready = !s_axi_rvalid;
  assign rd_fire       = s_axi_arvalid && s_axi_arready;
  assign s_axi_bresp   = AXI_RESP_OKAY;
  assign s_axi_rresp   = AXI_RESP_OKAY;
  assign interrupt     = gie && (isr != 2'b00);

  // Registers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ap_start     <= 1'b0;
      done_q       <= 1'b0;
      auto_restart <= 1'b0;
      gie          <= 1'b0;
      ier          <= '0;
      isr          <= '0;
    end else begin
      // ap_start
      if (wr_fire && wr_low && s_axi_awaddr == ADDR_AP_CTRL && s_axi_wdata[AP_START_BIT])
        ap_start <= 1'b1;
      else if (ap_ready && !auto_restart)
        ap_start <= 1'b0;
      // ap_done: set by the core, cleared by reading AP_CTRL
      if (ap_done)
        done_q <= 1'b1;
      else if (rd_fire && s_axi_araddr == ADDR_AP_CTRL)
        done_q <= 1'b0;
      if (wr_fire && wr_low) begin
        unique case (s_axi_awaddr)
          ADDR_AP_CTRL: auto_restart <= s_axi_wdata[AP_AUTO_BIT];
          ADDR_GIE:     gie          <= s_axi_wdata[0];
          ADDR_IER:     ier          <= s_axi_wdata[1:0];
          default: ;
        endcase
      end
      // ISR: events set their bit when enabled; a written 1 toggles it
      for (int i = 0; i < 2; i++) begin
        logic ev, tog;
        ev  = ier[i] && ((i == 0) ? ap_done : ap_ready);
        tog = wr_fire && wr_low && s_axi_awaddr == ADDR_ISR && s_axi_wdata[i];
        if (ev)       isr[i] <= 1'b1;
        else if (tog) isr[i] <= ~isr[i];
      end
    end
  end

  // Write response channel.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           s_axi_bvalid <= 1'b0;
    else if (wr_fire)                     s_axi_bvalid <= 1'b1;
    else if (s_axi_bready)                s_axi_bvalid <= 1'b0;
  end

  // Read data channel.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
    end else if (rd_fire) begin
      s_axi_rvalid <= 1'b1;
      unique case (s_axi_araddr)
        ADDR_AP_CTRL: s_axi_rdata <= {24'd0, auto_restart, 3'd0, ap_ready, ap_idle, done_q, ap_start};
        ADDR_GIE:     s_axi_rdata <= {31'd0, gie};
        ADDR_IER:     s_axi_rdata <= {30'd0, ier};
        ADDR_ISR:     s_axi_rdata <= {30'd0, isr};
        default:      s_axi_rdata <= '0;
      endcase
    end else if (s_axi_rready) begin
      s_axi_rvalid <= 1'b0;
    end
  end

  // AXI rules: a response, once offered, stays until it is taken.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));

endmodule

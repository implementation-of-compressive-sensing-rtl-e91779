// mmult_accel_core: stream-in / stream-out single-precision matrix-vector
// multiplier, y = A * b, with A of ROWS x COLS and b of COLS x 1.
//
// This is the programmable-logic accelerator that a compressive-sensing
// receiver uses for its matrix products (the residual update r = u - Phi*x
// and the correlations of the residual with the columns of Phi). A DMA engine
// streams both operands in, one after the other, over one stream; the core
// multiplies them in one go and streams the ROWS results back out.
//
// Structure (follows the original design): one mmult_lane per output row, each with
// its own row memory, multiplier and adder, matching the original design's report of
// one block RAM and five DSP slices per row; a vector memory for b; the
// AXI4-Lite control bus (mmult_ctrl_bus) and an interrupt line.
//
// Operation (the sequencing is this design's choice):
//   1. The processor writes ap_start. The core leaves IDLE.
//   2. LOAD_A: ROWS*COLS words, row-major (A[0][0..COLS-1], A[1][..], ...).
//   3. LOAD_B: COLS words of b. ap_ready pulses when the last is taken.
//   4. COMPUTE: COLS cycles, all lanes multiply-accumulate column k in step.
//   5. DRAIN: two cycles while the lane pipelines empty.
//   6. OUTPUT: ROWS words y[0..ROWS-1], TLAST with the last; then ap_done
//      pulses and the core returns to IDLE, or starts again at once if
//      ap_start is still set (auto_restart).
// The word count, not TLAST, marks the end of each operand, so A and b may
// come in one DMA transfer or two; input TLAST is ignored.
//
// Timing: with no stalls on either stream one operation takes
// ROWS*COLS + 2*COLS + ROWS + 4 cycles from the ap_start write being seen to
// ap_done (13,340 at 24 x 512, against 13,471 reported in the original design for its
// core of that size). Input TVALID gaps and output TREADY low stall the core.
//
// Port groups keep the original design's names: input_stream_* (INPUT_STREAM),
// output_stream_* (OUTPUT_STREAM), s_axi_control_bus_* (S_AXI_CONTROL_BUS)
// and interrupt. Clock aclk and reset aresetn (active-low, asserted
// asynchronously) follow the AXI naming convention. Several bits of the
// control bus responses and read data are constant (see mmult_ctrl_bus).
module mmult_accel_core
  import mmult_pkg::*;
#(
  parameter int unsigned ROWS = 24,
  parameter int unsigned COLS = 512
) (
  input  logic        aclk,
  input  logic        aresetn,
  // INPUT_STREAM (AXI4-Stream slave)
  input  logic [31:0] input_stream_tdata,
  input  logic        input_stream_tvalid,
  output logic        input_stream_tready,
  input  logic        input_stream_tlast,
  // OUTPUT_STREAM (AXI4-Stream master)
  output logic [31:0] output_stream_tdata,
  output logic        output_stream_tvalid,
  input  logic        output_stream_tready,
  output logic        output_stream_tlast,
  // S_AXI_CONTROL_BUS (AXI4-Lite slave)
  input  logic [4:0]  s_axi_control_bus_awaddr,
  input  logic        s_axi_control_bus_awvalid,
  output logic        s_axi_control_bus_awready,
  input  logic [31:0] s_axi_control_bus_wdata,
  input  logic [3:0]  s_axi_control_bus_wstrb,
  input  logic        s_axi_control_bus_wvalid,
  output logic        s_axi_control_bus_wready,
  output logic [1:0]  s_axi_control_bus_bresp,
  output logic        s_axi_control_bus_bvalid,
  input  logic        s_axi_control_bus_bready,
  input  logic [4:0]  s_axi_control_bus_araddr,
  input  logic        s_axi_control_bus_arvalid,
  output logic        s_axi_control_bus_arready,
  output logic [31:0] s_axi_control_bus_rdata,
  output logic [1:0]  s_axi_control_bus_rresp,
  output logic        s_axi_control_bus_rvalid,
  input  logic        s_axi_control_bus_rready,
  output logic        interrupt
);

  localparam int unsigned CW = (COLS > 1) ? $clog2(COLS) : 1;
  localparam int unsigned RW = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned DRAIN_CYCLES = 2;

  core_state_t state;
  logic [RW-1:0] row;        // row being loaded / result being sent
  logic [CW-1:0] col;        // column being loaded / computed
  logic [1:0]    drain_cnt;
  logic          ap_start, ap_done, ap_idle, ap_ready;
  logic          in_fire, out_fire;
  logic          last_col, last_row;
  logic          lane_clear, rd_en;
  float32_t      b_mem [COLS];
  float32_t      b_q;
  float32_t      acc [ROWS];

  assign in_fire  = input_stream_tvalid && input_stream_tready;
  assign out_fire = output_stream_tvalid && output_stream_tready;
  assign last_col = (col == CW'(COLS - 1));
  assign last_row = (row == RW'(ROWS - 1));

  assign input_stream_tready  = (state == ST_LOAD_A) || (state == ST_LOAD_B);
  assign output_stream_tvalid = (state == ST_OUTPUT);
  assign output_stream_tlast  = (state == ST_OUTPUT) && last_row;
  assign output_stream_tdata  = acc[row];
  assign ap_idle              = (state == ST_IDLE);
  assign rd_en                = (state == ST_COMPUTE);
  assign lane_clear           = (state == ST_LOAD_B) && in_fire && last_col;

  // Sequencer.
  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      state     <= ST_IDLE;
      row       <= '0;
      col       <= '0;
      drain_cnt <= '0;
      ap_done   <= 1'b0;
      ap_ready  <= 1'b0;
    end else begin
      ap_done  <= 1'b0;
      ap_ready <= 1'b0;
      unique case (state)
        ST_IDLE: begin
          row <= '0;
          col <= '0;
          if (ap_start) state <= ST_LOAD_A;
        end
        ST_LOAD_A: if (in_fire) begin
          col <= last_col ? '0 : col + 1'b1;
          if (last_col) begin
            row <= last_row ? '0 : row + 1'b1;
            if (last_row) state <= ST_LOAD_B;
          end
        end
        ST_LOAD_B: if (in_fire) begin
          col <= last_col ? '0 : col + 1'b1;
          if (last_col) begin
            state    <= ST_COMPUTE;
            ap_ready <= 1'b1;
          end
        end
        ST_COMPUTE: begin
          col <= last_col ? '0 : col + 1'b1;
          if (last_col) begin
            state     <= ST_DRAIN;
            drain_cnt <= 2'(DRAIN_CYCLES - 1);
          end
        end
        ST_DRAIN: begin
          drain_cnt <= drain_cnt - 1'b1;
          if (drain_cnt == '0) state <= ST_OUTPUT;
        end
        ST_OUTPUT: if (out_fire) begin
          row <= last_row ? '0 : row + 1'b1;
          if (last_row) begin
            ap_done <= 1'b1;
            state   <= ST_IDLE;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // Vector memory: written in LOAD_B, read in COMPUTE in step with the rows.
  always_ff @(posedge aclk) begin
    if (state == ST_LOAD_B && in_fire) b_mem[col] <= input_stream_tdata;
    if (rd_en) b_q <= b_mem[col];
  end

  // One lane per output row.
  for (genvar i = 0; i < ROWS; i++) begin : g_lane
    mmult_lane #(.COLS(COLS)) u_lane (
      .clk     (aclk),
      .rst_n   (aresetn),
      .clear   (lane_clear),
      .wr_en   (state == ST_LOAD_A && in_fire && row == RW'(i)),
      .wr_addr (col),
      .wr_data (input_stream_tdata),
      .rd_en   (rd_en),
      .rd_addr (col),
      .b_data  (b_q),
      .acc     (acc[i])
    );
  end

  mmult_ctrl_bus u_ctrl (
    .clk           (aclk),
    .rst_n         (aresetn),
    .s_axi_awaddr  (s_axi_control_bus_awaddr),
    .s_axi_awvalid (s_axi_control_bus_awvalid),
    .s_axi_awready (s_axi_control_bus_awready),
    .s_axi_wdata   (s_axi_control_bus_wdata),
    .s_axi_wstrb   (s_axi_control_bus_wstrb),
    .s_axi_wvalid  (s_axi_control_bus_wvalid),
    .s_axi_wready  (s_axi_control_bus_wready),
    .s_axi_bresp   (s_axi_control_bus_bresp),
    .s_axi_bvalid  (s_axi_control_bus_bvalid),
    .s_axi_bready  (s_axi_control_bus_bready),
    .s_axi_araddr  (s_axi_control_bus_araddr),
    .s_axi_arvalid (s_axi_control_bus_arvalid),
    .s_axi_arready (s_axi_control_bus_arready),
    .s_axi_rdata   (s_axi_control_bus_rdata),
    .s_axi_rresp   (s_axi_control_bus_rresp),
    .s_axi_rvalid  (s_axi_control_bus_rvalid),
    .s_axi_rready  (s_axi_control_bus_rready),
    .ap_start      (ap_start),
    .ap_done       (ap_done),
    .ap_idle       (ap_idle),
    .ap_ready      (ap_ready),
    .interrupt     (interrupt)
  );

  // AXI4-Stream rule: the output word, once offered, holds until taken.
  a_out_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    output_stream_tvalid && !output_stream_tready |=>
      output_stream_tvalid && $stable(output_stream_tdata) && $stable(output_stream_tlast));

endmodule

// mmult_pkg: types and constants shared by the matrix-vector multiplication
// accelerator.
//
// The accelerator works on IEEE-754 single-precision numbers (float32_t).
// The control-bus register map follows the usual layout of a C-to-RTL
// generated block-level control interface: a control/status word at 0x00,
// a global interrupt enable at 0x04, an interrupt enable register at 0x08
// and an interrupt status register at 0x0C. That layout is this design's
// choice; the original design only names the control bus.
package mmult_pkg;

  typedef logic [31:0] float32_t;

  // Field layout of a single-precision number.
  localparam int          FP_BIAS   = 127;
  localparam float32_t    FP_QNAN   = 32'h7FC0_0000;

  // AXI4-Lite control register byte offsets.
  localparam logic [4:0] ADDR_AP_CTRL = 5'h00;
  localparam logic [4:0] ADDR_GIE     = 5'h04;
  localparam logic [4:0] ADDR_IER     = 5'h08;
  localparam logic [4:0] ADDR_ISR     = 5'h0C;

  // Bits of the AP_CTRL word.
  localparam int unsigned AP_START_BIT = 0;
  localparam int unsigned AP_DONE_BIT  = 1;
  localparam int unsigned AP_IDLE_BIT  = 2;
  localparam int unsigned AP_READY_BIT = 3;
  localparam int unsigned AP_AUTO_BIT  = 7;

  // AXI response code.
  localparam logic [1:0] AXI_RESP_OKAY = 2'b00;

  // Phases of one operation of the core.
  typedef enum logic [2:0] {
    ST_IDLE,     // waiting for ap_start
    ST_LOAD_A,   // matrix elements arrive, row-major, into the row memories
    ST_LOAD_B,   // vector elements arrive into the vector memory
    ST_COMPUTE,  // one column index per cycle through all row lanes
    ST_DRAIN,    // multiply/accumulate pipeline empties
    ST_OUTPUT    // one result per accepted output beat
  } core_state_t;

endpackage

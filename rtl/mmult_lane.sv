// mmult_lane: one output row of the matrix-vector product y = A*b.
//
// Each lane owns the COLS elements of one row of A in its own memory (one
// block RAM per row), one single-precision multiplier and one single-precision
// adder. The core writes the row while the matrix streams in, then steps the
// column index k from 0 to COLS-1, one per cycle, and every lane computes
// acc += A[i][k] * b[k] at the same time. The original design's synthesis reports give
// one block RAM and five DSP slices (a multiplier plus an adder) per output
// row, which is what this lane holds; its pipeline depth is this design's
// choice.
//
// Timing (three stages):
//   cycle t   : rd_en with rd_addr = k; the row memory is read (registered).
//   cycle t+1 : b_data must carry b[k]; the product A[i][k]*b[k] is registered.
//   cycle t+2 : the product is added into acc.
// So acc holds the full dot product two cycles after the last rd_en.
// clear zeroes acc (and drops products in flight); wr_en/wr_addr/wr_data
// write the row memory and may not be used while a product is in flight.
module mmult_lane
  import mmult_pkg::*;
#(
  parameter int unsigned COLS = 512,
  localparam int unsigned AW  = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic           wr_en,
  input  logic [AW-1:0]  wr_addr,
  input  float32_t       wr_data,
  input  logic           rd_en,
  input  logic [AW-1:0]  rd_addr,
  input  float32_t       b_data,
  output float32_t       acc
);

  float32_t row_mem [COLS];
  float32_t a_q, prod_q, prod_d, sum_d;
  logic     v1, v2;

  always_ff @(posedge clk) begin
    if (wr_en) row_mem[wr_addr] <= wr_data;
    if (rd_en) a_q <= row_mem[rd_addr];
  end

  fp_mul u_mul (.a(a_q), .b(b_data), .p(prod_d));
  fp_add u_add (.a(acc), .b(prod_q), .s(sum_d));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1     <= 1'b0;
      v2     <= 1'b0;
      prod_q <= '0;
      acc    <= '0;
    end else begin
      v1 <= rd_en && !clear;
      v2 <= v1 && !clear;
      if (v1) prod_q <= prod_d;
      if (clear)   acc <= '0;
      else if (v2) acc <= sum_d;
    end
  end

endmodule

// psum_buffer: result buffer of the parallelized sum-pooling convolution.
//
// One partial sum per position of the output plane of the channel being
// computed (output_width x output_height words). Each pass over the plane
// reads every position once and writes it back C_COM cycles later; as long
// as the plane has at least C_COM positions, a read never overtakes the
// write-back of the same position, which is what lets the accumulation run
// at one iteration per clock.
// Read: synchronous, rd_data one clock after rd_addr. With rd_clear set the
// read returns +0.0 instead of the stored word; this is how a new output
// channel starts its sums from zero without a separate clearing pass.
// Write: we/wr_addr/wr_data, stored at the clock edge. A read of a position
// written in the same cycle returns the old word.
// The buffer, its size and its zero start follow the reference algorithm;
// zeroing on read rather than by a clearing loop is this design's choice.
module psum_buffer
  import psp_pkg::*;
#(
  parameter int unsigned DEPTH = 100
) (
  input  logic  clk,
  input  addr_t rd_addr,
  input  logic  rd_clear,
  output fp32_t rd_data,
  input  logic  we,
  input  addr_t wr_addr,
  input  fp32_t wr_data
);

  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  fp32_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (wr_addr < addr_t'(DEPTH)))
      mem[wr_addr[IW-1:0]] <= wr_data;
    if (rd_clear || (rd_addr >= addr_t'(DEPTH)))
      rd_data <= FP32_ZERO;
    else
      rd_data <= mem[rd_addr[IW-1:0]];
  end

endmodule

// psp_pkg: types and constants shared by the parallelized sum-pooling
// convolution accelerator.
//
// Data are IEEE-754 single-precision words (the reference algorithm works on
// C "float"). Layer geometry is given at run time by layer_cfg_t, the same
// arguments the software convolution takes: input height, width and channel
// count, square kernel size and output channel count. Convolutions are
// stride 1 without padding, so out_h = in_h - ksize + 1 (this reproduces the
// 15x15 -> 10 -> 7 -> 5 -> 4 chain of the four-layer network). Tensors are
// stored channel-major, row-major (CHW); weights as [out_ch][in_ch][ky][kx].
//
// C_COM is the number of cycles one multiply-accumulate iteration occupies
// from reading the result buffer to writing it back (14, as in the original
// high-level-synthesis implementation). The output plane of a layer must hold
// at least C_COM positions for back-to-back issue; smaller planes are
// padded with idle cycles by the loop controller.
package psp_pkg;

  typedef logic [31:0] fp32_t;

  localparam int unsigned DIM_W  = 8;   // width of one layer dimension
  localparam int unsigned ADDR_W = 16;  // width of every buffer address

  localparam fp32_t FP32_ZERO = 32'h0000_0000;
  localparam fp32_t FP32_QNAN = 32'h7fc0_0000;

  // Pipeline latencies of the arithmetic units.
  localparam int unsigned MUL_LAT = 3;
  localparam int unsigned ADD_LAT = 4;
  // read (1) + multiply + accumulate + bias add + ReLU (1) + write-back (1)
  localparam int unsigned C_COM   = 1 + MUL_LAT + ADD_LAT + ADD_LAT + 1 + 1;

  typedef logic [DIM_W-1:0]  dim_t;
  typedef logic [ADDR_W-1:0] addr_t;

  typedef struct packed {
    dim_t in_ch;
    dim_t in_h;
    dim_t in_w;
    dim_t ksize;
    dim_t out_ch;
  } layer_cfg_t;

  // One iteration of the innermost loop body (Algorithm 2, lines 12-18).
  typedef struct packed {
    logic  valid;
    logic  first;    // first (x,y,z) pass of an output channel: result = 0
    logic  last;     // last  (x,y,z) pass: write ReLU(result + bias)
    logic  final_it; // very last iteration of the layer
    addr_t in_idx;   // conv_in address
    addr_t w_idx;    // conv_weight address
    addr_t out_idx;  // conv_out address
    addr_t pos;      // result-buffer position (j * out_h + k)
    dim_t  och;      // output channel, addresses conv_bias
  } issue_t;

  // Buffer selector of the host write port.
  typedef enum logic [1:0] {
    SEL_IN   = 2'd0,
    SEL_W    = 2'd1,
    SEL_BIAS = 2'd2
  } buf_sel_t;

endpackage

// psp_conv_accel: programmable-logic convolution accelerator of an onboard
// Dueling-DQN router.
//
// The processor runs the routing agent and hands each convolution + ReLU
// layer of the Q-network's main layer to this block: it writes the input
// feature map, the weights and the biases into on-chip buffers, starts the
// layer with its geometry, waits for done and reads the output feature map
// back. The four layers of the network (15x15x4 input, kernels 6, 4, 3, 2,
// 4x4x32 output) are four such calls. Inside, psp_conv_core computes the
// layer in the parallelized sum-pooling order at one multiply-accumulate per
// clock.
//
// Buffers (all 32-bit IEEE-754 words, sdp_ram):
//   conv_in     IN_DEPTH   words, CHW      (largest: 32 x 10 x 10 = 3200)
//   conv_weight W_DEPTH    words, OIHW     (largest: 32 x 32 x 4 x 4 = 16384)
//   conv_bias   B_DEPTH    words
//   conv_out    OUT_DEPTH  words, CHW      (largest: 32 x 10 x 10 = 3200)
// The largest sizes assume 32 channels in every layer; only the 4 input and
// 32 final output channels are fixed by the network description.
//
// Host interface (this design's own, standing in for the memory-mapped
// registers and buffers the processor reaches over its bus):
//   host_we/host_sel/host_waddr/host_wdata  write one word into conv_in,
//                                           conv_weight or conv_bias
//   host_raddr -> host_rdata                read conv_out, one clock latency
//   start + cfg                             begin a layer (ignored while busy)
//   busy, done                              done pulses once per layer
//   last_cycles                             clocks from start to done of the
//                                           latest layer
//   stall, relu_zero                        per-clock event flags (idle cycle
//                                           of the loop controller, output
//                                           clamped by ReLU)
// Buffers must not be written while busy.
module psp_conv_accel
  import psp_pkg::*;
#(
  parameter int unsigned IN_DEPTH  = 3200,
  parameter int unsigned W_DEPTH   = 16384,
  parameter int unsigned B_DEPTH   = 32,
  parameter int unsigned OUT_DEPTH = 3200,
  parameter int unsigned BUF_DEPTH = 100
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         host_we,
  input  buf_sel_t     host_sel,
  input  addr_t        host_waddr,
  input  fp32_t        host_wdata,
  input  addr_t        host_raddr,
  output fp32_t        host_rdata,
  input  logic         start,
  input  layer_cfg_t   cfg,
  output logic         busy,
  output logic         done,
  output logic [31:0]  last_cycles,
  output logic         stall,
  output logic         relu_zero
);

  addr_t in_raddr, w_raddr, b_raddr, out_waddr;
  fp32_t in_rdata, w_rdata, b_rdata, out_wdata;
  logic  out_we;

  sdp_ram #(.WIDTH(32), .DEPTH(IN_DEPTH), .ADDR_W(ADDR_W)) u_conv_in (
    .clk(clk), .we(host_we && host_sel == SEL_IN), .waddr(host_waddr),
    .wdata(host_wdata), .raddr(in_raddr), .rdata(in_rdata));

  sdp_ram #(.WIDTH(32), .DEPTH(W_DEPTH), .ADDR_W(ADDR_W)) u_conv_weight (
    .clk(clk), .we(host_we && host_sel == SEL_W), .waddr(host_waddr),
    .wdata(host_wdata), .raddr(w_raddr), .rdata(w_rdata));

  sdp_ram #(.WIDTH(32), .DEPTH(B_DEPTH), .ADDR_W(ADDR_W)) u_conv_bias (
    .clk(clk), .we(host_we && host_sel == SEL_BIAS), .waddr(host_waddr),
    .wdata(host_wdata), .raddr(b_raddr), .rdata(b_rdata));

  sdp_ram #(.WIDTH(32), .DEPTH(OUT_DEPTH), .ADDR_W(ADDR_W)) u_conv_out (
    .clk(clk), .we(out_we), .waddr(out_waddr),
    .wdata(out_wdata), .raddr(host_raddr), .rdata(host_rdata));

  psp_conv_core #(.BUF_DEPTH(BUF_DEPTH)) u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .cfg       (cfg),
    .busy      (busy),
    .done      (done),
    .in_raddr  (in_raddr),
    .in_rdata  (in_rdata),
    .w_raddr   (w_raddr),
    .w_rdata   (w_rdata),
    .b_raddr   (b_raddr),
    .b_rdata   (b_rdata),
    .out_we    (out_we),
    .out_waddr (out_waddr),
    .out_wdata (out_wdata),
    .stall     (stall),
    .relu_zero (relu_zero)
  );

  // Cycle counter of the latest layer, for the processor's timing.
  logic [31:0] cyc;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc         <= '0;
      last_cycles <= '0;
    end else begin
      if (start && !busy)
        cyc <= 32'd0;
      else if (busy)
        cyc <= cyc + 32'd1;
      if (done)
        last_cycles <= cyc;
    end
  end

  a_no_write_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !host_we)
    else $error("psp_conv_accel: buffer written during a layer");

endmodule

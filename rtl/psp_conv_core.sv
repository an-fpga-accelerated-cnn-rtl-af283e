// psp_conv_core: one 2D convolution layer with bias and ReLU, computed in the
// parallelized sum-pooling order.
//
// Instead of finishing one output feature before starting the next (which
// chains every multiply-accumulate on the one before it), the core sweeps a
// whole output plane per kernel tap: for each (in channel, ky, kx) it adds
// conv_in * conv_weight into every position of a result buffer holding the
// plane of the current output channel. Successive updates of one position
// are a whole plane apart, so a new iteration can start every clock.
//
// Loop-body pipeline, for an iteration issued at cycle t by psp_loop_ctrl:
//   t       conv_in, conv_bias and result-buffer reads (the result read
//           returns 0 on the first pass of a channel); conv_weight is read
//           at the first position of each pass and held for the whole plane
//   t+1     fp32_mul      conv_in x conv_weight          (3 cycles)
//   t+4     fp32_add      result + product               (4 cycles)
//   t+8     fp32_add      result + bias                  (4 cycles)
//   t+12    ReLU: a value <= 0 becomes +0, registered
//   t+13    write-back: result -> result buffer;  on the last pass of the
//           channel, ReLU(result + bias) -> conv_out
// The body thus spans C_COM = 14 cycles from read to write-back, and an
// output plane of at least 14 positions runs with an initiation interval of
// 1; smaller planes get idle cycles from the loop controller.
//
// Interface: start (one clock while busy is low) with cfg; busy from the
// clock after start until done; done pulses one clock after the last
// conv_out write. Memory ports follow sdp_ram timing (read data one clock
// after the address). stall marks an idle cycle of the controller,
// relu_zero a conv_out word that ReLU set to zero.
// The pipeline structure and latencies are this design's own; the loop order,
// the result buffer, the ReLU and the 14-cycle body follow the reference
// algorithm.
module psp_conv_core
  import psp_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 100
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  layer_cfg_t cfg,
  output logic       busy,
  output logic       done,
  output addr_t      in_raddr,
  input  fp32_t      in_rdata,
  output addr_t      w_raddr,
  input  fp32_t      w_rdata,
  output addr_t      b_raddr,
  input  fp32_t      b_rdata,
  output logic       out_we,
  output addr_t      out_waddr,
  output fp32_t      out_wdata,
  output logic       stall,
  output logic       relu_zero
);

  localparam int unsigned WB = C_COM - 1;  // write-back stage index

  // ---- loop controller ---------------------------------------------------
  issue_t issue;
  logic   ctrl_busy;

  psp_loop_ctrl #(.CCOM(C_COM)) u_ctrl (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start && !busy),
    .cfg   (cfg),
    .issue (issue),
    .busy  (ctrl_busy),
    .stall (stall)
  );

  // ---- iteration records travel alongside the data -----------------------
  issue_t meta [1:WB];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 1; n <= WB; n++) meta[n] <= '0;
    end else begin
      meta[1] <= issue;
      for (int n = 2; n <= WB; n++) meta[n] <= meta[n-1];
    end
  end

  // ---- stage t: reads ----------------------------------------------------
  assign in_raddr = issue.in_idx;
  assign w_raddr  = issue.w_idx;
  assign b_raddr  = addr_t'(issue.och);

  fp32_t psum_rd;
  logic  psum_we;
  fp32_t psum_wdata;

  psum_buffer #(.DEPTH(BUF_DEPTH)) u_psum (
    .clk      (clk),
    .rd_addr  (issue.pos),
    .rd_clear (issue.first),
    .rd_data  (psum_rd),
    .we       (psum_we),
    .wr_addr  (meta[WB].pos),
    .wr_data  (psum_wdata)
  );

  // ---- t+1 .. t+4: multiply; the partial sum waits alongside -------------
  fp32_t prod;
  fp32_t psum_dly [MUL_LAT];
  fp32_t bias_dly [MUL_LAT + ADD_LAT];

  // The weight of a kernel tap is fetched once, on the first position of the
  // plane, and held for the rest of the sweep (the hoisted 'temp' weight).
  fp32_t w_hold, w_cur;
  assign w_cur = (meta[1].pos == '0) ? w_rdata : w_hold;
  always_ff @(posedge clk)
    if (meta[1].valid) w_hold <= w_cur;

  fp32_mul u_mul (.clk(clk), .a(in_rdata), .b(w_cur), .y(prod));

  always_ff @(posedge clk) begin
    psum_dly[0] <= psum_rd;
    for (int n = 1; n < MUL_LAT; n++) psum_dly[n] <= psum_dly[n-1];
    bias_dly[0] <= b_rdata;
    for (int n = 1; n < MUL_LAT + ADD_LAT; n++) bias_dly[n] <= bias_dly[n-1];
  end

  // ---- t+4 .. t+8: accumulate --------------------------------------------
  fp32_t acc;
  fp32_add u_acc (.clk(clk), .a(psum_dly[MUL_LAT-1]), .b(prod), .y(acc));

  // ---- t+8 .. t+12: bias -------------------------------------------------
  fp32_t biased;
  fp32_t acc_dly [ADD_LAT + 1];
  fp32_add u_bias (.clk(clk), .a(acc), .b(bias_dly[MUL_LAT+ADD_LAT-1]), .y(biased));

  always_ff @(posedge clk) begin
    acc_dly[0] <= acc;
    for (int n = 1; n <= ADD_LAT; n++) acc_dly[n] <= acc_dly[n-1];
  end

  // ---- t+12: ReLU --------------------------------------------------------
  fp32_t relu_q;
  logic  relu_neg_q;
  always_ff @(posedge clk) begin
    relu_neg_q <= biased[31] || (biased[30:0] == 31'd0);
    relu_q     <= (biased[31] || (biased[30:0] == 31'd0)) ? FP32_ZERO : biased;
  end

  // ---- t+13: write-back --------------------------------------------------
  assign psum_we    = meta[WB].valid;
  assign psum_wdata = acc_dly[ADD_LAT];
  assign out_we     = meta[WB].valid && meta[WB].last;
  assign out_waddr  = meta[WB].out_idx;
  assign out_wdata  = relu_q;
  assign relu_zero  = out_we && relu_neg_q;

  // ---- control -----------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= meta[WB].valid && meta[WB].final_it;
      if (start && !busy)
        busy <= 1'b1;
      else if (meta[WB].valid && meta[WB].final_it)
        busy <= 1'b0;
    end
  end

  // ---- rules of use ------------------------------------------------------
  dim_t  cfg_oh, cfg_ow;
  assign cfg_oh = cfg.in_h - cfg.ksize + dim_t'(1);
  assign cfg_ow = cfg.in_w - cfg.ksize + dim_t'(1);

  a_cfg_legal: assert property (@(posedge clk) disable iff (!rst_n)
    (start && !busy) |-> (cfg.in_ch != '0 && cfg.out_ch != '0 && cfg.ksize != '0 &&
                          cfg.ksize <= cfg.in_h && cfg.ksize <= cfg.in_w &&
                          32'(cfg_oh) * 32'(cfg_ow) <= BUF_DEPTH))
    else $error("psp_conv_core: layer does not fit the result buffer");

  a_no_late_start: assert property (@(posedge clk) disable iff (!rst_n)
    ctrl_busy |-> busy);

endmodule

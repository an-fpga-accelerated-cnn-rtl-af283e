// psp_loop_ctrl: loop-nest sequencer of the parallelized sum-pooling
// convolution.
//
// Walks the loops in the reordered nest that moves the output-plane loops
// innermost:  for i (out channel) / for x (in channel) / for y, z (kernel
// row, column) / for j (output column) / for k (output row).  One iteration
// is issued per clock; for each it computes the conv_in, conv_weight and
// conv_out addresses, the result-buffer position j*out_h + k and the output
// channel (bias address), and flags the first and last kernel pass of the
// channel.
//
// Dependency guard: position p of the result buffer is read again one plane
// (out_w*out_h iterations) after it was last read, while its write-back lands
// CCOM cycles after the read. When a plane is smaller than CCOM, the
// sequencer inserts CCOM - plane idle cycles before each pass that reads the
// buffer again, so the effective initiation interval grows only as much as
// the dependency demands. No idle cycles go in at an output-channel boundary,
// since the first pass of a channel does not read the buffer.
//
// Interface: start (one clock, while busy is low) latches cfg; issue is a
// registered record, valid one clock after each iteration is chosen; busy is
// high from the clock after start until the last iteration has been issued;
// stall is high on each inserted idle cycle. Total cycles with issue or idle:
//   out_ch*in_ch*K*K*plane + out_ch*(in_ch*K*K - 1)*max(0, CCOM - plane).
// The loop order and the condition plane >= CCOM follow the reference
// algorithm; the idle-cycle insertion, the CHW/OIHW address formulas and the
// registered issue record are this design's own.
module psp_loop_ctrl
  import psp_pkg::*;
#(
  parameter int unsigned CCOM = C_COM
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  layer_cfg_t cfg,
  output issue_t     issue,
  output logic       busy,
  output logic       stall
);

  layer_cfg_t cfg_q;
  logic       running;
  dim_t       i, x, y, z, j, k;
  addr_t      pos;
  addr_t      bub;

  dim_t  out_h, out_w;
  addr_t plane;
  assign out_h = cfg_q.in_h - cfg_q.ksize + dim_t'(1);
  assign out_w = cfg_q.in_w - cfg_q.ksize + dim_t'(1);
  assign plane = addr_t'(out_h) * addr_t'(out_w);

  logic k_end, j_end, z_end, y_end, x_end, i_end;
  logic plane_end, ch_end, all_end;
  assign k_end     = (k == out_h - dim_t'(1));
  assign j_end     = (j == out_w - dim_t'(1));
  assign z_end     = (z == cfg_q.ksize - dim_t'(1));
  assign y_end     = (y == cfg_q.ksize - dim_t'(1));
  assign x_end     = (x == cfg_q.in_ch - dim_t'(1));
  assign i_end     = (i == cfg_q.out_ch - dim_t'(1));
  assign plane_end = k_end && j_end;
  assign ch_end    = plane_end && z_end && y_end && x_end;
  assign all_end   = ch_end && i_end;

  // Addresses of the current iteration (CHW tensors, OIHW weights).
  issue_t cur;
  always_comb begin
    cur          = '0;
    cur.valid    = 1'b1;
    cur.first    = (x == '0) && (y == '0) && (z == '0);
    cur.last     = x_end && y_end && z_end;
    cur.final_it = all_end;
    cur.in_idx   = (addr_t'(x) * addr_t'(cfg_q.in_h) + addr_t'(k) + addr_t'(y))
                   * addr_t'(cfg_q.in_w) + addr_t'(j) + addr_t'(z);
    cur.w_idx    = ((addr_t'(i) * addr_t'(cfg_q.in_ch) + addr_t'(x))
                   * addr_t'(cfg_q.ksize) + addr_t'(y)) * addr_t'(cfg_q.ksize)
                   + addr_t'(z);
    cur.out_idx  = addr_t'(i) * plane + addr_t'(k) * addr_t'(out_w) + addr_t'(j);
    cur.pos      = pos;
    cur.och      = i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      issue   <= '0;
      stall   <= 1'b0;
      cfg_q   <= '0;
      {i, x, y, z, j, k} <= '0;
      pos     <= '0;
      bub     <= '0;
    end else begin
      issue <= '0;
      stall <= 1'b0;
      if (!running) begin
        if (start) begin
          cfg_q   <= cfg;
          running <= 1'b1;
          {i, x, y, z, j, k} <= '0;
          pos     <= '0;
          bub     <= '0;
        end
      end else if (bub != '0) begin
        bub   <= bub - addr_t'(1);
        stall <= 1'b1;
      end else begin
        issue <= cur;
        pos   <= plane_end ? '0 : pos + addr_t'(1);
        k     <= k_end ? '0 : k + dim_t'(1);
        if (k_end) j <= j_end ? '0 : j + dim_t'(1);
        if (plane_end) begin
          z <= z_end ? '0 : z + dim_t'(1);
          if (z_end) y <= y_end ? '0 : y + dim_t'(1);
          if (z_end && y_end) x <= x_end ? '0 : x + dim_t'(1);
          if (ch_end) i <= i_end ? '0 : i + dim_t'(1);
          if (all_end)
            running <= 1'b0;
          else if (!ch_end && plane < addr_t'(CCOM))
            bub <= addr_t'(CCOM) - plane;
        end
      end
    end
  end

  assign busy = running;

endmodule

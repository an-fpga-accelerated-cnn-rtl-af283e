// tb_psp_conv_core: self-checking test of one convolution + bias + ReLU
// layer. The testbench models the four buffers (one-clock read latency) and
// runs several layer shapes with random inputs, weights and biases: output
// planes at and above C_COM (no idle cycles) and below it (idle cycles
// inserted). Each conv_out word must equal, bit for bit, the conventional
// loop nest evaluated in single precision (each float operation emulated as
// a double operation rounded once to float), and must lie within a tolerance
// of the same loop in double precision; every output address must be written exactly
// once, and the start-to-done time must equal
//   issues + idle cycles + C_COM.
module tb_psp_conv_core;
  import psp_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned MEM = 8192;

  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  layer_cfg_t cfg;
  logic       busy, done, out_we, stall, relu_zero;
  addr_t      in_raddr, w_raddr, b_raddr, out_waddr;
  fp32_t      in_rdata, w_rdata, b_rdata, out_wdata;

  fp32_t in_mem [MEM], w_mem [MEM], b_mem [256], out_mem [MEM];
  int    out_cnt [MEM];
  int    checks = 0, failures = 0, stalls = 0, relu_zeros = 0;

  psp_conv_core #(.BUF_DEPTH(100)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .cfg(cfg), .busy(busy), .done(done),
    .in_raddr(in_raddr), .in_rdata(in_rdata), .w_raddr(w_raddr), .w_rdata(w_rdata),
    .b_raddr(b_raddr), .b_rdata(b_rdata), .out_we(out_we), .out_waddr(out_waddr),
    .out_wdata(out_wdata), .stall(stall), .relu_zero(relu_zero));

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    in_rdata <= in_mem[in_raddr % MEM];
    w_rdata  <= w_mem[w_raddr % MEM];
    b_rdata  <= b_mem[b_raddr % 256];
    if (out_we) begin
      out_mem[out_waddr % MEM] <= out_wdata;
      out_cnt[out_waddr % MEM] <= out_cnt[out_waddr % MEM] + 1;
    end
    if (stall) stalls <= stalls + 1;
    if (relu_zero) relu_zeros <= relu_zeros + 1;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run_layer(input int ic, input int ih, input int iw, input int ks, input int oc);
    int  oh, ow, plane, cycles, exp_cycles;
    real acc, mag, t;
    fp32_t facc;
    oh = ih - ks + 1;
    ow = iw - ks + 1;
    plane = oh * ow;
    for (int n = 0; n < ic * ih * iw; n++) in_mem[n] = rand_fp(120, 127);
    for (int n = 0; n < oc * ic * ks * ks; n++) w_mem[n] = rand_fp(118, 125);
    for (int n = 0; n < oc; n++) b_mem[n] = rand_fp(118, 124);
    for (int n = 0; n < MEM; n++) out_cnt[n] = 0;
    @(negedge clk);
    cfg = '{in_ch: dim_t'(ic), in_h: dim_t'(ih), in_w: dim_t'(iw), ksize: dim_t'(ks), out_ch: dim_t'(oc)};
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;  // clock edges after the one that takes start
    while (!done && cycles < 1000000) begin
      @(negedge clk);
      cycles++;
    end
    exp_cycles = oc * ic * ks * ks * plane
               + oc * (ic * ks * ks - 1) * ((plane < C_COM) ? (C_COM - plane) : 0)
               + C_COM;
    check(cycles == exp_cycles, $sformatf("layer %0dx%0dx%0d k%0d -> %0d: %0d cycles, want %0d",
                                          ic, ih, iw, ks, oc, cycles, exp_cycles));
    // conventional loop nest (output-stationary), in double precision
    for (int i = 0; i < oc; i++)
      for (int r = 0; r < oh; r++)
        for (int c = 0; c < ow; c++) begin
          acc = 0.0;
          mag = 0.0;
          facc = 32'h0;
          for (int x = 0; x < ic; x++)
            for (int y = 0; y < ks; y++)
              for (int z = 0; z < ks; z++) begin
                t = f2r(in_mem[(x * ih + r + y) * iw + c + z]) * f2r(w_mem[((i * ic + x) * ks + y) * ks + z]);
                acc += t;
                facc = r2f(f2r(facc) + f2r(r2f(t)));
                mag += (t < 0.0) ? -t : t;
              end
          facc = r2f(f2r(facc) + f2r(b_mem[i]));
          if (facc[31] || facc[30:0] == 31'd0) facc = 32'h0;
          acc += f2r(b_mem[i]);
          if (acc <= 0.0) acc = 0.0;
          check(out_mem[i * plane + r * ow + c] == facc,
                $sformatf("bit-exact out[%0d][%0d][%0d] = %h want %h", i, r, c,
                          out_mem[i * plane + r * ow + c], facc));
          check(out_cnt[i * plane + r * ow + c] == 1, "one write per output");
          check(close(f2r(out_mem[i * plane + r * ow + c]), acc, 1.0e-5, 1.0e-6 * mag + 1.0e-30),
                $sformatf("out[%0d][%0d][%0d] = %g want %g", i, r, c,
                          f2r(out_mem[i * plane + r * ow + c]), acc));
        end
    check(!busy, "busy after done");
  endtask

  initial begin
    cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_layer(3, 6, 6, 3, 4);    // 4x4 plane = 16, full rate
    run_layer(2, 5, 5, 3, 3);    // 3x3 plane =  9, idle cycles
    run_layer(2, 7, 5, 2, 3);    // 6x4 plane = 24, not square
    run_layer(2, 4, 4, 4, 2);    // 1x1 plane
    run_layer(4, 15, 15, 6, 2);  // first network layer, 10x10 plane = 100
    check(stalls > 0, "idle cycles exercised");
    check(relu_zeros > 0, "ReLU clamping exercised");
    $display("idle cycles %0d, ReLU zeros %0d", stalls, relu_zeros);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

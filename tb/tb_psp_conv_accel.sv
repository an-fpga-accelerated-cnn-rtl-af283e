// tb_psp_conv_accel: end-to-end test of the accelerator at its default sizes.
//
// Plays the processor's part for one inference of the Q-network's main
// layer: builds the 15x15 grid state with four channels (agent at (2,2),
// goal at (10,10), random obstacles, boundary ring), then runs the four
// convolution + ReLU layers (kernels 6, 4, 3, 2; 32 output channels each)
// through the host port, copying each output map back into conv_in for the
// next layer, and ends with the 4x4x32 feature map. Weights and biases are
// random and scaled by fan-in. Every layer's output must equal, bit for bit,
// the conventional loop nest evaluated in single precision on the same
// input, and lie close to the same loop in double precision; the final map is also compared with a reference chained entirely
// in double precision, and every layer's cycle count (last_cycles) must be
// out_ch*in_ch*K*K*plane + C_COM, i.e. one multiply-accumulate per clock.
// A further small layer with a 3x3 output plane exercises the idle-cycle
// insertion for planes smaller than C_COM. Events counted, each of which
// must happen: full-rate layers, idle cycles, ReLU clamping, multi-channel
// result-buffer restarts.
module tb_psp_conv_accel;
  import psp_pkg::*;
  import fp_ref_pkg::*;

  localparam int G  = 15;  // grid size
  localparam int CH = 32;  // channels of every layer output

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        host_we = 1'b0, start = 1'b0;
  buf_sel_t    host_sel = SEL_IN;
  addr_t       host_waddr = '0, host_raddr = '0;
  fp32_t       host_wdata = '0, host_rdata;
  layer_cfg_t  cfg = '0;
  logic        busy, done, stall, relu_zero;
  logic [31:0] last_cycles;

  int checks = 0, failures = 0;
  int n_stall = 0, n_relu_zero = 0, n_full_rate = 0, n_restart = 0;

  psp_conv_accel dut (
    .clk(clk), .rst_n(rst_n), .host_we(host_we), .host_sel(host_sel),
    .host_waddr(host_waddr), .host_wdata(host_wdata), .host_raddr(host_raddr),
    .host_rdata(host_rdata), .start(start), .cfg(cfg), .busy(busy), .done(done),
    .last_cycles(last_cycles), .stall(stall), .relu_zero(relu_zero));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (stall) n_stall++;
    if (relu_zero) n_relu_zero++;
  end

  initial begin
    #200000000;
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

  task automatic host_write(input buf_sel_t sel, input int addr, input fp32_t data);
    @(negedge clk);
    host_we = 1'b1;
    host_sel = sel;
    host_waddr = addr_t'(addr);
    host_wdata = data;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic host_read(input int addr, output fp32_t data);
    @(negedge clk);
    host_raddr = addr_t'(addr);
    @(negedge clk);
    data = host_rdata;
  endtask

  // Random weight of magnitude about 2^-e.
  function automatic fp32_t rand_w(input int e);
    return rand_fp(127 - e - 1, 127 - e);
  endfunction

  fp32_t fin [];      // current layer input (float words, as in conv_in)
  fp32_t fw [];       // weights
  fp32_t fb [];       // biases
  fp32_t fout [];     // outputs read back
  real   dchain [];   // double-only reference chain, input of current layer
  real   dnext [];

  // Runs one layer through the accelerator and checks it.
  task automatic run_layer(input int ic, input int ih, input int iw, input int ks,
                           input int oc, input bit chained);
    int    oh, ow, plane, exp_cycles;
    real   acc, mag, t, dacc;
    fp32_t facc;
    fp32_t word;
    oh = ih - ks + 1;
    ow = iw - ks + 1;
    plane = oh * ow;
    fw = new[oc * ic * ks * ks];
    fb = new[oc];
    for (int n = 0; n < fw.size(); n++) fw[n] = rand_w((ic * ks * ks > 64) ? 4 : 3);
    for (int n = 0; n < oc; n++) begin
      fb[n] = rand_w(4);
      fb[n][31] = 1'b0;
    end
    for (int n = 0; n < ic * ih * iw; n++) host_write(SEL_IN, n, fin[n]);
    for (int n = 0; n < fw.size(); n++) host_write(SEL_W, n, fw[n]);
    for (int n = 0; n < oc; n++) host_write(SEL_BIAS, n, fb[n]);
    @(negedge clk);
    cfg = '{in_ch: dim_t'(ic), in_h: dim_t'(ih), in_w: dim_t'(iw), ksize: dim_t'(ks), out_ch: dim_t'(oc)};
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    @(negedge clk);
    exp_cycles = oc * ic * ks * ks * plane
               + oc * (ic * ks * ks - 1) * ((plane < C_COM) ? (C_COM - plane) : 0)
               + C_COM;
    check(last_cycles == 32'(exp_cycles),
          $sformatf("layer k%0d: %0d cycles, want %0d", ks, last_cycles, exp_cycles));
    if (plane >= C_COM && last_cycles == 32'(oc * ic * ks * ks * plane + C_COM)) n_full_rate++;
    if (oc > 1) n_restart += oc - 1;
    $display("layer %0dx%0dx%0d k%0d -> %0dx%0dx%0d: %0d cycles", ic, ih, iw, ks, oc, oh, ow,
             last_cycles);
    fout = new[oc * plane];
    for (int n = 0; n < oc * plane; n++) begin
      host_read(n, word);
      fout[n] = word;
    end
    dnext = new[oc * plane];
    for (int i = 0; i < oc; i++)
      for (int r = 0; r < oh; r++)
        for (int c = 0; c < ow; c++) begin
          acc = 0.0;
          mag = 0.0;
          facc = 32'h0;
          dacc = 0.0;
          for (int x = 0; x < ic; x++)
            for (int y = 0; y < ks; y++)
              for (int z = 0; z < ks; z++) begin
                t = f2r(fin[(x * ih + r + y) * iw + c + z]) * f2r(fw[((i * ic + x) * ks + y) * ks + z]);
                acc += t;
                facc = r2f(f2r(facc) + f2r(r2f(t)));
                mag += (t < 0.0) ? -t : t;
                if (chained)
                  dacc += dchain[(x * ih + r + y) * iw + c + z] * f2r(fw[((i * ic + x) * ks + y) * ks + z]);
              end
          acc += f2r(fb[i]);
          facc = r2f(f2r(facc) + f2r(fb[i]));
          if (facc[31] || facc[30:0] == 31'd0) facc = 32'h0;
          dacc += f2r(fb[i]);
          if (acc <= 0.0) acc = 0.0;
          if (dacc <= 0.0) dacc = 0.0;
          dnext[i * plane + r * ow + c] = dacc;
          check(fout[i * plane + r * ow + c] == facc,
                $sformatf("bit-exact k%0d out[%0d][%0d][%0d] = %h want %h", ks, i, r, c,
                          fout[i * plane + r * ow + c], facc));
          check(close(f2r(fout[i * plane + r * ow + c]), acc, 1.0e-5, 1.0e-6 * mag + 1.0e-30),
                $sformatf("k%0d out[%0d][%0d][%0d] = %g want %g", ks, i, r, c,
                          f2r(fout[i * plane + r * ow + c]), acc));
        end
    if (chained) dchain = dnext;
    fin = fout;
  endtask

  initial begin
    int ax, ay, gx, gy, nonzero;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 15x15 grid state: agent, goal, obstacles (link outages), boundaries
    fin = new[4 * G * G];
    dchain = new[4 * G * G];
    ax = 2; ay = 2; gx = 10; gy = 10;
    for (int r = 0; r < G; r++)
      for (int c = 0; c < G; c++) begin
        bit border;
        border = (r == 0 || c == 0 || r == G - 1 || c == G - 1);
        fin[0 * G * G + r * G + c] = (r == ay && c == ax) ? 32'h3f800000 : 32'h0;
        fin[1 * G * G + r * G + c] = (r == gy && c == gx) ? 32'h3f800000 : 32'h0;
        fin[2 * G * G + r * G + c] = (!border && !(r == ay && c == ax) && !(r == gy && c == gx)
                                      && $urandom_range(0, 9) == 0) ? 32'h3f800000 : 32'h0;
        fin[3 * G * G + r * G + c] = border ? 32'h3f800000 : 32'h0;
      end
    for (int n = 0; n < 4 * G * G; n++) dchain[n] = f2r(fin[n]);

    run_layer(4,  15, 15, 6, CH, 1'b1);  // -> 10x10x32
    run_layer(CH, 10, 10, 4, CH, 1'b1);  // ->  7x7x32
    run_layer(CH,  7,  7, 3, CH, 1'b1);  // ->  5x5x32
    run_layer(CH,  5,  5, 2, CH, 1'b1);  // ->  4x4x32

    // final 4x4x32 map against the all-double chain
    nonzero = 0;
    for (int n = 0; n < CH * 16; n++) begin
      if (f2r(fin[n]) > 0.0) nonzero++;
      check(close(f2r(fin[n]), dchain[n], 1.0e-3, 1.0e-4),
            $sformatf("final[%0d] = %g, double chain %g", n, f2r(fin[n]), dchain[n]));
    end
    $display("final feature map: %0d of %0d features above zero", nonzero, CH * 16);
    check(nonzero > 0, "final map not all zero");

    // a small layer whose 3x3 plane is below C_COM: idle cycles
    fin = new[2 * 5 * 5];
    for (int n = 0; n < fin.size(); n++) fin[n] = rand_fp(125, 127);
    run_layer(2, 5, 5, 3, 3, 1'b0);

    check(n_full_rate == 4, $sformatf("full-rate layers %0d", n_full_rate));
    check(n_stall > 0, "idle-cycle insertion never happened");
    check(n_relu_zero > 0, "ReLU clamping never happened");
    check(n_restart > 0, "result-buffer restart never happened");
    $display("events: full-rate layers %0d, idle cycles %0d, ReLU zeros %0d, channel restarts %0d",
             n_full_rate, n_stall, n_relu_zero, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

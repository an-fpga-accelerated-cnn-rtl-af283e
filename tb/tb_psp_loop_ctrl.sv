// tb_psp_loop_ctrl: self-checking test of the loop-nest sequencer. For
// several layer shapes, including output planes smaller than C_COM, it
// checks every issued record (addresses, buffer position, first/last/final
// flags) against a software walk of the reordered loop nest, checks that
// idle cycles appear exactly where a pass would re-read the result buffer
// too early and nowhere else, and checks the total cycle count.
module tb_psp_loop_ctrl;
  import psp_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  layer_cfg_t cfg;
  issue_t     issue;
  logic       busy, stall;
  int         checks = 0, failures = 0, stalls_seen = 0;

  psp_loop_ctrl #(.CCOM(C_COM)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .cfg(cfg),
    .issue(issue), .busy(busy), .stall(stall));

  always #5 clk = ~clk;

  initial begin
    #2000000;
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
    int oh, ow, plane, n_issue, n_stall, cycles, exp_cycles, last_pos_cycle[int];
    int i, x, y, z, j, k;
    oh = ih - ks + 1;
    ow = iw - ks + 1;
    plane = oh * ow;
    @(negedge clk);
    cfg = '{in_ch: dim_t'(ic), in_h: dim_t'(ih), in_w: dim_t'(iw), ksize: dim_t'(ks), out_ch: dim_t'(oc)};
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    i = 0; x = 0; y = 0; z = 0; j = 0; k = 0;
    n_issue = 0;
    n_stall = 0;
    cycles = 0;  // the first issue appears one clock after start
    while (1) begin
      if (issue.valid) begin
        automatic int pos = j * oh + k;
        check(issue.in_idx == addr_t'((x * ih + k + y) * iw + j + z), "in_idx");
        check(issue.w_idx == addr_t'(((i * ic + x) * ks + y) * ks + z), "w_idx");
        check(issue.out_idx == addr_t'(i * plane + k * ow + j), "out_idx");
        check(issue.pos == addr_t'(pos), $sformatf("pos %0d vs %0d", issue.pos, pos));
        check(issue.och == dim_t'(i), "och");
        check(issue.first == (x == 0 && y == 0 && z == 0), "first");
        check(issue.last == (x == ic - 1 && y == ks - 1 && z == ks - 1), "last");
        // a position must not be read again before the previous write-back
        if (!issue.first && last_pos_cycle.exists(pos))
          check(cycles - last_pos_cycle[pos] >= C_COM, "dependency distance");
        last_pos_cycle[pos] = cycles;
        n_issue++;
        check(issue.final_it == (n_issue == oc * ic * ks * ks * plane), "final");
        if (issue.final_it) break;
        // advance the software loop nest
        k++;
        if (k == oh) begin k = 0; j++; end
        if (j == ow) begin
          j = 0; z++;
          if (z == ks) begin z = 0; y++; end
          if (y == ks) begin y = 0; x++; end
          if (x == ic) begin x = 0; i++; end
        end
      end
      if (stall) begin
        n_stall++;
        stalls_seen++;
      end
      @(negedge clk);
      cycles++;
      if (cycles > 400000) break;
    end
    exp_cycles = oc * ic * ks * ks * plane
               + oc * (ic * ks * ks - 1) * ((plane < C_COM) ? (C_COM - plane) : 0);
    check(n_issue == oc * ic * ks * ks * plane, "issue count");
    check(cycles == exp_cycles, $sformatf("cycles %0d want %0d", cycles, exp_cycles));
    check(n_stall == exp_cycles - n_issue, "stall count");
    @(negedge clk);
    check(!busy, "busy after last issue");
  endtask

  initial begin
    cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_layer(3, 6, 6, 3, 2);    // 4x4 plane: 16 >= 14
    run_layer(2, 5, 5, 3, 3);    // 3x3 plane: stalls
    run_layer(2, 7, 5, 2, 2);    // 6x4 plane, not square
    run_layer(1, 3, 3, 3, 2);    // 1x1 plane: 13 idle cycles per pass
    run_layer(4, 15, 15, 6, 2);  // first network layer, 2 output channels
    if (stalls_seen == 0) begin
      failures++;
      $display("no stall exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

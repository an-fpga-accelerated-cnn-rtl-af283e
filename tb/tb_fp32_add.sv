// tb_fp32_add: self-checking test of the pipelined single-precision adder.
// Streams one operand pair per clock: random operands with close exponents
// (heavy cancellation), far exponents (alignment and sticky bits), exact
// negatives, zeros and infinities. Each result is checked bit for bit,
// exactly ADD_LAT = 4 clocks after its operands, against the double-precision
// sum rounded once to single precision.
module tb_fp32_add;
  import psp_pkg::*;
  import fp_ref_pkg::*;

  localparam int N = 6000;

  logic  clk = 1'b0;
  fp32_t a, b, y;
  int    checks = 0, failures = 0;
  fp32_t expq [N + 8];

  fp32_add dut (.clk(clk), .a(a), .b(b), .y(y));

  always #5 clk = ~clk;

  initial begin
    #300000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp32_t ref_add(input fp32_t x, input fp32_t z);
    bit xi, zi;
    real s;
    xi = x[30:23] == 8'hff;
    zi = z[30:23] == 8'hff;
    if (xi && zi && x[31] != z[31]) return FP32_QNAN;
    if (xi) return x;
    if (zi) return z;
    s = f2r(x) + f2r(z);
    if (s == 0.0) return {x[31] & z[31], 31'd0};
    return r2f(s);
  endfunction

  initial begin
    fp32_t ta, tb_;
    int    mode;
    a = '0;
    b = '0;
    for (int n = 0; n < N + ADD_LAT; n++) begin
      @(negedge clk);
      if (n >= ADD_LAT) begin
        checks++;
        if (y !== expq[n - ADD_LAT]) begin
          failures++;
          if (failures < 10)
            $display("mismatch #%0d: got %h want %h", n - ADD_LAT, y, expq[n - ADD_LAT]);
        end
      end
      if (n < N) begin
        mode = n % 5;
        case (n)
          0: begin ta = 32'h3f800000; tb_ = 32'h3f800000; end  // 1 + 1
          1: begin ta = 32'h3f800000; tb_ = 32'hbf800000; end  // 1 - 1 = +0
          2: begin ta = 32'h80000000; tb_ = 32'h80000000; end  // -0 + -0
          3: begin ta = 32'h7f800000; tb_ = 32'hff800000; end  // inf - inf
          4: begin ta = 32'hff800000; tb_ = 32'h3f800000; end  // -inf + 1
          5: begin ta = 32'h4b800000; tb_ = 32'h3f800000; end  // 2^24 + 1 (tie)
          6: begin ta = 32'h7f7fffff; tb_ = 32'h7f7fffff; end  // overflow
          default: begin
            ta = rand_fp(100, 154);
            case (mode)
              0: tb_ = rand_fp(int'(ta[30:23]) - 1, int'(ta[30:23]) + 1);
              1: tb_ = rand_fp(int'(ta[30:23]) - 30, int'(ta[30:23]) - 20);
              2: tb_ = {~ta[31], ta[30:0]};
              3: begin
                   tb_ = ta;
                   tb_[31] = ~ta[31];
                   tb_[2:0] = 3'($urandom);
                 end
              default: tb_ = rand_fp(90, 164);
            endcase
          end
        endcase
        a = ta;
        b = tb_;
        expq[n] = ref_add(ta, tb_);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

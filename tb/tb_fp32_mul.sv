// tb_fp32_mul: self-checking test of the pipelined single-precision
// multiplier. Streams one operand pair per clock (random normals over a wide
// exponent range, plus zero, infinity, NaN and overflow cases) and checks
// every result, bit for bit, exactly MUL_LAT = 3 clocks after its operands,
// against the double-precision product rounded once to single precision.
module tb_fp32_mul;
  import psp_pkg::*;
  import fp_ref_pkg::*;

  localparam int N = 4000;

  logic  clk = 1'b0;
  fp32_t a, b, y;
  int    checks = 0, failures = 0;
  fp32_t expq [N + 8];

  fp32_mul dut (.clk(clk), .a(a), .b(b), .y(y));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp32_t ref_mul(input fp32_t x, input fp32_t z);
    bit xn, zn, xi, zi, x0, z0;
    xn = x[30:23] == 8'hff && x[22:0] != 0;
    zn = z[30:23] == 8'hff && z[22:0] != 0;
    xi = x[30:23] == 8'hff && x[22:0] == 0;
    zi = z[30:23] == 8'hff && z[22:0] == 0;
    x0 = x[30:23] == 0;
    z0 = z[30:23] == 0;
    if (xn || zn || (xi && z0) || (zi && x0)) return FP32_QNAN;
    if (xi || zi) return {x[31] ^ z[31], 8'hff, 23'd0};
    if (x0 || z0) return {x[31] ^ z[31], 31'd0};
    return r2f(f2r(x) * f2r(z));
  endfunction

  initial begin
    fp32_t ta, tb_;
    a = '0;
    b = '0;
    for (int n = 0; n < N + MUL_LAT; n++) begin
      @(negedge clk);
      if (n >= MUL_LAT) begin
        checks++;
        if (y !== expq[n - MUL_LAT]) begin
          failures++;
          if (failures < 10)
            $display("mismatch #%0d: got %h want %h", n - MUL_LAT, y, expq[n - MUL_LAT]);
        end
      end
      if (n < N) begin
        case (n)
          0: begin ta = 32'h3f800000; tb_ = 32'h40000000; end  // 1 * 2
          1: begin ta = 32'h00000000; tb_ = 32'h40490fdb; end  // 0 * pi
          2: begin ta = 32'h7f800000; tb_ = 32'hbf800000; end  // inf * -1
          3: begin ta = 32'h7f800000; tb_ = 32'h00000000; end  // inf * 0
          4: begin ta = 32'h7fc00001; tb_ = 32'h3f800000; end  // NaN
          5: begin ta = 32'h7f000000; tb_ = 32'h7f000000; end  // overflow
          6: begin ta = 32'h3fffffff; tb_ = 32'h3fffffff; end  // round carry
          default: begin
            if (n % 2 == 0) begin
              ta = rand_fp(1, 254);
              tb_ = rand_fp(127 - int'(ta[30:23]) + 1 > 1 ? 127 - int'(ta[30:23]) + 1 : 1,
                            127 - int'(ta[30:23]) + 253 < 254 ? 127 - int'(ta[30:23]) + 253 : 254);
            end else begin
              ta = rand_fp(100, 154);
              tb_ = rand_fp(100, 154);
            end
          end
        endcase
        a = ta;
        b = tb_;
        expq[n] = ref_mul(ta, tb_);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

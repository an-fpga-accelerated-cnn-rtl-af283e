// tb_psum_buffer: self-checking test of the result buffer. Random reads and
// write-backs against a shadow array; a read with rd_clear must return +0.0
// whatever is stored, a read of the position written in the same clock
// returns the old value, and data appear one clock after the read address.
module tb_psum_buffer;
  import psp_pkg::*;

  localparam int unsigned DEPTH = 100;

  logic  clk = 1'b0;
  addr_t rd_addr, wr_addr;
  logic  rd_clear, we;
  fp32_t rd_data, wr_data;
  fp32_t shadow [DEPTH];
  int    checks = 0, failures = 0, clears = 0;

  psum_buffer #(.DEPTH(DEPTH)) dut (
    .clk(clk), .rd_addr(rd_addr), .rd_clear(rd_clear), .rd_data(rd_data),
    .we(we), .wr_addr(wr_addr), .wr_data(wr_data));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp32_t want;
    rd_addr = '0;
    rd_clear = 1'b0;
    we = 1'b0;
    wr_addr = '0;
    wr_data = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1;
      wr_addr = addr_t'(a);
      wr_data = 32'h3f800000 + 32'(a);
      shadow[a] = wr_data;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      rd_addr = addr_t'($urandom_range(0, DEPTH - 1));
      rd_clear = ($urandom_range(0, 3) == 0);
      we = 1'($urandom);
      wr_addr = (n % 4 == 0) ? rd_addr : addr_t'($urandom_range(0, DEPTH - 1));
      wr_data = $urandom;
      want = rd_clear ? FP32_ZERO : shadow[rd_addr];
      if (rd_clear) clears++;
      @(posedge clk);
      if (we) shadow[wr_addr] = wr_data;
      @(negedge clk);
      checks++;
      if (rd_data !== want) begin
        failures++;
        if (failures < 10) $display("pos %0d clear %0b: got %h want %h", rd_addr, rd_clear, rd_data, want);
      end
      we = 1'b0;
    end
    if (clears == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

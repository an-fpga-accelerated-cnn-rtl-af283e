// tb_sdp_ram: self-checking test of the on-chip buffer. Writes random words
// to random addresses while reading others, and checks each read one clock
// after its address against a shadow array, including a read of the address
// written in the same clock (which must return the old word) and a read
// beyond the depth (which returns zero).
module tb_sdp_ram;
  localparam int unsigned DEPTH = 200;

  logic        clk = 1'b0;
  logic        we;
  logic [15:0] waddr, raddr;
  logic [31:0] wdata, rdata;
  logic [31:0] shadow [DEPTH];
  int          checks = 0, failures = 0;

  sdp_ram #(.WIDTH(32), .DEPTH(DEPTH), .ADDR_W(16)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] want;
    we = 1'b0;
    raddr = '0;
    waddr = '0;
    wdata = '0;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1;
      waddr = 16'(a);
      wdata = $urandom;
      shadow[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    // mixed traffic
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      raddr = 16'($urandom_range(0, DEPTH - 1));
      if (n % 7 == 0) raddr = 16'(DEPTH + 3);
      we = 1'($urandom);
      waddr = (n % 5 == 0) ? raddr : 16'($urandom_range(0, DEPTH - 1));
      wdata = $urandom;
      want = (raddr < DEPTH) ? shadow[raddr] : 32'd0;
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      @(negedge clk);
      checks++;
      if (rdata !== want) begin
        failures++;
        if (failures < 10) $display("addr %0d: got %h want %h", raddr, rdata, want);
      end
      we = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// sdp_ram: simple dual-port on-chip buffer (one write port, one read port).
//
// Holds the arrays the processor hands to the accelerator and gets back:
// conv_in, conv_weight, conv_bias and conv_out. Written as an array so a
// synthesis tool maps it to block RAM. The read is synchronous: rdata is the
// word at raddr one clock after raddr is presented. A read of the address
// being written in the same cycle returns the old word (read-before-write).
// The contents are not reset; whatever is read must have been written first.
// That the arrays live in on-chip block RAM follows the reference design; the
// port arrangement and read-before-write behaviour are this design's choice.
module sdp_ram #(
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WIDTH-1:0]  wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [WIDTH-1:0]  rdata
);

  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (waddr < ADDR_W'(DEPTH)))
      mem[waddr[IW-1:0]] <= wdata;
    rdata <= (raddr < ADDR_W'(DEPTH)) ? mem[raddr[IW-1:0]] : '0;
  end

endmodule

// memoire: on-chip image memory.
//
// One grey pixel of PIX_W bits per word, DEPTH = 200 x 200 words, pixel (x, y) at
// address y*W + x. It has one synchronous write port, through which the image is
// loaded, and one synchronous read port used by the display chain, the shape of a
// simple dual-port block RAM. The design configures a vendor block-memory core to the
// image size with 8-bit cells and preloads the road image in it; here the memory is a
// plain array, and the image is written through the load port instead of being built
// into the bitstream.
//
// Interface: clk; we, waddr, wdata (write port); raddr, rdata (read port).
// Timing: a write lands at the clock edge; rdata shows the word at raddr one cycle
//   after raddr is presented (read-before-write when both ports hit one address).
module memoire #(
  parameter int unsigned DEPTH  = 200 * 200,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule

// montage: Laplacian edge detection of a road image shown live on a VGA monitor.
//
// A 200x200 grey image sits in on-chip memory. While the monitor is scanned at 640x480,
// the playback block reads the image one line and one pixel ahead of the beam, the
// Laplacian filter convolves it with a 3x3 mask using two line buffers, the threshold
// stage marks the pixels whose Laplacian value reaches S as edges, and the mux sends the
// original, the edge image or the Laplacian grey image to the VGA output, centred on the
// screen and black around it. Every stage takes one pixel per clock, so the processed
// image is produced at the speed of the display with no frame buffer for the result.
//
//   clk_in -> horloge_25mhz -> pix_clk (25 MHz) for everything below
//   synchro (beam position, sync) -> read_mem -> memoire -> laplacian_filter -> binarize
//     -> pixel_mux -> ecran_vga -> VGA pins
//
// The chain of blocks follows the design's block diagram (clock divider, sync generator,
// playback, memory, mux, VGA output) and its algorithm; the exact timing, the image
// position and the load port are choices made here.
//
// Interface:
//   clk_in (100 MHz board clock), rst (active high, held for at least 8 clk_in cycles);
//   pix_clk: the 25 MHz clock of all other ports;
//   load_we/load_addr/load_data: writes image pixel (x, y) at address y*200 + x;
//   show (0 original, 1 edges, 2 Laplacian, 3 blank), threshold (S);
//   vga_red[2:0], vga_green[2:0], vga_blue[1:0], vga_hsync_n, vga_vsync_n.
// Timing: the colour of screen pixel (h, v) appears at the pins one pix_clk cycle after
//   synchro's counters show (h, v), together with that pixel's sync levels.
module montage
  import lap_pkg::*;
#(
  parameter mask_e MASK = LAP4
) (
  input  logic        clk_in,
  input  logic        rst,
  output logic        pix_clk,
  input  logic        load_we,
  input  logic [15:0] load_addr,
  input  logic [7:0]  load_data,
  input  logic [1:0]  show,
  input  logic [7:0]  threshold,
  output logic [2:0]  vga_red,
  output logic [2:0]  vga_green,
  output logic [1:0]  vga_blue,
  output logic        vga_hsync_n,
  output logic        vga_vsync_n
);
  localparam int unsigned AW = $clog2(IMG_W * IMG_H);

  // ---------------- clock and reset ----------------
  logic clk;
  horloge_25mhz #(.DIV(4)) u_clk (.clk_in(clk_in), .clk_out(clk));
  assign pix_clk = clk;

  logic [1:0] rst_sync;
  logic       rst_p;
  always_ff @(posedge clk) rst_sync <= {rst_sync[0], rst};
  assign rst_p = rst_sync[1] | rst;

  // ---------------- raster ----------------
  coord_t hcount, vcount;
  logic   active, hsync_n, vsync_n, frame_start;

  synchro u_sync (
    .clk(clk), .rst(rst_p),
    .hcount(hcount), .vcount(vcount), .active(active),
    .hsync_n(hsync_n), .vsync_n(vsync_n), .frame_start(frame_start)
  );

  // ---------------- playback and memory ----------------
  logic [AW-1:0] raddr;
  logic          tag_valid, tag_pad;
  coord_t        tag_x, tag_y;
  pix_t          rdata;

  read_mem u_rd (
    .clk(clk), .rst(rst_p), .hcount(hcount), .vcount(vcount),
    .raddr(raddr), .tag_valid(tag_valid), .tag_pad(tag_pad), .tag_x(tag_x), .tag_y(tag_y)
  );

  memoire #(.DEPTH(IMG_W * IMG_H), .DATA_W(PIX_W)) u_mem (
    .clk(clk),
    .we(load_we), .waddr(load_addr[AW-1:0]), .wdata(load_data),
    .raddr(raddr), .rdata(rdata)
  );

  // ---------------- algorithm ----------------
  px_t lap, bin;

  laplacian_filter #(.MASK(MASK)) u_lap (
    .clk(clk), .rst(rst_p),
    .in_valid(tag_valid), .in_pad(tag_pad), .in_x(tag_x), .in_y(tag_y), .in_pix(rdata),
    .out(lap)
  );

  binarize u_bin (.clk(clk), .rst(rst_p), .in(lap), .s(threshold), .out(bin));

  // ---------------- display ----------------
  logic mux_valid;
  pix_t mux_grey;

  pixel_mux u_mux (
    .clk(clk), .rst(rst_p), .in(bin), .sel(show_e'(show)),
    .valid(mux_valid), .grey(mux_grey)
  );

  ecran_vga u_vga (
    .clk(clk), .rst(rst_p),
    .active(active), .hsync_n(hsync_n), .vsync_n(vsync_n),
    .pix_valid(mux_valid), .pix_grey(mux_grey),
    .red(vga_red), .green(vga_green), .blue(vga_blue),
    .hsync_n_o(vga_hsync_n), .vsync_n_o(vga_vsync_n)
  );

  // The pixel leaving the threshold stage is shown MUX_LAT cycles later, when the beam
  // has reached its column.
  property p_aligned;
    @(posedge clk) disable iff (rst_p)
      bin.valid |-> (int'(bin.x) + int'((H_ACTIVE - IMG_W) / 2) == int'(hcount) + int'(MUX_LAT)) &&
                    (int'(bin.y) + int'((V_ACTIVE - IMG_H) / 2) == int'(vcount) );
  endproperty
  a_aligned: assert property (p_aligned);
endmodule

// ecran_vga: VGA output stage.
//
// Drives the connector's 3-bit red, 3-bit green and 2-bit blue colour signals and the two
// sync lines, the widths the design gives. A grey pixel g becomes red = g[7:5],
// green = g[7:5], blue = g[7:6], the top bits of each channel, so that grey stays grey.
// Outside the image (pix_valid = 0) and during blanking (active = 0) all colour bits are
// 0, as a VGA monitor requires. The grey-to-RGB mapping and the black surround are
// choices made here; the design's images are grey.
//
// Interface: active, hsync_n, vsync_n from synchro; pix_valid/pix_grey from pixel_mux, for
//   the same beam position; red/green/blue/hsync_n_o/vsync_n_o to the pins.
// Timing: everything is registered once, so colour and sync stay aligned at the pins.
module ecran_vga
  import lap_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       active,
  input  logic       hsync_n,
  input  logic       vsync_n,
  input  logic       pix_valid,
  input  pix_t       pix_grey,
  output logic [2:0] red,
  output logic [2:0] green,
  output logic [1:0] blue,
  output logic       hsync_n_o,
  output logic       vsync_n_o
);
  logic show;
  assign show = active && pix_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      red       <= '0;
      green     <= '0;
      blue      <= '0;
      hsync_n_o <= 1'b1;
      vsync_n_o <= 1'b1;
    end else begin
      red       <= show ? pix_grey[7:5] : 3'd0;
      green     <= show ? pix_grey[7:5] : 3'd0;
      blue      <= show ? pix_grey[7:6] : 2'd0;
      hsync_n_o <= hsync_n;
      vsync_n_o <= vsync_n;
    end
  end
endmodule

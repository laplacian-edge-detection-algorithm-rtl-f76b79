// read_mem: memory playback, placing the W x H image at (X0, Y0) on the screen.
//
// The image is smaller than the screen, so this block turns the beam position into
// memory addresses. Because the 3x3 filter downstream needs the pixel to the right of and
// the line below the one being shown, and because the pipeline between the memory and the
// VGA pins is LEAD cycles deep, it requests image pixel
//     xi = hcount + LEAD + 1 - X0,   yi = vcount + 1 - Y0
// i.e. one line and one pixel ahead of the beam, plus the pipeline depth. It walks
// xi over 0..W and yi over 0..H: the extra column xi = W and the extra line yi = H lie
// outside the image and are sent as padding (no read, pixel 0) so that the filter can
// finish the last column and the last line. The block's role follows the design; the
// read-ahead scheme and the padding are this implementation's.
//
// Interface: hcount/vcount from synchro; raddr to memoire; tag (valid, pad, x, y) for the
//   word memoire returns.
// Timing: raddr is registered (one cycle after hcount/vcount); tag is registered once
//   more so that it arrives in the same cycle as memoire's rdata (RD_LAT = 2).
module read_mem
  import lap_pkg::*;
#(
  parameter int unsigned W      = IMG_W,
  parameter int unsigned H      = IMG_H,
  parameter int unsigned X0     = (H_ACTIVE - IMG_W) / 2,  // left column of the image
  parameter int unsigned Y0     = (V_ACTIVE - IMG_H) / 2,  // top line of the image
  parameter int unsigned LEAD_C = LEAD,
  parameter int unsigned ADDR_W = $clog2(W * H)
) (
  input  logic              clk,
  input  logic              rst,
  input  coord_t            hcount,
  input  coord_t            vcount,
  output logic [ADDR_W-1:0] raddr,
  output logic              tag_valid,
  output logic              tag_pad,
  output coord_t            tag_x,
  output coord_t            tag_y
);
  int   xi, yi;
  logic want, pad;

  always_comb begin
    xi   = int'(hcount) + int'(LEAD_C) + 1 - int'(X0);
    yi   = int'(vcount) + 1 - int'(Y0);
    want = (xi >= 0) && (xi <= int'(W)) && (yi >= 0) && (yi <= int'(H));
    pad  = (xi == int'(W)) || (yi == int'(H));
  end

  // stage 1: address to the memory, tag held alongside
  logic   s1_valid, s1_pad;
  coord_t s1_x, s1_y;

  always_ff @(posedge clk) begin
    if (rst) begin
      raddr    <= '0;
      s1_valid <= 1'b0;
      s1_pad   <= 1'b0;
      s1_x     <= '0;
      s1_y     <= '0;
    end else begin
      raddr    <= (want && !pad) ? ADDR_W'(yi * int'(W) + xi) : '0;
      s1_valid <= want;
      s1_pad   <= pad;
      s1_x     <= coord_t'(xi);
      s1_y     <= coord_t'(yi);
    end
  end

  // stage 2: tag lines up with the memory's registered read data
  always_ff @(posedge clk) begin
    if (rst) begin
      tag_valid <= 1'b0;
      tag_pad   <= 1'b0;
      tag_x     <= '0;
      tag_y     <= '0;
    end else begin
      tag_valid <= s1_valid;
      tag_pad   <= s1_pad;
      tag_x     <= s1_x;
      tag_y     <= s1_y;
    end
  end

  initial assert (X0 >= LEAD_C + 1 && Y0 >= 1)
    else $error("read_mem: the image must start at least LEAD+1 pixels and one line into the screen");
endmodule

// laplacian_filter: streaming 3x3 Laplacian convolution, one result per clock.
//
// Pixels arrive in raster order, each with its image coordinates. Two line buffers keep
// the two previous lines, indexed by x, so that every arriving pixel completes one
// 3-pixel column (line y-2, line y-1, line y) of a sliding 3x3 window held in registers.
// When the pixel at (x, y) arrives, the window is centred on (x-1, y-1); that centre is
// what the block outputs. With the design's mask
//        0  1  0
//        1 -4  1          I = f(x+1,y) + f(x-1,y) + f(x,y+1) + f(x,y-1) - 4 f(x,y)
//        0  1  0
// the sum is the discrete Laplacian. The other three masks the design lists can be
// chosen with MASK. The design keeps the result as a grey-level image; this block clips
// the signed sum to 0..255 to obtain that image I_M (negative responses become 0, large
// ones saturate). Centres on the image border, whose window would leave the image, give
// I_M = 0: the design does not say how it treats the border, this is a choice made here.
//
// The caller must send one extra column (x = W) and one extra line (y = H) marked as
// padding, so that the last column and line of the image are produced; read_mem does so.
//
// Interface: in_valid/in_pad/in_x/in_y/in_pix (stream in; in_pad forces the pixel to 0);
//   out (px_t: centre coordinates, centre pixel, I_M; is_edge left 0 for the threshold stage).
// Timing: fully pipelined, FILT_LAT = 2 cycles from input to out, a new pixel every cycle.
module laplacian_filter
  import lap_pkg::*;
#(
  parameter int unsigned W    = IMG_W,
  parameter int unsigned H    = IMG_H,
  parameter mask_e       MASK = LAP4
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  logic   in_pad,
  input  coord_t in_x,
  input  coord_t in_y,
  input  pix_t   in_pix,
  output px_t    out
);
  // ---------------- stage A: line buffers and window ----------------
  localparam int unsigned XW = $clog2(W + 1);

  pix_t lb_prev1 [W + 1];   // line y-1
  pix_t lb_prev2 [W + 1];   // line y-2
  pix_t win [3][3];         // win[row][col]; row 0 = top, col 2 = newest

  logic [XW-1:0] xa;        // line-buffer index
  pix_t   p_new, p_mid, p_top;
  logic   a_valid, a_border;
  coord_t a_x, a_y;

  always_comb begin
    xa    = in_x[XW-1:0];
    p_new = in_pad ? '0 : in_pix;
    p_mid = lb_prev1[xa];
    p_top = lb_prev2[xa];
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      lb_prev2[xa] <= p_mid;
      lb_prev1[xa] <= p_new;
      for (int r = 0; r < 3; r++) begin
        win[r][0] <= win[r][1];
        win[r][1] <= win[r][2];
      end
      win[0][2] <= p_top;
      win[1][2] <= p_mid;
      win[2][2] <= p_new;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      a_valid  <= 1'b0;
      a_border <= 1'b0;
      a_x      <= '0;
      a_y      <= '0;
    end else begin
      a_valid  <= in_valid && (in_x != '0) && (in_y != '0);
      a_x      <= in_x - 1'b1;
      a_y      <= in_y - 1'b1;
      a_border <= (in_x == coord_t'(1)) || (in_x == coord_t'(W)) ||
                  (in_y == coord_t'(1)) || (in_y == coord_t'(H));
    end
  end

  // ---------------- stage B: convolution and clipping ----------------
  sum_t sum;
  pix_t im;

  always_comb begin
    sum = '0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        sum += sum_t'(mask_coef(MASK, r, c)) * sum_t'({1'b0, win[r][c]});
    if (a_border || sum < 0)  im = '0;
    else if (sum > 255)       im = 8'd255;
    else                      im = pix_t'(sum);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out <= '0;
    end else begin
      out.valid <= a_valid;
      out.x     <= a_x;
      out.y     <= a_y;
      out.pix   <= win[1][1];
      out.im    <= im;
      out.is_edge  <= 1'b0;
    end
  end
endmodule

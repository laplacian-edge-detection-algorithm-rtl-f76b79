// lap_pkg: types and constants shared by the Laplacian edge-detection display chain.
//
// The chain reads a grey-level image from on-chip memory in step with a VGA raster,
// filters it with a 3x3 Laplacian mask, binarises the result against a threshold S and
// shows either the original, the Laplacian grey image or the binary edge image.
//
// What is here:
//   * image geometry (200x200, 8-bit grey pixels, as in the design's road images);
//   * 640x480 VGA timing at a 25 MHz pixel clock (standard industry figures; the design
//     only states the 25 MHz clock and the monitor);
//   * the four Laplacian masks the design lists, the first being the one it uses;
//   * the pixel-stream record passed between the pipeline stages.
package lap_pkg;

  // ---------------- image ----------------
  localparam int unsigned IMG_W   = 200;  // image width in pixels
  localparam int unsigned IMG_H   = 200;  // image height in lines
  localparam int unsigned PIX_W   = 8;    // bits per grey pixel
  localparam int unsigned COORD_W = 10;   // bits of an x or y coordinate (covers 0..1023)

  typedef logic [PIX_W-1:0]   pix_t;
  typedef logic [COORD_W-1:0] coord_t;

  // ---------------- VGA 640x480 @ 60 Hz, 25 MHz pixel clock ----------------
  localparam int unsigned H_ACTIVE = 640;
  localparam int unsigned H_FRONT  = 16;
  localparam int unsigned H_SYNC   = 96;
  localparam int unsigned H_BACK   = 48;
  localparam int unsigned H_TOTAL  = H_ACTIVE + H_FRONT + H_SYNC + H_BACK;  // 800
  localparam int unsigned V_ACTIVE = 480;
  localparam int unsigned V_FRONT  = 10;
  localparam int unsigned V_SYNC   = 2;
  localparam int unsigned V_BACK   = 33;
  localparam int unsigned V_TOTAL  = V_ACTIVE + V_FRONT + V_SYNC + V_BACK;  // 525

  // ---------------- Laplacian masks ----------------
  // LAP4     :  0  1  0 /  1 -4  1 /  0  1  0   (the mask used by the design)
  // LAP4_NEG :  0 -1  0 / -1  4 -1 /  0 -1  0
  // LAP8_NEG : -1 -1 -1 / -1 -8 -1 / -1 -1 -1   (printed as such in the mask list)
  // LAP_DIAG :  1 -2  1 / -2  4 -2 /  1 -2  1
  typedef enum logic [1:0] {
    LAP4     = 2'd0,
    LAP4_NEG = 2'd1,
    LAP8_NEG = 2'd2,
    LAP_DIAG = 2'd3
  } mask_e;

  typedef logic signed [4:0] coef_t;

  // Coefficient of mask m at row r (0 = top) and column c (0 = left).
  function automatic coef_t mask_coef(mask_e m, int r, int c);
    bit centre, on_cross;
    centre = (r == 1) && (c == 1);
    on_cross  = !centre && ((r == 1) || (c == 1));
    case (m)
      LAP4:     return centre ? -5'sd4 : (on_cross ?  5'sd1 :  5'sd0);
      LAP4_NEG: return centre ?  5'sd4 : (on_cross ? -5'sd1 :  5'sd0);
      LAP8_NEG: return centre ? -5'sd8 : -5'sd1;
      default:  return centre ?  5'sd4 : (on_cross ? -5'sd2 :  5'sd1);
    endcase
  endfunction

  // Width of the signed convolution sum: |sum| <= 16 * 255 for every mask above.
  localparam int unsigned SUM_W = 14;
  typedef logic signed [SUM_W-1:0] sum_t;

  // ---------------- pixel stream between pipeline stages ----------------
  // One record per clock. x and y are the image coordinates of the centre pixel; pix is
  // that pixel as read from memory, im the Laplacian grey value I_M and is_edge the binary
  // value I_B (filled in by the threshold stage).
  typedef struct packed {
    logic   valid;
    coord_t x;
    coord_t y;
    pix_t   pix;
    pix_t   im;
    logic   is_edge;
  } px_t;

  // Clock cycles each stage adds between a read request and the pixel reaching the
  // VGA output register; their sum is how far ahead of the beam the memory is read.
  localparam int unsigned RD_LAT   = 2;  // address register + synchronous memory read
  localparam int unsigned FILT_LAT = 2;  // window update + convolution/clip
  localparam int unsigned BIN_LAT  = 1;  // threshold
  localparam int unsigned MUX_LAT  = 1;  // display select
  localparam int unsigned LEAD     = RD_LAT + FILT_LAT + BIN_LAT + MUX_LAT;

  // ---------------- what the display shows ----------------
  typedef enum logic [1:0] {
    SHOW_ORIGINAL  = 2'd0,   // image before treatment
    SHOW_EDGES     = 2'd1,   // binary edge image I_B (white = edge)
    SHOW_LAPLACIAN = 2'd2,   // Laplacian grey image I_M
    SHOW_BLANK     = 2'd3    // image area black (display test)
  } show_e;

endpackage

// binarize: thresholding of the Laplacian image into a black-and-white edge image.
//
// Follows the design's rule I_B = 1 if I_M >= S, else 0, where I_M is the clipped
// Laplacian grey value and S an 8-bit threshold. The design picks S by hand from the
// cumulative histogram of the image; here S is an input, so it can come from switches
// or a register. Pixels outside the image (valid = 0) give I_B = 0. Every other field of
// the stream record passes through unchanged, so the stage can sit in the pipeline.
//
// Interface: in (px_t), s (threshold S), out (px_t with is_edge = I_B).
// Timing: one register stage (BIN_LAT = 1), one pixel per clock.
module binarize
  import lap_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  px_t  in,
  input  pix_t s,
  output px_t  out
);
  always_ff @(posedge clk) begin
    if (rst) begin
      out <= '0;
    end else begin
      out      <= in;
      out.is_edge <= in.valid && (in.im >= s);
    end
  end
endmodule

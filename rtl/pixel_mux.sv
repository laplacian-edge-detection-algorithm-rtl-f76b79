// pixel_mux: chooses the image sent to the screen.
//
// The display can show the image before treatment, the binary edge image (edge pixels
// white, 255; others black, 0) or the Laplacian grey image I_M; a fourth setting blacks
// the image area. The design has a block of this name between the memory and the VGA
// output and shows the images before and after treatment; which inputs it selects
// between, and the select encoding (show_e), are choices made here.
//
// Interface: in (px_t from the threshold stage), sel (show_e), valid/grey out.
// Timing: one register stage (MUX_LAT = 1).
module pixel_mux
  import lap_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  px_t   in,
  input  show_e sel,
  output logic  valid,
  output pix_t  grey
);
  pix_t g;

  always_comb begin
    unique case (sel)
      SHOW_ORIGINAL:  g = in.pix;
      SHOW_EDGES:     g = in.is_edge ? 8'hFF : 8'h00;
      SHOW_LAPLACIAN: g = in.im;
      SHOW_BLANK:     g = 8'h00;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      valid <= 1'b0;
      grey  <= '0;
    end else begin
      valid <= in.valid;
      grey  <= in.valid ? g : 8'h00;
    end
  end
endmodule

// synchro: VGA raster timing generator (640x480 at 60 Hz from a 25 MHz pixel clock).
//
// Two counters scan the screen: hcount runs 0..H_TOTAL-1 once per line and vcount
// advances by one at the end of each line, running 0..V_TOTAL-1 once per frame. The
// line is H_ACTIVE visible pixels, then front porch, sync pulse and back porch; the
// frame likewise in lines. Sync pulses are active low, as in the 640x480 industry mode.
// The design states only that this block paces the horizontal and vertical scan; the
// mode's numbers come from lap_pkg.
//
// Interface: clk, rst (synchronous, active high, restarts at the top-left pixel),
//   hcount/vcount (current position), active (inside the 640x480 area),
//   hsync_n/vsync_n, frame_start (one cycle at hcount = vcount = 0).
// Timing: all outputs are decoded from the registered counters, so they describe the
//   same pixel in the same cycle.
module synchro
  import lap_pkg::*;
#(
  parameter int unsigned HA = H_ACTIVE,
  parameter int unsigned HF = H_FRONT,
  parameter int unsigned HS = H_SYNC,
  parameter int unsigned HB = H_BACK,
  parameter int unsigned VA = V_ACTIVE,
  parameter int unsigned VF = V_FRONT,
  parameter int unsigned VS = V_SYNC,
  parameter int unsigned VB = V_BACK
) (
  input  logic   clk,
  input  logic   rst,
  output coord_t hcount,
  output coord_t vcount,
  output logic   active,
  output logic   hsync_n,
  output logic   vsync_n,
  output logic   frame_start
);
  localparam int unsigned HT = HA + HF + HS + HB;
  localparam int unsigned VT = VA + VF + VS + VB;

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
    end else if (hcount == coord_t'(HT - 1)) begin
      hcount <= '0;
      vcount <= (vcount == coord_t'(VT - 1)) ? '0 : vcount + 1'b1;
    end else begin
      hcount <= hcount + 1'b1;
    end
  end

  always_comb begin
    active      = (hcount < coord_t'(HA)) && (vcount < coord_t'(VA));
    hsync_n     = !((hcount >= coord_t'(HA + HF)) && (hcount < coord_t'(HA + HF + HS)));
    vsync_n     = !((vcount >= coord_t'(VA + VF)) && (vcount < coord_t'(VA + VF + VS)));
    frame_start = (hcount == '0) && (vcount == '0);
  end
endmodule

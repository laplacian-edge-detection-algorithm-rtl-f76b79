// horloge_25mhz: pixel-clock generator.
//
// Divides the board oscillator by DIV (default 4: 100 MHz in, 25 MHz out) with a
// free-running counter whose top bit is the output clock, so the output has a 50 %
// duty cycle when DIV is a power of two. The 25 MHz figure and the block's role follow
// the design; the 100 MHz board clock, the counter divider and the reset are choices made
// here (an FPGA build would normally use a clock manager instead of fabric logic).
//
// The counter has no reset, so the output clock keeps running while the rest of the
// design is held in reset (the design's blocks reset synchronously on this clock); it
// powers up at 0 as FPGA registers do.
//
// Interface: clk_in, clk_out.
// Timing: clk_out rises on the clk_in edge at which the counter reaches DIV/2 and
// falls when it wraps to 0, i.e. one rising edge every DIV input cycles.
module horloge_25mhz #(
  parameter int unsigned DIV = 4   // division ratio, a power of two >= 2
) (
  input  logic clk_in,
  output logic clk_out
);
  localparam int unsigned CW = $clog2(DIV);

  logic [CW-1:0] cnt = '0;

  always_ff @(posedge clk_in) cnt <= cnt + 1'b1;

  assign clk_out = cnt[CW-1];

  initial assert (DIV >= 2 && (DIV & (DIV - 1)) == 0)
    else $error("horloge_25mhz: DIV must be a power of two >= 2");
endmodule

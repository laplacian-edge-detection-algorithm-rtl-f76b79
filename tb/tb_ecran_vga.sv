// tb_ecran_vga: drives random grey pixels, valid and active flags and sync levels, and
// checks one cycle later that red/green/blue carry the grey value's top 3/3/2 bits only
// when the pixel is valid and inside the active area, black otherwise, and that both
// sync lines are passed with the same one-cycle delay.
module tb_ecran_vga;
  import lap_pkg::*;
  logic       clk = 1'b0, rst = 1'b1;
  logic       active, hsync_n, vsync_n, pix_valid;
  pix_t       pix_grey;
  logic [2:0] red, green;
  logic [1:0] blue;
  logic       hsync_n_o, vsync_n_o;
  int         checks = 0, failures = 0, shown = 0, blanked = 0;

  ecran_vga dut (.*);

  always #20 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic p_act, p_hs, p_vs, p_val;
    pix_t p_g;
    int   er, eg, eb;
    active = 0; hsync_n = 1; vsync_n = 1; pix_valid = 0; pix_grey = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 4000; n++) begin
      active = $urandom_range(1); hsync_n = $urandom_range(1); vsync_n = $urandom_range(1);
      pix_valid = $urandom_range(1); pix_grey = pix_t'($urandom);
      p_act = active; p_hs = hsync_n; p_vs = vsync_n; p_val = pix_valid; p_g = pix_grey;
      @(negedge clk);
      if (n > 0) begin
        if (p_act && p_val) begin
          er = int'(p_g) / 32; eg = int'(p_g) / 32; eb = int'(p_g) / 64; shown++;
        end else begin
          er = 0; eg = 0; eb = 0; blanked++;
        end
        checks++;
        if (int'(red) != er || int'(green) != eg || int'(blue) != eb ||
            hsync_n_o !== p_hs || vsync_n_o !== p_vs) begin
          failures++;
          if (failures < 10) $display("grey=%0d got r%0d g%0d b%0d", p_g, red, green, blue);
        end
      end
    end
    checks++;
    if (shown == 0 || blanked == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

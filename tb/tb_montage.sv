// tb_montage: end-to-end test of the edge-detection display at its default sizes
// (200x200 image, 640x480 VGA, 25 MHz pixel clock from a 100 MHz board clock).
//
// It builds a synthetic road scene (sky gradient, noisy asphalt, a slanted lane marking
// and a square sign), loads it through the memory load port while the design is held in
// reset, then watches the VGA pins for five whole frames, one per display setting:
// original, edges at S = 40, Laplacian grey, blank, and edges at S = 0. The screen
// position of each pin sample is derived from the vsync pulse alone, and every sample's
// colour and sync levels are compared with a reference computed here from the image with
// the 4-neighbour Laplacian f(x+1,y)+f(x-1,y)+f(x,y+1)+f(x,y-1)-4f(x,y), clipped to
// 0..255 (border pixels 0), thresholded as I_B = (I_M >= S), centred at (220, 140).
// It counts how often each mechanism occurs (edge and non-edge pixels, negative and
// saturated Laplacian, border pixels, noise suppressed by the threshold, blanking, black
// surround, sync pulses, every display setting) and fails if any never did.
module tb_montage;
  localparam int W = 200, H = 200, X0 = 220, Y0 = 140;
  localparam int FRAME = 800 * 525;

  logic        clk_in = 1'b0, rst = 1'b1;
  logic        pix_clk;
  logic        load_we;
  logic [15:0] load_addr;
  logic [7:0]  load_data;
  logic [1:0]  show;
  logic [7:0]  threshold;
  logic [2:0]  vga_red, vga_green;
  logic [1:0]  vga_blue;
  logic        vga_hsync_n, vga_vsync_n;

  montage dut (.*);

  always #5 clk_in = ~clk_in;   // 100 MHz

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (4 * (W * H + 8 * FRAME)) @(posedge clk_in);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference image and its Laplacian ----------------
  int img [H][W];
  int lap_raw [H][W];

  function automatic int clip(int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  task automatic make_scene();
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int v;
        if (y < 70) v = 180 - y;                                 // sky
        else        v = 70 + $urandom_range(6);                  // asphalt with noise
        if (y >= 70 && x >= 95 + (y - 70) / 4 && x < 101 + (y - 70) / 4) v = 245;  // lane line
        if (x >= 140 && x < 180 && y >= 20 && y < 60)                              // sign
          v = (x < 143 || x >= 177 || y < 23 || y >= 57) ? 30 : 220;
        img[y][x] = v;
      end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        if (x == 0 || y == 0 || x == W - 1 || y == H - 1) lap_raw[y][x] = 0;
        else lap_raw[y][x] = img[y][x + 1] + img[y][x - 1] + img[y + 1][x] + img[y - 1][x]
                             - 4 * img[y][x];
  endtask

  // ---------------- mechanism counters ----------------
  int n_edge, n_noedge, n_neg, n_sat, n_border, n_noise_cut, n_blank, n_surround;
  int n_hsync, n_vsync, n_loads;
  int n_mode [4];

  task automatic check_sample(int h, int v, int mode, int s);
    int g, er, eg, eb;
    bit in_img;
    in_img = (h >= X0 && h < X0 + W && v >= Y0 && v < Y0 + H);
    g = 0;
    if (in_img) begin
      int x, y, im;
      x = h - X0; y = v - Y0;
      im = clip(lap_raw[y][x]);
      case (mode)
        0: g = img[y][x];
        1: g = (im >= s) ? 255 : 0;
        2: g = im;
        default: g = 0;
      endcase
      n_mode[mode]++;
      if (mode == 1) begin
        if (im >= s) n_edge++; else n_noedge++;
        if (im > 0 && im < s) n_noise_cut++;
      end
      if (mode == 2) begin
        if (x == 0 || y == 0 || x == W - 1 || y == H - 1) n_border++;
        else if (lap_raw[y][x] < 0) n_neg++;
        else if (lap_raw[y][x] > 255) n_sat++;
      end
    end else if (h < 640 && v < 480) n_surround++;
    else n_blank++;
    er = g / 32; eg = g / 32; eb = g / 64;
    checks++;
    if (int'(vga_red) != er || int'(vga_green) != eg || int'(vga_blue) != eb ||
        vga_hsync_n !== !(h >= 656 && h < 752) || vga_vsync_n !== !(v >= 490 && v < 492)) begin
      failures++;
      if (failures < 10)
        $display("mode %0d pixel (%0d,%0d): rgb %0d/%0d/%0d hs %b vs %b, expected %0d/%0d/%0d",
                 mode, h, v, vga_red, vga_green, vga_blue, vga_hsync_n, vga_vsync_n, er, eg, eb);
    end
  endtask

  initial begin
    int modes [5] = '{0, 1, 2, 3, 1};
    int thr   [5] = '{40, 40, 40, 40, 0};
    logic prev_hs, prev_vs;
    int h, v, waited;
    n_edge = 0; n_noedge = 0; n_neg = 0; n_sat = 0; n_border = 0; n_noise_cut = 0;
    n_blank = 0; n_surround = 0; n_hsync = 0; n_vsync = 0; n_loads = 0;
    n_mode = '{0, 0, 0, 0};
    load_we = 0; load_addr = '0; load_data = '0; show = 2'd0; threshold = 8'd40;
    make_scene();

    // load the image while the display is held in reset
    repeat (4) @(negedge pix_clk);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        load_we = 1; load_addr = 16'(y * W + x); load_data = 8'(img[y][x]);
        @(negedge pix_clk);
        n_loads++;
      end
    load_we = 0;
    @(negedge pix_clk);
    rst = 1'b0;

    // find the start of the vertical sync pulse: screen pixel (0, 490)
    prev_vs = vga_vsync_n;
    waited = 0;
    do begin
      @(negedge pix_clk);
      waited++;
      if (!(prev_vs && !vga_vsync_n)) prev_vs = vga_vsync_n;
      else break;
    end while (waited < 2 * FRAME);

    h = 0; v = 490;
    prev_hs = 1'b1;
    for (int f = 0; f < 5; f++) begin
      show = 2'(modes[f]); threshold = 8'(thr[f]);
      for (int n = 0; n < FRAME; n++) begin
        check_sample(h, v, modes[f], thr[f]);
        if (prev_hs && !vga_hsync_n) n_hsync++;
        if (h == 0 && v == 490 && !vga_vsync_n) n_vsync++;
        prev_hs = vga_hsync_n;
        h++;
        if (h == 800) begin h = 0; v = (v == 524) ? 0 : v + 1; end
        @(negedge pix_clk);
      end
    end

    $display("loads %0d, edge %0d, non-edge %0d, noise below S %0d, negative %0d, saturated %0d, border %0d",
             n_loads, n_edge, n_noedge, n_noise_cut, n_neg, n_sat, n_border);
    $display("surround %0d, blanking %0d, hsync pulses %0d, vsync pulses %0d, per setting %0d/%0d/%0d/%0d",
             n_surround, n_blank, n_hsync, n_vsync, n_mode[0], n_mode[1], n_mode[2], n_mode[3]);
    foreach (n_mode[i]) begin
      checks++;
      if (n_mode[i] == 0) failures++;
    end
    checks++;
    if (n_loads != W * H || n_edge == 0 || n_noedge == 0 || n_noise_cut == 0 || n_neg == 0 ||
        n_sat == 0 || n_border == 0 || n_surround == 0 || n_blank == 0 ||
        n_hsync != 5 * 525 || n_vsync != 5) begin
      failures++;
      $display("a mechanism did not occur as often as expected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_laplacian_filter: streams a 200x200 test image (random texture, flat patches and a
// bright bar) through four filter instances, one per mask, twice: once as a continuous
// stream and once with random idle cycles. Every output is compared with a reference
// Laplacian worked out here from the explicit neighbour formulas of each mask, clipped to
// 0..255, with border centres 0. It also checks the rate and latency: one result per input
// cycle, each result two cycles after the pixel that completes its window.
module tb_laplacian_filter;
  import lap_pkg::*;
  localparam int W = IMG_W, H = IMG_H;

  logic   clk = 1'b0, rst = 1'b1;
  logic   in_valid, in_pad;
  coord_t in_x, in_y;
  pix_t   in_pix;
  px_t    out [4];
  int     checks = 0, failures = 0;
  int     n_neg = 0, n_sat = 0, n_mid = 0;

  for (genvar m = 0; m < 4; m++) begin : g_dut
    laplacian_filter #(.W(W), .H(H), .MASK(mask_e'(m))) dut (
      .clk(clk), .rst(rst), .in_valid(in_valid), .in_pad(in_pad),
      .in_x(in_x), .in_y(in_y), .in_pix(in_pix), .out(out[m]));
  end

  always #20 clk = ~clk;

  initial begin : watchdog
    repeat (4 * (W + 1) * (H + 1) + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int img [H][W];

  function automatic int f(int x, int y);
    return img[y][x];
  endfunction

  function automatic int ref_lap(int m, int x, int y);
    int c, n, s, e, w, d, r;
    if (x == 0 || y == 0 || x == W - 1 || y == H - 1) return 0;
    c = f(x, y); n = f(x, y - 1); s = f(x, y + 1); w = f(x - 1, y); e = f(x + 1, y);
    d = f(x - 1, y - 1) + f(x + 1, y - 1) + f(x - 1, y + 1) + f(x + 1, y + 1);
    case (m)
      0: r = n + s + e + w - 4 * c;
      1: r = 4 * c - (n + s + e + w);
      2: r = -(n + s + e + w + d) - 8 * c;
      default: r = d - 2 * (n + s + e + w) + 4 * c;
    endcase
    return (r < 0) ? 0 : (r > 255) ? 255 : r;
  endfunction

  // expected output order and timing
  int exp_x, exp_y, cyc, sent_at [W + 1][H + 1], outs, frame;

  always @(negedge clk) begin
    cyc++;
    if (!rst && out[0].valid) begin
      for (int m = 0; m < 4; m++) begin
        int want;
        want = ref_lap(m, exp_x, exp_y);
        checks++;
        if (!out[m].valid || int'(out[m].x) != exp_x || int'(out[m].y) != exp_y ||
            int'(out[m].pix) != img[exp_y][exp_x] || int'(out[m].im) != want) begin
          failures++;
          if (failures < 10)
            $display("mask %0d at (%0d,%0d): got (%0d,%0d) pix %0d im %0d, expected im %0d",
                     m, exp_x, exp_y, out[m].x, out[m].y, out[m].pix, out[m].im, want);
        end
        if (m == 0 && !(exp_x == 0 || exp_y == 0 || exp_x == W - 1 || exp_y == H - 1)) begin
          int raw;
          raw = img[exp_y][exp_x + 1] + img[exp_y][exp_x - 1] + img[exp_y + 1][exp_x] +
                img[exp_y - 1][exp_x] - 4 * img[exp_y][exp_x];
          if (raw < 0) n_neg++; else if (raw > 255) n_sat++; else n_mid++;
        end
      end
      // latency: the pixel (x+1, y+1) that completed this window went in 2 cycles ago
      checks++;
      if (cyc - sent_at[exp_x + 1][exp_y + 1] != int'(FILT_LAT)) begin
        failures++;
        if (failures < 10) $display("latency %0d at (%0d,%0d)", cyc - sent_at[exp_x + 1][exp_y + 1], exp_x, exp_y);
      end
      outs++;
      if (exp_x == W - 1) begin exp_x = 0; exp_y = (exp_y == H - 1) ? 0 : exp_y + 1; end
      else exp_x++;
    end
  end

  initial begin
    int t0, t1;
    cyc = 0; exp_x = 0; exp_y = 0; outs = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        if (x >= 60 && x < 70)                          img[y][x] = 250;        // bright bar
        else if (y >= 120 && y < 160 && x >= 100 && x < 150) img[y][x] = 90;   // flat patch
        else if (x >= 150)                                img[y][x] = 30 + y / 4; // smooth ramp
        else                                              img[y][x] = $urandom_range(255);
      end
    in_valid = 0; in_pad = 0; in_x = '0; in_y = '0; in_pix = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (frame = 0; frame < 2; frame++) begin
      t0 = cyc;
      for (int y = 0; y <= H; y++)
        for (int x = 0; x <= W; x++) begin
          if (frame == 1)
            while ($urandom_range(3) == 0) begin
              in_valid = 0; in_x = coord_t'($urandom); in_pix = pix_t'($urandom);
              @(negedge clk);
            end
          in_valid = 1;
          in_x = coord_t'(x); in_y = coord_t'(y);
          in_pad = (x == W) || (y == H);
          in_pix = in_pad ? pix_t'($urandom) : pix_t'(img[y][x]);   // padding data is ignored
          @(negedge clk);
          sent_at[x][y] = cyc;
        end
      in_valid = 0;
      t1 = cyc;
      repeat (4) @(negedge clk);
      if (frame == 0) begin
        // continuous stream: (W+1)*(H+1) input cycles carried all W*H results
        checks++;
        if (t1 - t0 != (W + 1) * (H + 1) || outs != W * H) begin
          failures++;
          $display("rate: %0d cycles, %0d results", t1 - t0, outs);
        end
      end
    end
    checks++;
    if (outs != 2 * W * H || n_neg == 0 || n_sat == 0 || n_mid == 0) begin
      failures++;
      $display("results %0d, negative %0d, saturated %0d, in range %0d", outs, n_neg, n_sat, n_mid);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

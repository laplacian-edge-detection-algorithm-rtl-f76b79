// tb_read_mem: sweeps the playback block over two full 800x525 rasters and checks that
//   * each frame requests every image coordinate (0..W, 0..H) exactly once, in raster
//     order, with the extra column x = W and line y = H flagged as padding;
//   * the read address of a real pixel is y*W + x, one cycle before its tag;
//   * pixel (x, y) is requested when the beam is at (X0 + x - LEAD - 1, Y0 + y - 1),
//     which puts the filtered centre (x-1, y-1) on the beam after the pipeline.
module tb_read_mem;
  import lap_pkg::*;
  localparam int W = IMG_W, H = IMG_H;
  localparam int X0 = (H_ACTIVE - IMG_W) / 2, Y0 = (V_ACTIVE - IMG_H) / 2;
  localparam int AW = $clog2(W * H);

  logic          clk = 1'b0, rst = 1'b1;
  coord_t        hcount, vcount;
  logic [AW-1:0] raddr;
  logic          tag_valid, tag_pad;
  coord_t        tag_x, tag_y;
  int            checks = 0, failures = 0;

  read_mem dut (.*);

  always #20 clk = ~clk;

  initial begin : watchdog
    repeat (3 * 800 * 525) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("mismatch: %s", what);
    end
  endtask

  initial begin
    int h_hist [3], v_hist [3];       // beam position driven 0, 1, 2 cycles ago
    logic [AW-1:0] addr_prev;
    int ex, ey, per_frame, pads;
    hcount = '0; vcount = '0;
    for (int i = 0; i < 3; i++) begin h_hist[i] = -1; v_hist[i] = -1; end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    ex = 0; ey = 0; per_frame = 0; pads = 0;
    for (int f = 0; f < 2; f++) begin
      for (int v = 0; v < 525; v++) begin
        for (int h = 0; h < 800; h++) begin
          hcount = coord_t'(h); vcount = coord_t'(v);
          addr_prev = raddr;
          @(negedge clk);
          h_hist[2] = h_hist[1]; v_hist[2] = v_hist[1];
          h_hist[1] = h_hist[0]; v_hist[1] = v_hist[0];
          h_hist[0] = h;         v_hist[0] = v;
          if (tag_valid) begin
            check(int'(tag_x) == ex && int'(tag_y) == ey,
                  $sformatf("order: got %0d,%0d expected %0d,%0d", tag_x, tag_y, ex, ey));
            check(tag_pad == (ex == W || ey == H), "padding flag");
            if (!tag_pad) check(int'(addr_prev) == ey * W + ex, "address");
            check(h_hist[1] == X0 + ex - int'(LEAD) - 1 && v_hist[1] == Y0 + ey - 1,
                  $sformatf("timing of %0d,%0d: beam was %0d,%0d", ex, ey, h_hist[1], v_hist[1]));
            per_frame++;
            if (tag_pad) pads++;
            if (ex == W) begin ex = 0; ey = (ey == H) ? 0 : ey + 1; end
            else ex++;
          end
        end
      end
    end
    // the last requests of frame 2 straddle nothing: all (W+1)*(H+1) were seen twice
    check(per_frame == 2 * (W + 1) * (H + 1), $sformatf("%0d requests", per_frame));
    check(pads == 2 * (W + H + 1), $sformatf("%0d padding requests", pads));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

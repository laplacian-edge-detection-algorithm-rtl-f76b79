// tb_synchro: runs the VGA timing generator for two frames at its default 640x480 mode
// and checks, every cycle, the counters, active area, hsync and vsync against a model
// built from the mode's numbers (800 clocks per line, 525 lines per frame, sync pulses
// active low at pixels 656..751 and lines 490..491). It also checks the frame period.
module tb_synchro;
  import lap_pkg::*;
  logic   clk = 1'b0, rst = 1'b1;
  coord_t hcount, vcount;
  logic   active, hsync_n, vsync_n, frame_start;
  int     checks = 0, failures = 0;

  synchro dut (.*);

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
    int h, v, last_fs, fs_seen;
    h = 0; v = 0; last_fs = -1; fs_seen = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 2 * 800 * 525 + 10; n++) begin
      @(negedge clk);
      h = (h == 799) ? 0 : h + 1;
      if (h == 0) v = (v == 524) ? 0 : v + 1;
      if (n == 0) begin h = 1; v = 0; end
      check(hcount == coord_t'(h) && vcount == coord_t'(v), $sformatf("position %0d,%0d got %0d,%0d", h, v, hcount, vcount));
      check(active == (h < 640 && v < 480), "active");
      check(hsync_n == !(h >= 656 && h < 752), $sformatf("hsync at h=%0d", h));
      check(vsync_n == !(v >= 490 && v < 492), $sformatf("vsync at v=%0d", v));
      check(frame_start == (h == 0 && v == 0), "frame_start");
      if (frame_start) begin
        if (last_fs >= 0) check(n - last_fs == 800 * 525, "frame period");
        last_fs = n;
        fs_seen++;
      end
    end
    check(fs_seen == 2, "two frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

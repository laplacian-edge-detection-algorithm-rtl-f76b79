// tb_pixel_mux: drives random stream records under each of the four display settings and
// checks, one cycle later, the grey value shown: the original pixel, 255/0 for edge/no
// edge, the Laplacian value, or black; and black with valid = 0 outside the image.
module tb_pixel_mux;
  import lap_pkg::*;
  logic  clk = 1'b0, rst = 1'b1;
  px_t   in;
  show_e sel;
  logic  valid;
  pix_t  grey;
  int    checks = 0, failures = 0;
  int    seen [4] = '{0, 0, 0, 0};

  pixel_mux dut (.*);

  always #20 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    px_t   p_in;
    show_e p_sel;
    int    want;
    in = '0; sel = SHOW_ORIGINAL;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 4000; n++) begin
      in  = px_t'({$urandom, $urandom});
      in.valid = ($urandom_range(5) != 0);
      sel = show_e'(n % 4);
      p_in = in; p_sel = sel;
      @(negedge clk);
      if (n > 0) begin
        if (!p_in.valid)                 want = 0;
        else if (p_sel == SHOW_ORIGINAL) want = p_in.pix;
        else if (p_sel == SHOW_EDGES)    want = p_in.is_edge ? 255 : 0;
        else if (p_sel == SHOW_LAPLACIAN) want = p_in.im;
        else                             want = 0;
        checks++;
        if (int'(grey) != want || valid !== p_in.valid) begin
          failures++;
          if (failures < 10) $display("sel=%0d grey=%0d expected %0d", p_sel, grey, want);
        end
        if (p_in.valid) seen[int'(p_sel)]++;
      end
    end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

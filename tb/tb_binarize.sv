// tb_binarize: drives random Laplacian values and thresholds, plus the corner cases
// I_M = S, S = 0 and S = 255, and checks one cycle later that I_B = 1 exactly when
// I_M >= S on a valid pixel, and that the rest of the record passes unchanged.
module tb_binarize;
  import lap_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  px_t  in, out;
  pix_t s;
  int   checks = 0, failures = 0;
  int   n_edge = 0, n_equal = 0;

  binarize dut (.*);

  always #20 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    px_t  prev_in;
    pix_t prev_s;
    in = '0; s = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 5000; n++) begin
      in = px_t'({$urandom, $urandom});
      in.valid = ($urandom_range(7) != 0);
      s = pix_t'($urandom);
      case (n % 8)
        0: in.im = s;
        1: s = 8'd0;
        2: s = 8'd255;
        default: ;
      endcase
      prev_in = in; prev_s = s;
      @(negedge clk);
      if (n > 0) begin
        logic want;
        want = prev_in.valid && (int'(prev_in.im) >= int'(prev_s));
        checks++;
        if (out.is_edge !== want || out.valid !== prev_in.valid || out.x !== prev_in.x ||
            out.y !== prev_in.y || out.pix !== prev_in.pix || out.im !== prev_in.im) begin
          failures++;
          if (failures < 10) $display("im=%0d s=%0d edge=%b", prev_in.im, prev_s, out.is_edge);
        end
        if (want) n_edge++;
        if (prev_in.valid && prev_in.im == prev_s) n_equal++;
      end
    end
    checks++;
    if (n_edge == 0 || n_equal == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_horloge_25mhz: checks that the pixel-clock divider gives one output period per DIV
// input cycles with a 50 % duty cycle (DIV = 4: 25 MHz from 100 MHz).
// It counts input cycles between output edges and compares them with DIV/2 and DIV.
module tb_horloge_25mhz;
  localparam int DIV = 4;
  logic clk_in = 1'b0;
  logic clk_out;
  int   checks = 0, failures = 0;

  horloge_25mhz #(.DIV(DIV)) dut (.clk_in(clk_in), .clk_out(clk_out));

  always #5 clk_in = ~clk_in;   // 100 MHz

  initial begin : watchdog
    repeat (10000) @(posedge clk_in);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int   high_len, low_len, n_rise;
    logic prev;
    high_len = 0; low_len = 0; n_rise = 0;
    @(negedge clk_in);
    prev = clk_out;
    repeat (DIV * 200) begin
      @(negedge clk_in);
      if (clk_out && !prev) begin
        if (n_rise > 1) begin
          checks++;
          if (low_len != DIV / 2) begin
            failures++;
            $display("low phase %0d input cycles, expected %0d", low_len, DIV / 2);
          end
        end
        n_rise++;
        high_len = 1;
      end else if (!clk_out && prev) begin
        if (n_rise > 1) begin
          checks++;
          if (high_len != DIV / 2) begin
            failures++;
            $display("high phase %0d input cycles, expected %0d", high_len, DIV / 2);
          end
        end
        low_len = 1;
      end else if (clk_out) high_len++;
      else low_len++;
      prev = clk_out;
    end
    // 200 DIV-long periods observed: about 200 rising edges
    checks++;
    if (n_rise < 199 || n_rise > 201) begin
      failures++;
      $display("%0d rising edges in %0d input cycles", n_rise, DIV * 200);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

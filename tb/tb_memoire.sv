// tb_memoire: writes random pixels to random addresses of the 200x200 image memory and
// reads random addresses back, comparing with a reference array one cycle after each
// read address (synchronous read), including reads of the address being written
// (the old word must come out).
module tb_memoire;
  localparam int DEPTH = 200 * 200;
  localparam int AW    = $clog2(DEPTH);
  logic          clk = 1'b0;
  logic          we;
  logic [AW-1:0] waddr, raddr;
  logic [7:0]    wdata, rdata;
  logic [7:0]    ref_mem [DEPTH];
  int            checks = 0, failures = 0;

  memoire #(.DEPTH(DEPTH), .DATA_W(8)) dut (.*);

  always #20 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] expect_q;
    bit         have_q;
    have_q = 0;
    we = 0; waddr = '0; raddr = '0; wdata = '0;
    // fill every word so that every read has a known value
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = 8'($urandom);
      ref_mem[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      if (have_q) begin
        checks++;
        if (rdata !== expect_q) begin
          failures++;
          if (failures < 10) $display("read got %h expected %h", rdata, expect_q);
        end
      end
      raddr    = AW'($urandom_range(DEPTH - 1));
      we       = $urandom_range(1);
      waddr    = ($urandom_range(3) == 0) ? raddr : AW'($urandom_range(DEPTH - 1));
      wdata    = 8'($urandom);
      expect_q = ref_mem[raddr];     // value before this cycle's write
      have_q   = 1;
      if (we) ref_mem[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

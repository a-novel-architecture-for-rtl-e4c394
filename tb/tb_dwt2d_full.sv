// tb_dwt2d_full - the 2D-DWT at its default size: a 512 x 512 image of 8-bit
// pixels, five decomposition levels. The image is a smooth synthetic scene
// (gradients plus a few sharp-edged squares) with pseudo-random texture, made
// here rather than read from a file. All 262144 coefficients are compared with
// the reference model, and the run time in clocks is reported.
module tb_dwt2d_full;
  import dwt_ref_pkg::*;

  localparam int N = 512;
  localparam int DW = 16;
  localparam int AW = 18;
  localparam int LVW = 3;
  localparam int LEVELS = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [LVW-1:0] cfg_levels;
  logic start, busy, done, sat_event;
  logic [LVW-1:0] cur_level;
  logic host_we;
  logic [AW-1:0] host_waddr, host_raddr;
  logic [DW-1:0] host_wdata, host_rdata;

  dwt2d_top dut (.*);

  int checks = 0, failures = 0;

  initial begin
    longint img[];
    int cyc, lv_seen;
    cfg_levels = 0; start = 0; host_we = 0; host_waddr = 0; host_wdata = 0; host_raddr = 0;
    img = new[N*N];
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        int v;
        v = (r + c) / 4 + 40;
        if (r >= 100 && r < 220 && c >= 300 && c < 420) v = 230;
        if (r >= 350 && r < 380 && c >= 50 && c < 470) v = 10;
        v += int'($urandom_range(0, 15));
        if (v > 255) v = 255;
        img[r*N + c] = longint'(v);
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < N*N; k++) begin
      @(negedge clk);
      host_we = 1; host_waddr = AW'(k); host_wdata = DW'(img[k]);
    end
    @(negedge clk);
    host_we = 0;
    dwt2d(img, N, LEVELS, DW);
    cfg_levels = LVW'(LEVELS);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    lv_seen = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
      if (int'(cur_level) > lv_seen) lv_seen = int'(cur_level);
    end
    checks++;
    if (lv_seen != LEVELS - 1) begin
      failures++;
      $display("FAIL deepest level %0d", lv_seen);
    end
    for (int k = 0; k < N*N; k++) begin
      host_raddr = AW'(k);
      @(negedge clk);
      checks++;
      if (longint'($signed(host_rdata)) != img[k]) begin
        failures++;
        if (failures < 10)
          $display("FAIL (%0d,%0d) got %0d exp %0d", k / N, k % N, $signed(host_rdata), img[k]);
      end
    end
    $display("512x512, %0d levels: %0d clocks", LEVELS, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

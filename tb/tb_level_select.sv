// tb_level_select - checks level capture, clamping, band size per level,
// last_level and all_done for every level request 0 .. 7 with N = 512 and
// at most 5 levels.
module tb_level_select;
  localparam int N = 512, ML = 5, LVW = 3, LW = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [LVW-1:0] cfg_levels, level, levels;
  logic start, level_done, active, last_level, all_done;
  logic [LW-1:0] band_len;

  level_select #(.N(N), .MAX_LEVELS(ML)) dut (.*);

  int checks = 0, failures = 0;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    cfg_levels = 0; start = 0; level_done = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int req = 0; req < 8; req++) begin
      int lv;
      lv = (req == 0) ? 1 : (req > ML) ? ML : req;
      @(negedge clk);
      cfg_levels = LVW'(req); start = 1;
      @(negedge clk);
      start = 0;
      chk(active, "active after start");
      chk(int'(levels) == lv, $sformatf("levels %0d for request %0d", levels, req));
      for (int l = 0; l < lv; l++) begin
        chk(int'(level) == l, "level number");
        chk(int'(band_len) == (N >> l), $sformatf("band_len %0d at level %0d", band_len, l));
        chk(last_level == (l == lv - 1), "last_level");
        // a few idle clocks: nothing may move without level_done
        repeat (3) @(negedge clk);
        chk(int'(level) == l, "level stable");
        level_done = 1;
        @(negedge clk);
        level_done = 0;
        chk(all_done == (l == lv - 1), "all_done pulse");
      end
      chk(!active, "idle at the end");
      @(negedge clk);
      chk(!all_done, "all_done is one clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

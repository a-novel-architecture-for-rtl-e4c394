// tb_dwt2d_top - end-to-end test of the 2D-DWT at a reduced size (32 x 32,
// up to 3 levels). Each run loads an image through the host port, starts the
// transform, waits for done and reads every coefficient back, comparing it
// with the reference model (lifting with per-step mirroring, saturation to
// 16 bits after every 1D pass). Runs cover 1, 2 and 3 levels, a level request
// of 0 and one above the maximum (both clamped), 8-bit pixel images and a
// full-range image that forces saturation. The testbench counts how often
// each mechanism was exercised - row pass, column pass, level change, left
// and right mirroring, saturation, clamping - and fails any that never
// happened.
module tb_dwt2d_top;
  import dwt_ref_pkg::*;

  localparam int N = 32;
  localparam int ML = 3;
  localparam int DW = 16;
  localparam int AW = 2 * $clog2(N);
  localparam int LVW = $clog2(ML + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [LVW-1:0] cfg_levels;
  logic start, busy, done, sat_event;
  logic [LVW-1:0] cur_level;
  logic host_we;
  logic [AW-1:0] host_waddr, host_raddr;
  logic [DW-1:0] host_wdata, host_rdata;

  dwt2d_top #(.N(N), .MAX_LEVELS(ML), .DW(DW)) dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_rowpass = 0, n_colpass = 0, n_level = 0, n_lmirror = 0, n_rmirror = 0;
  int n_sat = 0, n_clamp = 0;

  always @(posedge clk) if (rst_n) begin
    if (sat_event) n_sat++;
    if (dut.u_ctrl.level_done) n_level++;
    if (dut.u_bound.pair_valid && dut.u_bound.ie < 0) n_lmirror++;
    if (dut.u_bound.pair_valid && dut.u_bound.io >= int'(dut.u_bound.len_q)) n_rmirror++;
    if (dut.u_ctrl.bp_start && dut.u_ctrl.pass == 1'b0) n_rowpass++;
    if (dut.u_ctrl.bp_start && dut.u_ctrl.pass == 1'b1) n_colpass++;
  end

  task automatic run(input bit full_range, input int req_levels);
    longint img[];
    int lv, cyc;
    img = new[N*N];
    foreach (img[k]) img[k] = full_range ? longint'($signed(16'($urandom)))
                                         : longint'($urandom_range(0, 255));
    // load
    for (int k = 0; k < N*N; k++) begin
      @(negedge clk);
      host_we = 1; host_waddr = AW'(k); host_wdata = DW'(img[k]);
    end
    @(negedge clk);
    host_we = 0;
    lv = (req_levels == 0) ? 1 : (req_levels > ML) ? ML : req_levels;
    if (lv != req_levels) n_clamp++;
    dwt2d(img, N, lv, DW);
    cfg_levels = LVW'(req_levels);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
      // host writes while busy must not reach the memory
      host_we = busy; host_waddr = '0; host_wdata = 16'h5a5a;
    end
    @(negedge clk);
    host_we = 0;
    checks++;
    if (busy) begin failures++; $display("FAIL busy after done"); end
    // read back
    for (int k = 0; k < N*N; k++) begin
      host_raddr = AW'(k);
      @(negedge clk);
      checks++;
      if (longint'($signed(host_rdata)) != img[k]) begin
        failures++;
        if (failures < 10)
          $display("FAIL lv=%0d addr (%0d,%0d) got %0d exp %0d", lv, k / N, k % N,
                   $signed(host_rdata), img[k]);
      end
    end
    $display("run: %0d level(s) requested %0d, %0d clocks", lv, req_levels, cyc);
  endtask

  initial begin
    cfg_levels = 0; start = 0; host_we = 0; host_waddr = 0; host_wdata = 0; host_raddr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    run(0, 1);
    run(0, 2);
    run(0, 3);
    run(0, 0);
    run(1, 1);
    run(1, 3);
    // every mechanism must have been exercised
    checks += 7;
    if (n_rowpass == 0) begin failures++; $display("FAIL no row pass"); end
    if (n_colpass == 0) begin failures++; $display("FAIL no column pass"); end
    if (n_level   < 2)  begin failures++; $display("FAIL no level change"); end
    if (n_lmirror == 0) begin failures++; $display("FAIL no left mirror"); end
    if (n_rmirror == 0) begin failures++; $display("FAIL no right mirror"); end
    if (n_sat     == 0) begin failures++; $display("FAIL no saturation"); end
    if (n_clamp   == 0) begin failures++; $display("FAIL no level clamp"); end
    $display("mechanisms: row passes %0d, column passes %0d, levels %0d, left mirror pairs %0d, right mirror pairs %0d, saturations %0d, clamps %0d",
             n_rowpass, n_colpass, n_level, n_lmirror, n_rmirror, n_sat, n_clamp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

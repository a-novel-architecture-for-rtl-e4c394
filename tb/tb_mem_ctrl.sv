// tb_mem_ctrl - checks the memory control's line sequencing and addressing.
// The memory is a behavioural array in this testbench and the boundary
// process / 1D-DWT is replaced by a simple line model: it remembers the line
// loaded into it and, when read back, returns it reversed and with a constant
// added, after a fixed processing delay. The expected memory after a run is
// computed by applying the same line operation to the rows and then the columns
// of each level's band. The real level_select supplies band sizes. Also
// checked: per-line clock count, busy/done, and level_done count.
module tb_mem_ctrl;
  localparam int N = 32, DW = 16, IW = 5, AW = 10, LW = 6, ML = 3, LVW = 2;
  localparam int PROC = 7;    // clocks the line model takes

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, lv_start, level_done, last_level;
  logic [LW-1:0] band_len, bp_len;
  logic [AW-1:0] raddr, waddr;
  logic [DW-1:0] rdata, wdata, ld_data, bp_rd_data;
  logic we, ld_we, bp_start, bp_done;
  logic [IW-1:0] ld_idx, bp_rd_idx;
  logic [LVW-1:0] cfg_levels;

  mem_ctrl #(.N(N), .DW(DW)) dut (.*);
  level_select #(.N(N), .MAX_LEVELS(ML)) u_lv (
    .clk, .rst_n, .cfg_levels, .start(lv_start), .level_done, .active(), .level(),
    .levels(), .band_len, .last_level, .all_done());

  // behavioural memory, one clock read latency
  logic [DW-1:0] mem [N*N];
  always @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

  // behavioural line processor
  logic [DW-1:0] lbuf [N];
  int cnt = -1;
  always @(posedge clk) begin
    if (ld_we) lbuf[ld_idx] <= ld_data;
    bp_done <= 1'b0;
    if (bp_start) cnt <= PROC;
    else if (cnt > 0) cnt <= cnt - 1;
    else if (cnt == 0) begin bp_done <= 1'b1; cnt <= -1; end
  end
  assign bp_rd_data = lbuf[int'(bp_len) - 1 - int'(bp_rd_idx)] + 16'd3;

  int checks = 0, failures = 0;
  int n_lvdone = 0, line_start_cyc, cyc = 0, n_lines = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (level_done) n_lvdone++;
  end

  task automatic run(int lv);
    logic [DW-1:0] ref_m [N*N];
    logic [DW-1:0] tmp [N];
    int len, c0;
    for (int k = 0; k < N*N; k++) begin mem[k] = DW'($urandom); ref_m[k] = mem[k]; end
    len = N;
    for (int l = 0; l < lv; l++) begin
      for (int r = 0; r < len; r++) begin
        for (int c = 0; c < len; c++) tmp[c] = ref_m[r*N + c];
        for (int c = 0; c < len; c++) ref_m[r*N + c] = tmp[len-1-c] + 16'd3;
      end
      for (int c = 0; c < len; c++) begin
        for (int r = 0; r < len; r++) tmp[r] = ref_m[r*N + c];
        for (int r = 0; r < len; r++) ref_m[r*N + c] = tmp[len-1-r] + 16'd3;
      end
      len /= 2;
    end
    n_lvdone = 0;
    @(negedge clk);
    cfg_levels = LVW'(lv); start = 1;
    @(negedge clk);
    start = 0;
    c0 = cyc;
    checks++;
    if (!busy) begin failures++; $display("FAIL not busy"); end
    while (!done) @(negedge clk);
    // expected clocks: per level 1 (init) + 2*len lines of (len read + 1 tail
    // + (PROC+2) run + len write + 1 next)
    begin
      int expc = 0, ln = N;
      for (int l = 0; l < lv; l++) begin
        expc += 1 + 2*ln*(2*ln + PROC + 4);
        ln /= 2;
      end
      checks++;
      if (cyc - c0 != expc) begin failures++; $display("FAIL %0d clocks, expected %0d", cyc - c0, expc); end
    end
    checks += 2;
    if (n_lvdone != lv) begin failures++; $display("FAIL %0d level_done pulses", n_lvdone); end
    @(negedge clk);
    if (busy) begin failures++; $display("FAIL busy after done"); end
    for (int k = 0; k < N*N; k++) begin
      checks++;
      if (mem[k] != ref_m[k]) begin
        failures++;
        if (failures < 10) $display("FAIL mem[%0d,%0d] = %h exp %h", k / N, k % N, mem[k], ref_m[k]);
      end
    end
  endtask

  initial begin
    start = 0; cfg_levels = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1);
    run(2);
    run(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

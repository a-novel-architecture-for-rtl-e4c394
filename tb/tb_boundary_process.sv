// tb_boundary_process - checks the mirror extension and result collection.
// The boundary process drives the real 1D lifting core; lines of several
// lengths are loaded, streamed and read back in band order, and compared with
// the reference model, which mirrors inside each lifting step instead of
// extending the line. Also checked: the stream length (LEN/2 + 4 pairs), the
// tag sequence, done timing, and saturation of full-range lines to 16 bits.
module tb_boundary_process;
  import dwt_ref_pkg::*;

  localparam int NM = 64;
  localparam int DW = 16;
  localparam int LW = $clog2(NM + 1);
  localparam int IW = $clog2(NM);
  localparam int TW = $clog2(NM / 2) + 1;
  localparam int WO = DW + 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [LW-1:0] len;
  logic ld_we, start, busy, done, sat_event;
  logic [IW-1:0] ld_idx, rd_idx;
  logic signed [DW-1:0] ld_data, rd_data;
  logic pair_valid, res_valid;
  logic signed [DW-1:0] pair_even, pair_odd;
  logic [TW-1:0] pair_tag, res_tag;
  logic signed [WO-1:0] res_low, res_high;

  boundary_process #(.N_MAX(NM), .DW(DW)) dut (.*);
  dwt1d_lifting #(.W(DW), .TAG_W(TW)) core (
    .clk, .rst_n, .in_valid(pair_valid), .in_even(pair_even), .in_odd(pair_odd),
    .in_tag(pair_tag), .out_valid(res_valid), .out_low(res_low), .out_high(res_high),
    .out_tag(res_tag));

  int checks = 0, failures = 0;
  int n_pairs, n_sat;
  always @(posedge clk) begin
    if (pair_valid) n_pairs++;
    if (sat_event) n_sat++;
  end

  function automatic longint mirror(longint x[], int n, int i);
    if (i < 0) i = -i;
    if (i >= n) i = 2*(n-1) - i;
    return x[i];
  endfunction

  task automatic line_test(int n, bit full);
    longint x[], lo[], hi[];
    int cyc, p;
    x = new[n];
    foreach (x[k]) x[k] = full ? longint'($signed(16'($urandom))) : longint'($urandom_range(0, 255));
    lift_line(x, n, lo, hi);
    len = LW'(n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      ld_we = 1; ld_idx = IW'(k); ld_data = DW'(x[k]);
    end
    @(negedge clk);
    ld_we = 0;
    n_pairs = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    p = 0;
    while (!done) begin
      // the streamed pairs are the mirrored line, in order, with tag {keep, p-4}
      if (pair_valid) begin
        checks++;
        if (longint'(pair_even) != mirror(x, n, 2*p - 4) || longint'(pair_odd) != mirror(x, n, 2*p - 3)
            || pair_tag != {(p >= 4) ? 1'b1 : 1'b0, (TW-1)'(p - 4)}) begin
          failures++;
          $display("FAIL pair %0d of line %0d", p, n);
        end
        p++;
      end
      @(negedge clk);
      cyc++;
    end
    checks += 2;
    if (n_pairs != n/2 + 4) begin failures++; $display("FAIL %0d pairs for %0d", n_pairs, n); end
    // last pair leaves at clock n/2+4; its result is stored 18 clocks later
    if (cyc != n/2 + 4 + 18 + 1) begin failures++; $display("FAIL done after %0d clocks", cyc); end
    for (int k = 0; k < n; k++) begin
      longint e;
      rd_idx = IW'(k);
      #1;
      e = (k < n/2) ? sat(lo[k], DW) : sat(hi[k - n/2], DW);
      checks++;
      if (longint'(rd_data) != e) begin
        failures++;
        $display("FAIL len %0d idx %0d got %0d exp %0d", n, k, rd_data, e);
      end
    end
  endtask

  initial begin
    len = 0; ld_we = 0; ld_idx = 0; ld_data = 0; start = 0; rd_idx = 0; n_sat = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) line_test(8 << (t % 4), 0);
    line_test(64, 1);
    line_test(32, 1);
    line_test(16, 1);
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL no saturation seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

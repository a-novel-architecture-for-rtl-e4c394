// tb_dwt1d_lifting - self-checking test of the 18-stage 1D lifting core.
// Lines of random samples (and lines of extreme values) are extended by four
// mirrored samples on each side and streamed one pair per clock, back to back.
// The tag carries the pair number; each kept output is compared with the
// reference model, and the clock distance between a pair going in and the tag
// coming out is checked against the 18-stage latency.
module tb_dwt1d_lifting;
  import dwt_ref_pkg::*;

  localparam int W = 16;
  localparam int WO = W + 4;
  localparam int TAG_W = 16;
  localparam int LAT = 18;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid;
  logic signed [W-1:0] in_even, in_odd;
  logic [TAG_W-1:0] in_tag;
  logic out_valid;
  logic signed [WO-1:0] out_low, out_high;
  logic [TAG_W-1:0] out_tag;

  dwt1d_lifting #(.W(W), .TAG_W(TAG_W)) dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  int sent_cycle [int];
  always @(posedge clk) cycle <= cycle + 1;

  // expected results for the line in flight
  longint exp_lo[], exp_hi[];
  int cur_m;
  int kept;

  // output monitor: tag = {1 keep bit, pair number}
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      automatic int p;
      p = int'(out_tag[TAG_W-2:0]);
      checks++;
      if (cycle - sent_cycle[p] != LAT) begin
        failures++;
        $display("FAIL latency pair %0d: %0d cycles", p, cycle - sent_cycle[p]);
      end
      if (out_tag[TAG_W-1]) begin
        automatic int mi;
        mi = p - 4;
        checks += 2;
        kept++;
        if (longint'(out_low) != exp_lo[mi]) begin
          failures++;
          $display("FAIL low[%0d] got %0d exp %0d", mi, out_low, exp_lo[mi]);
        end
        if (longint'(out_high) != exp_hi[mi]) begin
          failures++;
          $display("FAIL high[%0d] got %0d exp %0d", mi, out_high, exp_hi[mi]);
        end
      end
    end
  end

  function automatic longint mirror(longint x[], int n, int i);
    if (i < 0) i = -i;
    if (i >= n) i = 2*(n-1) - i;
    return x[i];
  endfunction

  task automatic run_line(longint x[], int n, bit gap);
    longint lo[], hi[];
    lift_line(x, n, lo, hi);
    // wait until the previous line has fully drained
    repeat (LAT + 4) @(posedge clk);
    exp_lo = lo; exp_hi = hi;
    cur_m = n / 2;
    kept = 0;
    for (int p = 0; p < n/2 + 4; p++) begin
      @(negedge clk);
      in_valid = 1;
      in_even  = W'(mirror(x, n, 2*p - 4));
      in_odd   = W'(mirror(x, n, 2*p - 3));
      in_tag   = {(p >= 4) ? 1'b1 : 1'b0, (TAG_W-1)'(p)};
      sent_cycle[p] = cycle;  // edge count at which the pair is sampled
    end
    @(negedge clk);
    in_valid = 0;
    if (gap) begin
      // garbage between lines must not disturb the next line
      in_even = 16'sh7fff; in_odd = -16'sh8000;
    end
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (kept != n/2) begin
      failures++;
      $display("FAIL line of %0d: %0d outputs kept", n, kept);
    end
  endtask

  initial begin
    longint x[];
    in_valid = 0; in_even = 0; in_odd = 0; in_tag = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ramp
    x = new[16];
    foreach (x[i]) x[i] = i * 10;
    run_line(x, 16, 0);
    // random 8-bit pixel lines of several lengths
    for (int t = 0; t < 20; t++) begin
      int n = 8 << (t % 5);  // 8 .. 128 samples
      x = new[n];
      foreach (x[i]) x[i] = longint'($urandom_range(0, 255));
      run_line(x, n, 1);
    end
    // full-range signed lines
    for (int t = 0; t < 10; t++) begin
      x = new[64];
      foreach (x[i]) x[i] = longint'($signed(16'($urandom)));
      run_line(x, 64, 1);
    end
    // alternating extremes (largest high-band response)
    x = new[32];
    foreach (x[i]) x[i] = (i % 2 == 1) ? -32768 : 32767;
    run_line(x, 32, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

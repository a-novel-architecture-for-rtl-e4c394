// tb_const_mult - checks the shift-add constant multiplier for each of the six
// rational 9/7 constants: y must equal floor(x * C / 2^16) exactly, LATENCY
// clocks after x, with LATENCY = ceil(log2(number of set bits of C)).
module tb_const_mult;
  localparam int W = 20;
  localparam int NC = 6;
  localparam int unsigned CS [NC] = '{32'h18000, 32'h1000, 32'hCCCC, 32'h7800, 32'hCCCC, 32'h14000};
  localparam int LATS [NC] = '{1, 0, 3, 2, 3, 1};   // worked out by hand from the set bits

  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [W-1:0] x;
  logic signed [W-1:0] y [NC];

  for (genvar g = 0; g < NC; g++) begin : g_dut
    const_mult #(.C(CS[g]), .W_IN(W), .W_OUT(W)) dut (.clk, .x(x), .y(y[g]));
  end

  int checks = 0, failures = 0;
  longint hist [$];   // x values by clock

  always @(posedge clk) begin
    hist.push_front(longint'(x));
    if (hist.size() > 8) void'(hist.pop_back());
  end

  initial begin
    x = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (t >= 6) begin
        for (int g = 0; g < NC; g++) begin
          longint xin, expv;
          // value presented LATS[g] clocks earlier: for latency 0 it is the current x
          xin = (LATS[g] == 0) ? longint'(x) : hist[LATS[g] - 1];
          expv = (xin * longint'(CS[g])) >>> 16;
          checks++;
          if (longint'(y[g]) != expv) begin
            failures++;
            if (failures < 10) $display("FAIL C=%h x=%0d y=%0d exp=%0d", CS[g], xin, y[g], expv);
          end
        end
      end
      case (t % 4)
        0: x = W'(-(1 <<< 17) + int'($urandom_range(0, 1 << 18)));
        1: x = -20'sd1;
        default: x = W'($urandom_range(0, 4095)) - 20'sd2048;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_coef_mem - checks the coefficient memory: random writes then reads
// against a shadow copy, one clock of read latency, and that a read of the
// address written in the same clock returns the old word.
module tb_coef_mem;
  localparam int DEPTH = 1024, DW = 16, AW = 10;

  logic clk = 0;
  always #5 clk = ~clk;

  logic we;
  logic [AW-1:0] waddr, raddr;
  logic [DW-1:0] wdata, rdata;

  coef_mem #(.DEPTH(DEPTH), .DW(DW)) dut (.*);

  int checks = 0, failures = 0;
  logic [DW-1:0] shadow [DEPTH];

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk);
      we = 1; waddr = AW'(k); wdata = DW'($urandom); shadow[k] = wdata;
    end
    for (int t = 0; t < 4000; t++) begin
      logic [AW-1:0] ra;
      logic [DW-1:0] expv;
      @(negedge clk);
      ra = AW'($urandom);
      raddr = ra;
      expv = shadow[ra];
      we = ($urandom_range(0, 1) == 1);
      waddr = (t % 3 == 0) ? ra : AW'($urandom);
      wdata = DW'($urandom);
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      checks++;
      if (rdata != expv) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h exp %h", ra, rdata, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// dwt2d_top - 2D discrete wavelet transform with the rational 9/7 lifting scheme.
//
// An N x N image is written into the coefficient memory through the host
// port; start then runs a multi-level 2D DWT on it in place, and the host
// reads the coefficients back from the same memory. The five parts are the
// wavelet level select (how many levels, which band), the memory control
// (line-by-line addressing), the boundary process (mirror extension of each
// line), the 18-stage pipelined 1D-DWT and the memory. Each level transforms
// the rows and then the columns of the current LL band; the next level works
// on the new LL band in the top-left quarter.
//
// Interface: while busy is low the host owns the memory (host_we/host_waddr/
// host_wdata, host_raddr with host_rdata one clock later); while busy is high
// the memory control owns it and host accesses are ignored. cfg_levels is
// sampled with start (1 .. MAX_LEVELS, clamped). done pulses at the end.
// sat_event pulses when a coefficient had to be saturated to DW bits;
// cur_level is the level being computed.
// Samples and coefficients are DW-bit two's complement; 8-bit pixels go in
// as values 0 .. 255.
module dwt2d_top
  import dwt_pkg::*;
#(
  parameter int unsigned N          = 512,
  parameter int unsigned MAX_LEVELS = 5,
  parameter int unsigned DW         = 16,
  parameter int unsigned IW         = $clog2(N),
  parameter int unsigned AW         = 2 * IW,
  parameter int unsigned LVW        = $clog2(MAX_LEVELS + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [LVW-1:0] cfg_levels,
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic           sat_event,
  output logic [LVW-1:0] cur_level,
  input  logic           host_we,
  input  logic [AW-1:0]  host_waddr,
  input  logic [DW-1:0]  host_wdata,
  input  logic [AW-1:0]  host_raddr,
  output logic [DW-1:0]  host_rdata
);

  localparam int unsigned LW    = $clog2(N + 1);
  localparam int unsigned TAG_W = $clog2(N / 2) + 1;
  localparam int unsigned WO    = DW + GUARD_BITS;

  // level select
  logic           lv_start, level_done, last_level;
  logic [LW-1:0]  band_len;

  level_select #(.N(N), .MAX_LEVELS(MAX_LEVELS)) u_level (
    .clk, .rst_n, .cfg_levels, .start(lv_start), .level_done,
    .active(), .level(cur_level), .levels(), .band_len, .last_level,
    .all_done());

  // memory control
  logic [AW-1:0] c_raddr, c_waddr;
  logic [DW-1:0] m_rdata, c_wdata;
  logic          c_we;
  logic [LW-1:0] bp_len;
  logic          ld_we, bp_start, bp_done;
  logic [IW-1:0] ld_idx, bp_rd_idx;
  logic [DW-1:0] ld_data, bp_rd_data;

  mem_ctrl #(.N(N), .DW(DW)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done,
    .lv_start, .level_done, .band_len, .last_level,
    .raddr(c_raddr), .rdata(m_rdata), .we(c_we), .waddr(c_waddr), .wdata(c_wdata),
    .bp_len, .ld_we, .ld_idx, .ld_data, .bp_start, .bp_done, .bp_rd_idx, .bp_rd_data);

  // memory, shared with the host while idle
  logic          m_we;
  logic [AW-1:0] m_waddr, m_raddr;
  logic [DW-1:0] m_wdata;
  always_comb begin
    if (busy) begin
      m_we = c_we;  m_waddr = c_waddr;  m_wdata = c_wdata;  m_raddr = c_raddr;
    end else begin
      m_we = host_we;  m_waddr = host_waddr;  m_wdata = host_wdata;  m_raddr = host_raddr;
    end
  end
  assign host_rdata = m_rdata;

  coef_mem #(.DEPTH(N * N), .DW(DW)) u_mem (
    .clk, .we(m_we), .waddr(m_waddr), .wdata(m_wdata), .raddr(m_raddr), .rdata(m_rdata));

  // boundary process and 1D-DWT
  logic                 pv, rv;
  logic signed [DW-1:0] pe, po;
  logic [TAG_W-1:0]     pt, rt;
  logic signed [WO-1:0] rl, rh;

  boundary_process #(.N_MAX(N), .DW(DW)) u_bound (
    .clk, .rst_n, .len(bp_len), .ld_we, .ld_idx, .ld_data(signed'(ld_data)),
    .start(bp_start), .busy(), .done(bp_done),
    .pair_valid(pv), .pair_even(pe), .pair_odd(po), .pair_tag(pt),
    .res_valid(rv), .res_low(rl), .res_high(rh), .res_tag(rt),
    .rd_idx(bp_rd_idx), .rd_data(bp_rd_data), .sat_event);

  dwt1d_lifting #(.W(DW), .TAG_W(TAG_W)) u_dwt1d (
    .clk, .rst_n, .in_valid(pv), .in_even(pe), .in_odd(po), .in_tag(pt),
    .out_valid(rv), .out_low(rl), .out_high(rh), .out_tag(rt));

endmodule

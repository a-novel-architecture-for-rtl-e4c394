// mem_ctrl - memory control of the 2D-DWT.
//
// Runs the 2D transform as a sequence of 1D line transforms on the memory.
// For each level it transforms every row of the current band_len x band_len
// LL band, then every column of it; every line goes through three phases:
//   READ   band_len reads from memory into the boundary-process line buffer
//          (one per clock, memory read latency one clock, plus one tail clock);
//   RUN    the boundary process streams the mirrored line through the 1D-DWT
//          and collects the results (band_len/2 + 4 clocks plus the 18-stage
//          pipeline);
//   WRITE  band_len writes of the transformed line back to the same place,
//          low band in the first half of the line, high band in the second.
// After the rows and the columns of a level it pulses level_done; the LL band
// in the top-left quarter is then the next level's input. Addressing the band
// coefficients to the 1D-DWT and the transformed coefficients back to memory,
// and passing LL on, follow the document; rows before columns, in-place
// storage and the non-overlapped phases are this design's choices.
//
// Interface: start (pulse, accepted while idle) starts a run; busy is high
// until done pulses. lv_start/level_done/band_len/last_level talk to
// level_select. Memory: raddr (data back one clock later on rdata), we/waddr/
// wdata. Boundary process: ld_*, bp_start/bp_done, bp_rd_idx/bp_rd_data.
// Timing per line: 2*band_len + band_len/2 + about 25 clocks.
module mem_ctrl #(
  parameter int unsigned N  = 512,            // image side, a power of two
  parameter int unsigned DW = 16,
  parameter int unsigned IW = $clog2(N),
  parameter int unsigned AW = 2 * IW,
  parameter int unsigned LW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  // level select
  output logic          lv_start,
  output logic          level_done,
  input  logic [LW-1:0] band_len,
  input  logic          last_level,
  // memory
  output logic [AW-1:0] raddr,
  input  logic [DW-1:0] rdata,
  output logic          we,
  output logic [AW-1:0] waddr,
  output logic [DW-1:0] wdata,
  // boundary process
  output logic [LW-1:0] bp_len,
  output logic          ld_we,
  output logic [IW-1:0] ld_idx,
  output logic [DW-1:0] ld_data,
  output logic          bp_start,
  input  logic          bp_done,
  output logic [IW-1:0] bp_rd_idx,
  input  logic [DW-1:0] bp_rd_data
);

  if ((1 << IW) != N) begin : g_bad_n
    $error("mem_ctrl: N must be a power of two");
  end

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_READ, S_TAIL, S_RUN, S_WRITE, S_NEXT} state_t;
  typedef enum logic {P_ROW, P_COL} pass_t;

  state_t        state;
  pass_t         pass;
  logic [IW-1:0] line;    // row or column being transformed
  logic [IW-1:0] i;       // sample within the line
  logic          rd_pend;
  logic [IW-1:0] rd_idx_q;

  logic [IW-1:0] last_i;
  assign last_i = IW'(band_len - 1'b1);

  // memory address of sample i of the current line
  function automatic logic [AW-1:0] addr_of(pass_t ps, logic [IW-1:0] ln, logic [IW-1:0] k);
    return (ps == P_ROW) ? {ln, k} : {k, ln};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      pass     <= P_ROW;
      line     <= '0;
      i        <= '0;
      rd_pend  <= 1'b0;
      rd_idx_q <= '0;
      done     <= 1'b0;
    end else begin
      done     <= 1'b0;
      rd_pend  <= (state == S_READ);
      rd_idx_q <= i;
      case (state)
        S_IDLE: if (start) state <= S_INIT;
        S_INIT: begin                     // band_len is valid from here
          pass  <= P_ROW;
          line  <= '0;
          i     <= '0;
          state <= S_READ;
        end
        S_READ: begin
          i <= i + 1'b1;
          if (i == last_i) state <= S_TAIL;
        end
        S_TAIL: state <= S_RUN;           // last word lands in the line buffer
        S_RUN: if (bp_done) begin
          i     <= '0;
          state <= S_WRITE;
        end
        S_WRITE: begin
          i <= i + 1'b1;
          if (i == last_i) state <= S_NEXT;
        end
        S_NEXT: begin
          i <= '0;
          if (line == last_i) begin
            line <= '0;
            if (pass == P_ROW) begin
              pass  <= P_COL;
              state <= S_READ;
            end else if (last_level) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_INIT;
            end
          end else begin
            line  <= line + 1'b1;
            state <= S_READ;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy       = (state != S_IDLE);
  assign lv_start   = (state == S_IDLE) && start;
  assign level_done = (state == S_NEXT) && (line == last_i) && (pass == P_COL);

  assign raddr    = addr_of(pass, line, i);
  assign ld_we    = rd_pend;
  assign ld_idx   = rd_idx_q;
  assign ld_data  = rdata;
  assign bp_len   = band_len;
  assign bp_start = (state == S_TAIL);

  assign we        = (state == S_WRITE);
  assign waddr     = addr_of(pass, line, i);
  assign bp_rd_idx = i;
  assign wdata     = bp_rd_data;

endmodule

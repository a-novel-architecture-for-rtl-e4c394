// boundary_process - symmetric boundary extension around the 1D lifting core.
//
// A line of LEN samples (LEN even, 8 <= LEN <= N_MAX) is first loaded into a
// line buffer, one sample per clock. On start the block streams the line to
// the 1D-DWT core as even/odd pairs, one pair per clock, extended by EXT = 4
// mirrored samples on each side: x(-i) = x(i) and x(LEN-1+i) = x(LEN-1-i).
// Four samples are what the four lifting steps of the 9/7 wavelet reach past
// an edge, so the coefficients of the real samples come out exactly as if the
// line continued symmetrically. Pair p (0 .. LEN/2+3) carries the side-band
// tag {keep, p-4}: because the core's output n appears with the tag of pair
// n+2 and the extension adds two pairs in front, the results that carry
// keep = 1 are exactly the LEN/2 coefficient pairs of the real line, and the
// tag gives their position. Those results are cut to DW bits (saturated) and
// stored in a low-band and a high-band buffer; rd_idx then reads the line back
// in band order (low band in 0 .. LEN/2-1, high band in LEN/2 .. LEN-1).
// Mirroring the edges follows the document; the line buffers, the tag scheme
// and saturation to the memory word are this design's choices.
//
// Timing: loading takes LEN clocks, streaming LEN/2 + 4 clocks, and done
// pulses when the last kept result is stored, 18 clocks (the core latency)
// after the last pair. rd_data is combinational from rd_idx.
module boundary_process
  import dwt_pkg::*;
#(
  parameter int unsigned N_MAX = 512,   // longest line
  parameter int unsigned DW    = 16,    // memory word width, signed
  parameter int unsigned LW    = $clog2(N_MAX + 1),
  parameter int unsigned IW    = $clog2(N_MAX),
  parameter int unsigned TAG_W = $clog2(N_MAX / 2) + 1,
  parameter int unsigned WO    = DW + GUARD_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [LW-1:0]        len,
  // line load
  input  logic                 ld_we,
  input  logic [IW-1:0]        ld_idx,
  input  logic signed [DW-1:0] ld_data,
  // control
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  // to the 1D-DWT core
  output logic                 pair_valid,
  output logic signed [DW-1:0] pair_even,
  output logic signed [DW-1:0] pair_odd,
  output logic [TAG_W-1:0]     pair_tag,
  // from the 1D-DWT core
  input  logic                 res_valid,
  input  logic signed [WO-1:0] res_low,
  input  logic signed [WO-1:0] res_high,
  input  logic [TAG_W-1:0]     res_tag,
  // read back of the transformed line
  input  logic [IW-1:0]        rd_idx,
  output logic signed [DW-1:0] rd_data,
  // a result was out of the DW-bit range and was saturated
  output logic                 sat_event
);

  localparam int unsigned MW = TAG_W - 1;          // width of a pair number
  localparam int unsigned PW = $clog2(N_MAX / 2 + EXT + 1);
  localparam int signed   SMAX = (1 <<< (DW - 1)) - 1;
  localparam int signed   SMIN = -(1 <<< (DW - 1));

  typedef enum logic [1:0] {S_IDLE, S_STREAM, S_DRAIN} state_t;
  state_t state;

  logic signed [DW-1:0] line_buf [N_MAX];
  logic signed [DW-1:0] lo_buf   [N_MAX/2];
  logic signed [DW-1:0] hi_buf   [N_MAX/2];

  logic [LW-1:0] len_q;
  logic [PW-1:0] p;                                 // pair counter

  always_ff @(posedge clk) begin
    if (ld_we) line_buf[ld_idx] <= ld_data;
  end

  // ---------------- mirrored read of the extended line ----------------------
  function automatic logic [IW-1:0] mirror(int signed i, int signed n);
    int signed j;
    j = i;
    if (j < 0) j = -j;
    if (j >= n) j = 2 * (n - 1) - j;
    return IW'(j);
  endfunction

  int signed ie, io;
  always_comb begin
    ie = 2 * int'(p) - int'(EXT);
    io = ie + 1;
    pair_even  = line_buf[mirror(ie, int'(len_q))];
    pair_odd   = line_buf[mirror(io, int'(len_q))];
    pair_valid = (state == S_STREAM);
    pair_tag   = {(p >= PW'(EXT)), MW'(p - PW'(EXT))};
  end

  // ---------------- sequencing ----------------------------------------------
  logic last_res;
  assign last_res = res_valid && res_tag[TAG_W-1] &&
                    (res_tag[MW-1:0] == MW'((len_q >> 1) - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      p     <= '0;
      len_q <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state <= S_STREAM;
          p     <= '0;
          len_q <= len;
        end
        S_STREAM: begin
          if (p == PW'((len_q >> 1) + EXT - 1)) state <= S_DRAIN;
          p <= p + 1'b1;
        end
        S_DRAIN: if (last_res) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
  assign busy = (state != S_IDLE);

  // ---------------- result capture with saturation --------------------------
  function automatic logic signed [DW-1:0] sat(logic signed [WO-1:0] v);
    if (v > WO'(SMAX)) return DW'(SMAX);
    if (v < WO'(SMIN)) return DW'(SMIN);
    return DW'(v);
  endfunction

  logic keep;
  assign keep = res_valid && res_tag[TAG_W-1] && (state == S_DRAIN || state == S_STREAM);

  always_ff @(posedge clk) begin
    if (keep) begin
      lo_buf[res_tag[MW-1:0]] <= sat(res_low);
      hi_buf[res_tag[MW-1:0]] <= sat(res_high);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sat_event <= 1'b0;
    else        sat_event <= keep && ((sat(res_low) != DW'(res_low)) ||
                                      (sat(res_high) != DW'(res_high)));
  end

  // ---------------- read back in band order ---------------------------------
  logic [IW-1:0] half;
  assign half = IW'(len_q >> 1);
  always_comb begin
    if (rd_idx < half) rd_data = lo_buf[MW'(rd_idx)];
    else               rd_data = hi_buf[MW'(rd_idx - half)];
  end

  // a line must be even, at least 2*EXT long and fit the buffer
  property p_len_ok;
    @(posedge clk) disable iff (!rst_n)
      start && state == S_IDLE |-> (len[0] == 1'b0 && len >= LW'(2 * EXT) && len <= LW'(N_MAX));
  endproperty
  a_len_ok: assert property (p_len_ok) else $error("boundary_process: bad line length %0d", len);

endmodule

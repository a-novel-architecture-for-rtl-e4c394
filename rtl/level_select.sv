// level_select - wavelet level select of the 2D-DWT.
//
// Holds how many decomposition levels a run performs and which level is being
// computed. On start the requested count cfg_levels is captured, clamped to
// 1 .. MAX_LEVELS (a request of 0 runs one level, a request above MAX_LEVELS
// runs MAX_LEVELS), and the current level is set to 0. Each level_done pulse
// from the memory control advances the level; after the last one all_done
// pulses and the block goes idle. For the current level it gives the side of
// the band still to be transformed: band_len = N >> level (the LL band of
// the previous level, which the next level works on), and last_level.
// A selectable level count and passing the LL band on to the next level follow
// the document; clamping, and the pulse interface, are this design's.
// Timing: outputs are registered; band_len is valid the clock after start
// and the clock after each level_done.
module level_select #(
  parameter int unsigned N          = 512,  // image side
  parameter int unsigned MAX_LEVELS = 5,    // deepest decomposition
  parameter int unsigned LVW        = $clog2(MAX_LEVELS + 1),
  parameter int unsigned LW         = $clog2(N + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [LVW-1:0] cfg_levels,
  input  logic           start,
  input  logic           level_done,
  output logic           active,
  output logic [LVW-1:0] level,        // level being computed, from 0
  output logic [LVW-1:0] levels,       // levels of this run
  output logic [LW-1:0]  band_len,
  output logic           last_level,
  output logic           all_done
);

  // the smallest band must still be 8 samples wide for the 4-sample mirror
  if ((N >> (MAX_LEVELS - 1)) < 8) begin : g_bad_size
    $error("level_select: N >> (MAX_LEVELS-1) must be at least 8");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= 1'b0;
      level    <= '0;
      levels   <= LVW'(1);
      all_done <= 1'b0;
    end else begin
      all_done <= 1'b0;
      if (start && !active) begin
        active <= 1'b1;
        level  <= '0;
        if (cfg_levels == '0)                     levels <= LVW'(1);
        else if (cfg_levels > LVW'(MAX_LEVELS))   levels <= LVW'(MAX_LEVELS);
        else                                      levels <= cfg_levels;
      end else if (active && level_done) begin
        if (last_level) begin
          active   <= 1'b0;
          all_done <= 1'b1;
        end else begin
          level <= level + 1'b1;
        end
      end
    end
  end

  assign band_len   = LW'(N >> level);
  assign last_level = (level == levels - 1'b1);

endmodule

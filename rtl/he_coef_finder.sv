// he_coef_finder: the coefficient-finder block of the histogram equalizer.
//
// Started by the statistics block at the beginning of vertical blanking, it
// turns the field's histogram into the gray-level mapping used for the next
// field and writes it into the shared coefficient RAM:
//
//   map(v) = min(255, ((cdf(v) - n_low) * gain) >> FRAC)
//
// where cdf(v) is the number of pixels at or below level v, n_low the count
// of the lowest level and gain = ceil(255 * 2^FRAC / (total - n_low)) from
// he_gain_finder. The lowest level therefore maps to 0 and the highest to 255,
// and each level widens in proportion to its share of the histogram.
//
// Sequence: latch the statistics, run the gain finder (about 27 clocks), then
// scan all LEVELS bins, one per clock, through the histogram scan port (which
// clears them). The table covers MAP_DEPTH levels starting at the field's
// lowest level (map_low), one RAM word per level at MAP_BASE + (v - map_low);
// the compression block sends levels above that window to 255. busy is high
// from start to done (about LEVELS + 30 clocks); while it is high the block
// owns the coefficient RAM write port. The thesis says what the block does and
// that it fills the 1kx18 RAM; the formula, the window and the timing are this
// design's choices.
//
// Lint note: the gain finder's busy output (g_busy) is not needed, since the
// state machine waits for done; it stays unused.
module he_coef_finder
  import ir_pkg::*;
#(
  parameter int unsigned LEVELS    = 4096,
  parameter int unsigned CNT_W     = 18,
  parameter int unsigned FRAC      = 16,
  parameter int unsigned MAP_BASE_P  = MAP_BASE,
  parameter int unsigned MAP_DEPTH_P = MAP_DEPTH,
  localparam int unsigned LW = $clog2(LEVELS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [LW-1:0]      stat_low,
  input  logic [CNT_W-1:0]   stat_low_cnt,
  input  logic [CNT_W-1:0]   stat_total,
  // histogram scan port
  output logic               scan_en,
  output logic [LW-1:0]      scan_addr,
  input  logic [CNT_W-1:0]   scan_q,
  // coefficient RAM write port
  output logic               cw_en,
  output logic [COEF_AW-1:0] cw_addr,
  output logic [COEF_W-1:0]  cw_data,
  // mapping window for the compression block
  output logic [LW-1:0]      map_low,
  output logic               busy,
  output logic               done
);
  localparam int unsigned GAIN_W = FRAC + 10;

  typedef enum logic [1:0] {IDLE, GAIN, SCAN, FLUSH} state_e;
  state_e state;

  logic              g_start, g_busy, g_done;
  logic [GAIN_W-1:0] gain_q, gain;
  logic [CNT_W-1:0]  low_cnt;
  logic [CNT_W-1:0]  cdf;
  logic [CNT_W-1:0]  cdf_new;
  logic              rd_valid;
  logic [LW-1:0]     rd_level;
  logic [LW-1:0]     rel;
  logic              in_window;
  logic [CNT_W+GAIN_W-1:0] scaled;
  logic [7:0]        mapped;

  he_gain_finder #(.DEN_W(CNT_W), .FRAC(FRAC)) u_gain (
    .clk   (clk),
    .rst_n (rst_n),
    .start (g_start),
    .den   (stat_total - stat_low_cnt),
    .busy  (g_busy),
    .done  (g_done),
    .gain  (gain_q)
  );

  assign g_start   = (state == IDLE) && start;
  assign scan_en   = (state == SCAN);
  assign busy      = (state != IDLE);

  // mapping arithmetic for the bin read in the previous clock
  assign cdf_new   = cdf + scan_q;
  assign rel       = rd_level - map_low;
  assign in_window = (rd_level >= map_low) && (32'(rel) < MAP_DEPTH_P);
  assign scaled    = (CNT_W+GAIN_W)'(cdf_new - low_cnt) * (CNT_W+GAIN_W)'(gain);
  assign mapped    = ((scaled >> FRAC) > 255) ? 8'd255 : 8'(scaled >> FRAC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      scan_addr <= '0;
      map_low   <= '0;
      low_cnt   <= '0;
      gain      <= '0;
      cdf       <= '0;
      rd_valid  <= 1'b0;
      rd_level  <= '0;
      cw_en     <= 1'b0;
      cw_addr   <= '0;
      cw_data   <= '0;
      done      <= 1'b0;
    end else begin
      done  <= 1'b0;
      cw_en <= 1'b0;
      rd_valid <= scan_en;
      rd_level <= scan_addr;
      if (rd_valid) begin
        cdf <= cdf_new;
        if (in_window) begin
          cw_en   <= 1'b1;
          cw_addr <= COEF_AW'(MAP_BASE_P + 32'(rel));
          cw_data <= COEF_W'(mapped);
        end
      end
      unique case (state)
        IDLE: if (start) begin
          map_low <= stat_low;
          low_cnt <= stat_low_cnt;
          state   <= GAIN;
        end
        GAIN: if (g_done) begin
          gain      <= gain_q;
          cdf       <= '0;
          scan_addr <= '0;
          state     <= SCAN;
        end
        SCAN: begin
          scan_addr <= scan_addr + 1'b1;
          if (scan_addr == LW'(LEVELS - 1)) state <= FLUSH;
        end
        FLUSH: if (!rd_valid && !cw_en) begin
          state <= IDLE;
          done  <= 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule

// histogram_stats: the statistics block of the histogram equalizer.
//
// For every field it counts how many pixels fall on each of the LEVELS gray
// levels, in a LEVELS x CNT_W dual-port RAM (dpram4kx18 in the thesis). Each
// active pixel is a read-modify-write: the bin is read on the clock the pixel
// arrives and written back incremented one clock later; a one-entry bypass
// supplies the fresh count when the same level arrives twice in a row. Next
// to the histogram the block keeps the lowest level of the field, how many
// pixels sit on it, and the pixel total; these are latched into stat_* when
// vertical blanking starts, and field_done pulses two clocks later, once the
// last write has landed.
//
// During blanking the coefficient finder reads the bins through the scan
// port (data one clock after scan_addr); every bin read is cleared in the same
// clock so the RAM is empty for the next field. After reset the block clears
// the RAM itself (ready rises LEVELS clocks later) and starts counting at the
// next vertical blanking. Levels of the lowest-level tracker, the bypass and
// the clear-on-read are this design's choices; the thesis only names the
// block and its RAM.
//
// Lint note: the RAM's port B read data is left open on purpose - port B
// only writes here.
module histogram_stats
  import ir_pkg::*;
#(
  parameter int unsigned LEVELS = 4096,
  parameter int unsigned CNT_W  = 18,
  localparam int unsigned LW = $clog2(LEVELS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [LW-1:0]    in_pix,
  input  sync_t            in_sync,
  output logic             ready,
  output logic             field_done,
  output logic [LW-1:0]    stat_low,
  output logic [CNT_W-1:0] stat_low_cnt,
  output logic [CNT_W-1:0] stat_total,
  input  logic             scan_en,
  input  logic [LW-1:0]    scan_addr,
  output logic [CNT_W-1:0] scan_q
);
  logic [LW-1:0]    clr_addr;
  logic             armed;
  logic             vblank_d;
  logic             take;
  logic             s1_valid;
  logic [LW-1:0]    s1_addr;
  logic             fwd_valid;
  logic [LW-1:0]    fwd_addr;
  logic [CNT_W-1:0] fwd_data;
  logic [CNT_W-1:0] rd_q;
  logic [CNT_W-1:0] cur;
  logic [CNT_W-1:0] inc;
  logic [LW-1:0]    run_low;
  logic [CNT_W-1:0] run_low_cnt;
  logic [CNT_W-1:0] run_total;
  logic [1:0]       done_sr;
  logic             vb_rise;

  assign take    = armed && is_active(in_sync);
  assign vb_rise = in_sync.vblank && !vblank_d;

  // RAM port A: pixel reads during video, scan reads during blanking
  logic          a_en;
  logic [LW-1:0] a_addr;
  assign a_en   = take || scan_en;
  assign a_addr = take ? in_pix : scan_addr;
  assign scan_q = rd_q;

  // port B: reset clear, increment write-back, clear-on-scan
  logic             b_we;
  logic [LW-1:0]    b_addr;
  logic [CNT_W-1:0] b_din;

  assign cur = (fwd_valid && fwd_addr == s1_addr) ? fwd_data : rd_q;
  assign inc = (cur == '1) ? cur : cur + 1'b1;

  always_comb begin
    if (!ready) begin
      b_we = 1'b1; b_addr = clr_addr;  b_din = '0;
    end else if (s1_valid) begin
      b_we = 1'b1; b_addr = s1_addr;   b_din = inc;
    end else if (scan_en) begin
      b_we = 1'b1; b_addr = scan_addr; b_din = '0;
    end else begin
      b_we = 1'b0; b_addr = scan_addr; b_din = '0;
    end
  end

  dpram #(.DEPTH(LEVELS), .WIDTH(CNT_W)) u_hist (
    .clk    (clk),
    .a_en   (a_en),
    .a_addr (a_addr),
    .a_q    (rd_q),
    .b_en   (b_we),
    .b_we   (b_we),
    .b_addr (b_addr),
    .b_din  (b_din),
    .b_q    ()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clr_addr     <= '0;
      ready        <= 1'b0;
      armed        <= 1'b0;
      vblank_d     <= 1'b0;
      s1_valid     <= 1'b0;
      s1_addr      <= '0;
      fwd_valid    <= 1'b0;
      fwd_addr     <= '0;
      fwd_data     <= '0;
      run_low      <= '1;
      run_low_cnt  <= '0;
      run_total    <= '0;
      stat_low     <= '0;
      stat_low_cnt <= '0;
      stat_total   <= '0;
      done_sr      <= '0;
    end else begin
      vblank_d <= in_sync.vblank;
      if (!ready) begin
        clr_addr <= clr_addr + 1'b1;
        if (clr_addr == LW'(LEVELS - 1)) ready <= 1'b1;
      end
      // read-modify-write pipeline
      s1_valid  <= take;
      s1_addr   <= in_pix;
      fwd_valid <= s1_valid;
      fwd_addr  <= s1_addr;
      fwd_data  <= inc;
      // field statistics
      if (take) begin
        if (run_total != '1) run_total <= run_total + 1'b1;
        if (in_pix < run_low) begin
          run_low     <= in_pix;
          run_low_cnt <= CNT_W'(1);
        end else if (in_pix == run_low && run_low_cnt != '1) begin
          run_low_cnt <= run_low_cnt + 1'b1;
        end
      end
      done_sr <= {done_sr[0], 1'b0};
      if (vb_rise) begin
        if (ready) armed <= 1'b1;
        if (armed) begin
          stat_low     <= run_low;
          stat_low_cnt <= run_low_cnt;
          stat_total   <= run_total;
          done_sr[0]   <= 1'b1;
        end
        run_low     <= '1;
        run_low_cnt <= '0;
        run_total   <= '0;
      end
    end
  end

  assign field_done = done_sr[1];
endmodule

// conv5x5: the convolution block of the 5x5 filter.
//
// Each of the five line taps feeds a five-stage shift register, so the block
// holds a 5x5 window that moves one column per active pixel. Every window
// pixel is multiplied by its coefficient, the five products of each line are
// summed, and the five line sums are added into the output - summing per line
// first keeps the adder chain short, as in the thesis.
//
// Coefficients are 18-bit sign-magnitude: bit 17 is the sign, bits 16:13 the
// integer part and bits 12:0 the fraction (1.0 = 0x02000). Coefficient (r,c),
// r,c = 1..5, multiplies the pixel of the oldest-but-(r-1) line (row 1 is the
// line five lines back, taps[4]; row 5 is taps[0]) and column c of the window
// (column 1 is the oldest pixel). The coefficients are copied from the shared
// coefficient RAM (words FILT_BASE..FILT_BASE+24, row-major) into registers
// when vertical blanking reaches the block's output, which takes NTAPS+1
// clocks (coef_busy). Waiting for the output (four clocks after blanking
// starts at the input) lets the last pixels of the field finish with the old
// set, and keeps the loader off the RAM read port while the equalizer behind
// the filter is still reading its table. After reset the registers hold the
// impulse response (centre 1.0, rest 0).
//
// Timing: the window is loaded on the clock a tap is valid; products,
// line sums and total each take one register stage, so a window completed on
// clock n appears on sum/out_pix at clock n+3 - the first output of a line
// comes on the 8th clock after its first pixel entered the window. sum is the
// exact signed sum (13 fraction bits); out_pix is sum with the fraction
// dropped (rounded down), clipped to 0..2^PIX_W-1. out_sync is in_sync
// delayed by four clocks (window register plus three pipeline stages), so
// out_sync marks the outputs that belong to active input pixels.
module conv5x5
  import ir_pkg::*;
#(
  parameter int unsigned PIX_W = 16,
  parameter int unsigned SUM_W = 42
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [PIX_W-1:0]         taps [5],
  input  sync_t                    in_sync,
  // coefficient RAM read port (data one clock after address)
  output logic                     cr_en,
  output logic [COEF_AW-1:0]       cr_addr,
  input  logic [COEF_W-1:0]        cr_q,
  output logic                     coef_busy,
  output logic signed [SUM_W-1:0]  sum,
  output logic [PIX_W-1:0]         out_pix,
  output sync_t                    out_sync
);
  localparam int unsigned MAG_W  = COEF_W - 1;
  localparam int unsigned PROD_W = PIX_W + MAG_W + 1;
  localparam int unsigned LSUM_W = PROD_W + 3;

  logic [COEF_W-1:0]        coef [5][5];
  logic [PIX_W-1:0]         win  [5][5];
  logic signed [PROD_W-1:0] prod [5][5];
  logic signed [LSUM_W-1:0] lsum [5];
  sync_t                    sync_d [4];
  logic                     vblank_d;

  // ---------------- coefficient loading at the start of each field
  logic       ld_run, ld_v;
  logic [4:0] ld_cnt, ld_idx;

  assign cr_en     = ld_run;
  assign cr_addr   = COEF_AW'(FILT_BASE) + COEF_AW'(ld_cnt);
  assign coef_busy = ld_run || ld_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_run   <= 1'b0;
      ld_v     <= 1'b0;
      ld_cnt   <= '0;
      ld_idx   <= '0;
      vblank_d <= 1'b1;
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++)
          coef[r][c] <= (r == 2 && c == 2) ? COEF_ONE : '0;
    end else begin
      vblank_d <= sync_d[3].vblank;
      ld_v     <= ld_run;
      ld_idx   <= ld_cnt;
      if (sync_d[3].vblank && !vblank_d) begin
        ld_run <= 1'b1;
        ld_cnt <= '0;
      end else if (ld_run) begin
        if (ld_cnt == 5'(NTAPS - 1)) ld_run <= 1'b0;
        else                         ld_cnt <= ld_cnt + 1'b1;
      end
      if (ld_v) coef[ld_idx / 5][ld_idx % 5] <= cr_q;
    end
  end

  // ---------------- window, multiply, line sums, total
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 5; r++) begin
        lsum[r] <= '0;
        for (int c = 0; c < 5; c++) begin
          win[r][c]  <= '0;
          prod[r][c] <= '0;
        end
      end
      sum     <= '0;
      for (int i = 0; i < 4; i++) sync_d[i] <= '{vblank: 1'b1, hblank: 1'b1};
    end else begin
      if (is_active(in_sync)) begin
        for (int r = 0; r < 5; r++) begin
          for (int c = 0; c < 4; c++) win[r][c] <= win[r][c+1];
          win[r][4] <= taps[4-r];
        end
      end
      for (int r = 0; r < 5; r++) begin
        for (int c = 0; c < 5; c++) begin
          if (coef[r][c][COEF_W-1])
            prod[r][c] <= -$signed(PROD_W'(win[r][c]) * PROD_W'(coef[r][c][MAG_W-1:0]));
          else
            prod[r][c] <= $signed(PROD_W'(win[r][c]) * PROD_W'(coef[r][c][MAG_W-1:0]));
        end
        lsum[r] <= LSUM_W'(prod[r][0]) + LSUM_W'(prod[r][1]) + LSUM_W'(prod[r][2])
                 + LSUM_W'(prod[r][3]) + LSUM_W'(prod[r][4]);
      end
      sum <= SUM_W'(lsum[0]) + SUM_W'(lsum[1]) + SUM_W'(lsum[2])
           + SUM_W'(lsum[3]) + SUM_W'(lsum[4]);
      sync_d[0] <= in_sync;
      sync_d[1] <= sync_d[0];
      sync_d[2] <= sync_d[1];
      sync_d[3] <= sync_d[2];
    end
  end

  assign out_sync = sync_d[3];
  // integer part, clipped
  logic signed [SUM_W-1:0] int_part;
  assign int_part = sum >>> COEF_FRAC;
  always_comb begin
    if (int_part < 0)                                      out_pix = '0;
    else if (int_part > $signed(SUM_W'({PIX_W{1'b1}})))    out_pix = '1;
    else                                                   out_pix = PIX_W'(int_part);
  end
endmodule

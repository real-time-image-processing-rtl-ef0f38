// nuc_correct: two-point non-uniformity correction, Cp = Tp * Gp + Op.
//
// Every detector pixel has its own gain Gp and offset Op, measured against two
// uniform black-body scenes so that all pixels map each scene to the array
// average (two-point correction, as in the thesis). The coefficients are
// computed off-line and written through the cal_* port into one memory word
// per pixel: gain unsigned with GAIN_FRAC fraction bits, offset signed in
// pixel units. After reset the block fills the memory with unity gain and
// zero offset (init_done rises when finished, NPIX clocks later), so the
// image passes unchanged until a calibration is loaded.
//
// Timing: a pixel counter, cleared in vertical blanking, addresses the
// coefficient memory for each active pixel. The result, rounded and clipped
// to 0..2^PIX_W-1, leaves two clocks after the pixel entered, with its
// blanking flags delayed by the same two clocks. Coefficient widths, rounding
// and the reset fill are this design's choices.
//
// Lint note: the RAM's port B read data is left open on purpose - port B
// only writes here.
module nuc_correct
  import ir_pkg::*;
#(
  parameter int unsigned PIX_W     = 16,
  parameter int unsigned NPIX      = 76800,
  parameter int unsigned GAIN_W    = 16,
  parameter int unsigned GAIN_FRAC = 14,
  parameter int unsigned OFFS_W    = 16,
  localparam int unsigned AW = $clog2(NPIX)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [PIX_W-1:0]         in_pix,
  input  sync_t                    in_sync,
  output logic [PIX_W-1:0]         out_pix,
  output sync_t                    out_sync,
  // calibration load port
  input  logic                     cal_we,
  input  logic [AW-1:0]            cal_addr,
  input  logic [GAIN_W-1:0]        cal_gain,
  input  logic signed [OFFS_W-1:0] cal_offset,
  output logic                     init_done
);
  localparam int unsigned CW   = GAIN_W + OFFS_W;
  localparam int unsigned ACCW = PIX_W + GAIN_W + 2;

  logic [AW-1:0] pix_idx;
  logic [AW-1:0] init_addr;
  logic [CW-1:0] coef_q;
  logic [CW-1:0] wr_word;
  logic [AW-1:0] wr_addr;
  logic          wr_en;

  // pixel counter: one address per active pixel, restart in vertical blanking
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                pix_idx <= '0;
    else if (in_sync.vblank)   pix_idx <= '0;
    else if (is_active(in_sync) && pix_idx != AW'(NPIX - 1)) pix_idx <= pix_idx + 1'b1;
  end

  // reset fill with unity gain / zero offset, then the calibration port
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_addr <= '0;
      init_done <= 1'b0;
    end else if (!init_done) begin
      if (init_addr == AW'(NPIX - 1)) init_done <= 1'b1;
      else                            init_addr <= init_addr + 1'b1;
    end
  end

  always_comb begin
    if (!init_done) begin
      wr_en   = 1'b1;
      wr_addr = init_addr;
      wr_word = {GAIN_W'(1) << GAIN_FRAC, OFFS_W'(0)};
    end else begin
      wr_en   = cal_we;
      wr_addr = cal_addr;
      wr_word = {cal_gain, cal_offset};
    end
  end

  dpram #(.DEPTH(NPIX), .WIDTH(CW)) u_coef (
    .clk    (clk),
    .a_en   (1'b1),
    .a_addr (pix_idx),
    .a_q    (coef_q),
    .b_en   (wr_en),
    .b_we   (wr_en),
    .b_addr (wr_addr),
    .b_din  (wr_word),
    .b_q    ()
  );

  // stage 1: pixel waits for its coefficients
  logic [PIX_W-1:0] pix_s1;
  sync_t            sync_s1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix_s1  <= '0;
      sync_s1 <= '{vblank: 1'b1, hblank: 1'b1};
    end else begin
      pix_s1  <= in_pix;
      sync_s1 <= in_sync;
    end
  end

  // stage 2: multiply-add, round, clip
  logic [GAIN_W-1:0]        gain;
  logic signed [OFFS_W-1:0] offs;
  logic signed [ACCW-1:0]   acc;
  logic signed [ACCW-1:0]   res;
  assign gain = coef_q[CW-1 -: GAIN_W];
  assign offs = coef_q[OFFS_W-1:0];

  logic [PIX_W+GAIN_W-1:0]  prod;
  assign prod = (PIX_W+GAIN_W)'(pix_s1) * (PIX_W+GAIN_W)'(gain);

  always_comb begin
    acc = $signed({2'b00, prod})
        + ($signed(ACCW'(offs)) <<< GAIN_FRAC)
        + $signed(ACCW'(1) << (GAIN_FRAC - 1));
    res = acc >>> GAIN_FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_pix  <= '0;
      out_sync <= '{vblank: 1'b1, hblank: 1'b1};
    end else begin
      out_sync <= sync_s1;
      if (res < 0)                                out_pix <= '0;
      else if (res > $signed(ACCW'({PIX_W{1'b1}}))) out_pix <= '1;
      else                                        out_pix <= PIX_W'(res);
    end
  end
endmodule

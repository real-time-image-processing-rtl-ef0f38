// filter5x5: the real-time 5x5 FIR filtering hardware.
//
// The FIFO controller (line_fifo_ctrl) turns the pixel stream into five
// line-delayed streams and the convolution block (conv5x5) forms the weighted
// sum of the 5x5 window with the coefficients held in the shared coefficient
// RAM. Loading a new filter only means writing new words into that RAM; the
// convolution block picks them up at the next vertical blanking.
//
// Timing: sum / out_pix / out_sync follow a pixel by 5 clocks (1 in the line
// FIFOs, 4 in the convolution block). The window uses the five lines
// before the current one, so an output belongs to the window whose lower-right
// corner is the pixel one line above and which ends at the current column;
// the first four outputs of each line still contain pixels from the end of
// the previous line. The thesis leaves the image borders unspecified; they are
// not treated specially here.
//
// Lint note: the FIFO controller's delayed pixel (fifo_pix) is not needed -
// the convolution takes all five rows from the taps - so it stays unused.
module filter5x5
  import ir_pkg::*;
#(
  parameter int unsigned PIX_W      = 16,
  parameter int unsigned LINE_DEPTH = 512,
  parameter int unsigned SUM_W      = 42
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [PIX_W-1:0]        in_pix,
  input  sync_t                   in_sync,
  output logic                    cr_en,
  output logic [COEF_AW-1:0]      cr_addr,
  input  logic [COEF_W-1:0]       cr_q,
  output logic                    coef_busy,
  output logic signed [SUM_W-1:0] sum,
  output logic [PIX_W-1:0]        out_pix,
  output sync_t                   out_sync
);
  logic [PIX_W-1:0] taps [5];
  logic [PIX_W-1:0] fifo_pix;
  sync_t            fifo_sync;

  line_fifo_ctrl #(.PIX_W(PIX_W), .LINE_DEPTH(LINE_DEPTH), .NLINES(5)) u_fifo (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_pix   (in_pix),
    .in_sync  (in_sync),
    .taps     (taps),
    .out_pix  (fifo_pix),
    .out_sync (fifo_sync)
  );

  conv5x5 #(.PIX_W(PIX_W), .SUM_W(SUM_W)) u_conv (
    .clk       (clk),
    .rst_n     (rst_n),
    .taps      (taps),
    .in_sync   (fifo_sync),
    .cr_en     (cr_en),
    .cr_addr   (cr_addr),
    .cr_q      (cr_q),
    .coef_busy (coef_busy),
    .sum       (sum),
    .out_pix   (out_pix),
    .out_sync  (out_sync)
  );
endmodule

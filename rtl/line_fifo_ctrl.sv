// line_fifo_ctrl: the FIFO controller of the 5x5 filter.
//
// A 5x5 window needs the same column of five image lines at once. NLINES
// one-line FIFOs are cascaded: FIFO 1 stores the incoming line, FIFO k stores
// what FIFO k-1 puts out, so FIFO k delivers the pixel k lines above the
// current one. Each FIFO is a LINE_DEPTH-word RAM addressed by the column
// counter (cleared in every blanking interval). For each active pixel all
// FIFOs read the column on one clock and write the new data into the same
// location on the next clock, so every RAM word is reused and no separate read
// and write pointers are needed - the scheme the thesis describes.
//
// Timing: taps[k-1] (FIFO k's output), out_pix and out_sync describe the pixel
// that entered one clock earlier; out_sync carries the blanking flags of that
// pixel. Lines longer than LINE_DEPTH are not supported.
//
// Lint note: the RAMs' port B read data is left open on purpose - port B
// only writes here.
module line_fifo_ctrl
  import ir_pkg::*;
#(
  parameter int unsigned PIX_W      = 16,
  parameter int unsigned DATA_W     = 18,
  parameter int unsigned LINE_DEPTH = 512,
  parameter int unsigned NLINES     = 5,
  localparam int unsigned AW = $clog2(LINE_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PIX_W-1:0] in_pix,
  input  sync_t            in_sync,
  output logic [PIX_W-1:0] taps [NLINES],
  output logic [PIX_W-1:0] out_pix,
  output sync_t            out_sync
);
  logic [AW-1:0]     col;
  logic              act;
  logic              s1_valid;
  logic [AW-1:0]     s1_addr;
  logic [DATA_W-1:0] q   [NLINES];
  logic [DATA_W-1:0] din [NLINES];

  assign act = is_active(in_sync);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col      <= '0;
      s1_valid <= 1'b0;
      s1_addr  <= '0;
      out_pix  <= '0;
      out_sync <= '{vblank: 1'b1, hblank: 1'b1};
    end else begin
      col      <= act ? col + 1'b1 : '0;
      s1_valid <= act;
      s1_addr  <= col;
      out_pix  <= in_pix;
      out_sync <= in_sync;
    end
  end

  for (genvar k = 0; k < NLINES; k++) begin : g_fifo
    if (k == 0) begin : g_first
      assign din[k] = DATA_W'(out_pix);
    end else begin : g_next
      assign din[k] = q[k-1];
    end
    // read this column now, overwrite it one clock later
    dpram #(.DEPTH(LINE_DEPTH), .WIDTH(DATA_W)) u_line (
      .clk    (clk),
      .a_en   (act),
      .a_addr (col),
      .a_q    (q[k]),
      .b_en   (s1_valid),
      .b_we   (s1_valid),
      .b_addr (s1_addr),
      .b_din  (din[k]),
      .b_q    ()
    );
    assign taps[k] = q[k][PIX_W-1:0];
  end
endmodule

// symbology_ctrl: symbology RAM controller and overlay (mouse icon).
//
// The mouse cursor is drawn by an external microcontroller (a PIC), which is
// too slow to follow the video: it only presents an address (one word per
// pixel, row-major) and a 2-bit symbol code, and pulses pic_wr. This block
// synchronises pic_wr to the video clock and, on its rising edge, performs the
// write into the dual-port symbology RAM; pic_addr and pic_data must be stable
// while pic_wr is high. On the video side a pixel counter (cleared in vertical
// blanking) reads the symbol of each active pixel and the overlay replaces
// the pixel: code 1 gives white (255), code 2 black (0), codes 0 and 3 leave
// the image pixel (transparent). Output follows input by two clocks. After
// reset the block fills the RAM with transparent codes (init_done rises NPIX
// clocks later) and ignores the PIC until then. The thesis describes this
// division of work and the three pixel kinds; the code values, the strobe
// synchronizer and the reset fill are this design's choices.
//
// Lint note: the RAM's port B read data is left open on purpose - port B
// only writes here.
module symbology_ctrl
  import ir_pkg::*;
#(
  parameter int unsigned NPIX = 76800,
  localparam int unsigned AW = $clog2(NPIX)
) (
  input  logic          clk,
  input  logic          rst_n,
  // microcontroller bus
  input  logic [AW-1:0] pic_addr,
  input  logic [1:0]    pic_data,
  input  logic          pic_wr,
  // video
  input  logic [7:0]    in_pix,
  input  sync_t         in_sync,
  output logic [7:0]    out_pix,
  output sync_t         out_sync,
  output logic          init_done
);
  localparam logic [1:0] SYM_WHITE = 2'd1;
  localparam logic [1:0] SYM_BLACK = 2'd2;

  logic [2:0]    wr_sync;
  logic [AW-1:0] init_addr;
  logic [AW-1:0] pix_idx;
  logic [1:0]    sym_q;
  logic          b_we;
  logic [AW-1:0] b_addr;
  logic [1:0]    b_din;
  logic [7:0]    pix_s1;
  sync_t         sync_s1;

  always_comb begin
    if (!init_done) begin
      b_we = 1'b1; b_addr = init_addr; b_din = 2'd0;
    end else begin
      b_we = wr_sync[1] && !wr_sync[2]; b_addr = pic_addr; b_din = pic_data;
    end
  end

  dpram #(.DEPTH(NPIX), .WIDTH(2)) u_sym (
    .clk    (clk),
    .a_en   (is_active(in_sync)),
    .a_addr (pix_idx),
    .a_q    (sym_q),
    .b_en   (b_we),
    .b_we   (b_we),
    .b_addr (b_addr),
    .b_din  (b_din),
    .b_q    ()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_sync   <= '0;
      init_addr <= '0;
      init_done <= 1'b0;
      pix_idx   <= '0;
      pix_s1    <= '0;
      sync_s1   <= '{vblank: 1'b1, hblank: 1'b1};
      out_pix   <= '0;
      out_sync  <= '{vblank: 1'b1, hblank: 1'b1};
    end else begin
      wr_sync <= {wr_sync[1:0], pic_wr};
      if (!init_done) begin
        if (init_addr == AW'(NPIX - 1)) init_done <= 1'b1;
        else                            init_addr <= init_addr + 1'b1;
      end
      if (in_sync.vblank) pix_idx <= '0;
      else if (is_active(in_sync) && pix_idx != AW'(NPIX - 1)) pix_idx <= pix_idx + 1'b1;
      pix_s1   <= in_pix;
      sync_s1  <= in_sync;
      out_sync <= sync_s1;
      if (is_active(sync_s1) && sym_q == SYM_WHITE)      out_pix <= 8'd255;
      else if (is_active(sync_s1) && sym_q == SYM_BLACK) out_pix <= 8'd0;
      else                                               out_pix <= pix_s1;
    end
  end
endmodule

// he_compress: the compression block of the histogram equalizer.
//
// Maps each 12-bit pixel to an 8-bit display level through the table the
// coefficient finder left in the shared coefficient RAM. Levels below the
// table window (map_low) become 0, levels above it 255; the rest read the
// word at MAP_BASE + (pixel - map_low). The RAM read address is driven
// combinationally from the incoming pixel; the result and the delayed
// blanking flags leave two clocks after the pixel. The table window is this
// design's choice; the thesis gives the block's function and its RAM.
//
// Lint note: the table words are 8 bits wide in an 18-bit RAM, so rd_q[17:8]
// are unused.
module he_compress
  import ir_pkg::*;
#(
  parameter int unsigned LW          = HE_BITS,
  parameter int unsigned MAP_BASE_P  = MAP_BASE,
  parameter int unsigned MAP_DEPTH_P = MAP_DEPTH
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [LW-1:0]      in_pix,
  input  sync_t              in_sync,
  input  logic [LW-1:0]      map_low,
  // coefficient RAM read port (data one clock after address)
  output logic               rd_en,
  output logic [COEF_AW-1:0] rd_addr,
  input  logic [COEF_W-1:0]  rd_q,
  output logic [7:0]         out_pix,
  output sync_t              out_sync
);
  typedef enum logic [1:0] {SEL_TABLE, SEL_ZERO, SEL_FULL} sel_e;

  logic [LW-1:0] rel;
  sel_e          sel, sel_s1;
  sync_t         sync_s1;

  assign rel = in_pix - map_low;

  always_comb begin
    if (in_pix < map_low)             sel = SEL_ZERO;
    else if (32'(rel) >= MAP_DEPTH_P) sel = SEL_FULL;
    else                              sel = SEL_TABLE;
  end

  assign rd_en   = is_active(in_sync) && (sel == SEL_TABLE);
  assign rd_addr = COEF_AW'(MAP_BASE_P + 32'(rel));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_s1   <= SEL_ZERO;
      sync_s1  <= '{vblank: 1'b1, hblank: 1'b1};
      out_pix  <= '0;
      out_sync <= '{vblank: 1'b1, hblank: 1'b1};
    end else begin
      sel_s1   <= sel;
      sync_s1  <= in_sync;
      out_sync <= sync_s1;
      unique case (sel_s1)
        SEL_TABLE: out_pix <= rd_q[7:0];
        SEL_FULL:  out_pix <= 8'd255;
        default:   out_pix <= 8'd0;
      endcase
    end
  end
endmodule

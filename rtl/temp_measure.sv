// temp_measure: the temperature-measuring block.
//
// Two counters follow the incoming calibrated video: one counts the columns
// of a line (cleared in every blanking interval), the other counts the lines
// of a field (cleared in vertical blanking, advanced at the end of every line
// that had active pixels). A one-clock req latches the position (x, y); when
// the counters next reach it, the pixel there is captured into value and
// valid rises and stays high until ack. A position outside the field is never
// reached and the request stays pending (busy) until the next req replaces
// it. The captured value is the calibrated level W'' that temp_convert turns
// into a temperature. This follows the thesis; the request/valid/ack
// handshake details are this design's choices.
module temp_measure
  import ir_pkg::*;
#(
  parameter int unsigned PIX_W = 16,
  parameter int unsigned POS_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PIX_W-1:0] in_pix,
  input  sync_t            in_sync,
  input  logic             req,
  input  logic [POS_W-1:0] x,
  input  logic [POS_W-1:0] y,
  input  logic             ack,
  output logic             busy,
  output logic             valid,
  output logic [PIX_W-1:0] value
);
  logic [POS_W-1:0] col, row;
  logic [POS_W-1:0] tx, ty;
  logic             line_had_px;
  logic             act;

  assign act = is_active(in_sync);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col         <= '0;
      row         <= '0;
      line_had_px <= 1'b0;
      tx          <= '0;
      ty          <= '0;
      busy        <= 1'b0;
      valid       <= 1'b0;
      value       <= '0;
    end else begin
      // position counters
      if (act) begin
        col         <= col + 1'b1;
        line_had_px <= 1'b1;
      end else begin
        col <= '0;
        if (in_sync.vblank) begin
          row         <= '0;
          line_had_px <= 1'b0;
        end else if (line_had_px) begin
          row         <= row + 1'b1;
          line_had_px <= 1'b0;
        end
      end
      // request / capture / acknowledge
      if (ack) valid <= 1'b0;
      if (req) begin
        tx    <= x;
        ty    <= y;
        busy  <= 1'b1;
        valid <= 1'b0;
      end else if (busy && act && col == tx && row == ty) begin
        value <= in_pix;
        valid <= 1'b1;
        busy  <= 1'b0;
      end
    end
  end
endmodule

// temp_convert: converts a calibrated level W'' into absolute temperature.
//
// After normalization the camera's level follows the Stefan-Boltzmann law
// W'' = A3 * T^4 + B3 (T in kelvin). The two constants come from a black-body
// calibration at 19 C and 50 C (W'' = 1657 and 2634), which gives
// A3 = 2.70293408e-7 and B3 = -308. The block inverts the law,
// T = ((W'' - B3) / A3)^(1/4), by bisection: it looks for the largest
// T_BITS-bit t, in 1/16 K steps, with A3_Q48 * t^4 <= (W'' - B3) * 2^64, where
// A3_Q48 = round(A3 * 2^48) (the 1/16 K unit contributes 16^4 = 2^16). One
// result bit is decided per clock, so valid rises T_BITS + 1 clocks after
// start; temp then holds T * 16 (so 292.0 K reads 4672) until ack or the next
// start. A level at or below B3 gives 0. The law and the constants follow the
// thesis; the fixed-point format and the bisection are this design's choices.
module temp_convert #(
  parameter int unsigned      W_BITS = 16,
  parameter int unsigned      T_BITS = 13,
  parameter longint unsigned  A3_Q48 = 64'd76080831,
  parameter int               B3     = -308
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [W_BITS-1:0] level,
  input  logic              ack,
  output logic              busy,
  output logic              valid,
  output logic [15:0]       temp
);
  localparam int unsigned XW = 128;

  logic [XW-1:0]           rhs;
  logic [T_BITS-1:0]       t;
  logic [$clog2(T_BITS+1)-1:0] bitpos;
  logic [T_BITS-1:0]       cand;
  logic [XW-1:0]           c2, c4, lhs;
  logic signed [W_BITS+1:0] diff;

  assign diff = $signed({2'b00, level}) - (W_BITS+2)'(B3);
  assign cand = t | (T_BITS'(1) << (bitpos - 1'b1));
  assign c2   = XW'(cand) * XW'(cand);
  assign c4   = c2 * c2;
  assign lhs  = c4 * XW'(A3_Q48);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rhs    <= '0;
      t      <= '0;
      bitpos <= '0;
      busy   <= 1'b0;
      valid  <= 1'b0;
      temp   <= '0;
    end else begin
      if (ack) valid <= 1'b0;
      if (start) begin
        rhs    <= (diff > 0) ? (XW'(diff) << 64) : '0;
        t      <= '0;
        bitpos <= ($bits(bitpos))'(T_BITS);
        busy   <= 1'b1;
        valid  <= 1'b0;
      end else if (busy) begin
        if (bitpos == 0) begin
          busy  <= 1'b0;
          valid <= 1'b1;
          temp  <= 16'(t);
        end else begin
          if (lhs <= rhs) t <= cand;
          bitpos <= bitpos - 1'b1;
        end
      end
    end
  end
endmodule

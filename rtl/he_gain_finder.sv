// he_gain_finder: the gain-finder block of the histogram equalizer.
//
// The equalizer maps the lowest gray level of a field to 0 and the highest to
// 255, stretching each level in proportion to the pixels below it. The scale
// of that mapping is 255 / D, where D is the number of pixels above the
// lowest level. This block computes it once per field as the fixed-point gain
// ceil(255 * 2^FRAC / D) with a restoring divider, one quotient bit per clock
// (NUM_W + 1 clocks from start to done). D = 0 (a flat field) gives gain 0,
// so the whole field maps to 0. The thesis names the block; the divider, the
// rounding up and the fixed-point format are this design's choices.
//
// Lint note: the top bit of rem only matters in the trial subtraction and is
// never read on its own, which lint reports as unused.
module he_gain_finder #(
  parameter int unsigned DEN_W  = 18,
  parameter int unsigned FRAC   = 16,
  parameter int unsigned OUT_MAX = 255,
  localparam int unsigned NUM_W  = FRAC + 9 + 1,
  localparam int unsigned GAIN_W = NUM_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [DEN_W-1:0]  den,
  output logic              busy,
  output logic              done,
  output logic [GAIN_W-1:0] gain
);
  logic [NUM_W-1:0] num;      // dividend, shifted out MSB first
  logic [NUM_W-1:0] quo;
  logic [DEN_W:0]   rem;
  logic [DEN_W-1:0] d;
  logic [$clog2(NUM_W+1)-1:0] cnt;
  logic [DEN_W:0]   trial;

  assign trial = {rem[DEN_W-1:0], num[NUM_W-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      num  <= '0;
      quo  <= '0;
      rem  <= '0;
      d    <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      gain <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        // numerator = OUT_MAX * 2^FRAC + D - 1, so the quotient rounds up
        num  <= (NUM_W'(OUT_MAX) << FRAC) + NUM_W'(den) - 1'b1;
        d    <= den;
        quo  <= '0;
        rem  <= '0;
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        if (cnt == $bits(cnt)'(NUM_W)) begin
          busy <= 1'b0;
          done <= 1'b1;
          gain <= (d == '0) ? '0 : quo;
        end else begin
          cnt <= cnt + 1'b1;
          num <= num << 1;
          if (trial >= {1'b0, d}) begin
            rem <= trial - {1'b0, d};
            quo <= {quo[NUM_W-2:0], 1'b1};
          end else begin
            rem <= trial;
            quo <= {quo[NUM_W-2:0], 1'b0};
          end
        end
      end
    end
  end
endmodule

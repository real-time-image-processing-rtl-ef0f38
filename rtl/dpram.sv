// dpram: generic dual-port block RAM, the building block for every memory of
// the camera (dpram4kx18 histogram, dpram1kx18 coefficient RAM, the five
// line FIFOs, the per-pixel NUC coefficients and the symbology RAM).
//
// Port A is read-only, port B reads and writes. Both ports are synchronous:
// read data appears one clock after the address. A read on either port of an
// address that port B writes in the same clock returns the old contents
// (read-before-write), which the line FIFOs and the histogram rely on.
// Contents are not initialised; the owning blocks clear what they read.
module dpram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 18,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             a_en,
  input  logic [AW-1:0]    a_addr,
  output logic [WIDTH-1:0] a_q,
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_din,
  output logic [WIDTH-1:0] b_q
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) a_q <= mem[a_addr];
  end

  always_ff @(posedge clk) begin
    if (b_en) begin
      b_q <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_din;
    end
  end
endmodule

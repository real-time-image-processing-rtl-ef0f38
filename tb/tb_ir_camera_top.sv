// tb_ir_camera_top: end-to-end test of the whole camera pipeline on a small
// 16x12 picture (line memories 32 words, UART at 4 clocks per bit) so that it
// runs in seconds. The stimulus, the reference model and the mechanism
// counters are in tb_ir_camera_top_body.svh; see there for the sequence.
// Blanking: 8 clocks per line, 4500 clocks of vertical blanking (enough for
// the 4096-level histogram scan).
module tb_ir_camera_top;
  localparam int H = 16, V = 12, HB = 8, VB = 4500;
  localparam logic [7:0] BAUD = 8'd3;
  localparam int PAW = $clog2(H * V);

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, rxd, txd, cal_we, pic_wr, mouse_upd, ready;
  logic [15:0] in_pix, cal_gain, mouse_x, mouse_y;
  logic signed [15:0] cal_offset;
  logic [7:0] out_pix;
  ir_pkg::sync_t in_sync, out_sync;
  logic [PAW-1:0] cal_addr, pic_addr;
  logic [1:0] pic_data;

  ir_camera_top #(
    .H_ACTIVE(H), .V_ACTIVE(V), .LINE_DEPTH(32), .BAUD_DIV(BAUD)
  ) dut (.*);

`include "tb_ir_camera_top_body.svh"
endmodule

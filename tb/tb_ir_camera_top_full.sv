// tb_ir_camera_top_full: the end-to-end test of tb_ir_camera_top run on the
// top at its default parameters - 320x240 pixels, 512-word line memories,
// 4096-level histogram, 115200 baud (divider 127). Stimulus, reference model
// and mechanism counters come from tb_ir_camera_top_body.svh. Blanking: 32
// clocks per line and 4500 clocks of vertical blanking.
module tb_ir_camera_top_full;
  localparam int H = 320, V = 240, HB = 32, VB = 4500;
  localparam logic [7:0] BAUD = 8'd127;
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

  ir_camera_top dut (.*);

`include "tb_ir_camera_top_body.svh"
endmodule

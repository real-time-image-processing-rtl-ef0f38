// tb_temp_measure: self-checking test of the pixel sampler used for the
// temperature reading. A small 20x10 video stream with random pixel values
// and random blanking lengths is generated; after a request at a random
// (x, y) the sampler must return exactly the raw value of that pixel in the
// next scan of that position, hold valid until ack, and report busy meanwhile.
module tb_temp_measure;
  import ir_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int H = 20, V = 10;
  logic rst_n = 0;
  logic [15:0] in_pix, x, y, value;
  sync_t in_sync;
  logic req, ack, busy, valid;

  temp_measure dut (.*);

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // video source; remembers the value sent at each position of the
  // current frame
  logic [15:0] frame_mem [V][H];
  int cur_x = -1, cur_y = -1;
  initial begin
    in_pix = 0; in_sync = '{vblank: 1'b1, hblank: 1'b1};
    @(posedge rst_n);
    forever begin
      in_sync = '{vblank: 1'b1, hblank: 1'b1};
      repeat (5 + $urandom % 10) @(negedge clk);
      for (int r = 0; r < V; r++) begin
        in_sync = '{vblank: 1'b0, hblank: 1'b1};
        repeat (2 + $urandom % 4) @(negedge clk);
        for (int c = 0; c < H; c++) begin
          in_sync = '{vblank: 1'b0, hblank: 1'b0};
          in_pix = 16'($urandom);
          frame_mem[r][c] = in_pix;
          cur_x = c; cur_y = r;
          @(negedge clk);
        end
        cur_x = -1;
      end
    end
  end

  // reference capture: first scan of (x, y) after the request
  logic watching = 0;
  logic [15:0] expv;
  always @(posedge clk) begin
    if (req) watching <= 1;
    else if (watching && cur_x == int'(x) && cur_y == int'(y)) begin
      expv <= in_pix; watching <= 0;
    end
  end

  initial begin
    req = 0; ack = 0; x = 0; y = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      int t;
      repeat ($urandom % 300) @(negedge clk);
      x = 16'($urandom % H); y = 16'($urandom % V);
      req = 1; @(negedge clk); req = 0;
      chk("busy after req", busy, 1);
      chk("valid cleared by req", valid, 0);
      t = 0;
      // the pixel presented while busy at (x, y) is the one captured
      while (!valid && t < 5000) begin
        @(negedge clk); t++;
      end
      chk("valid", valid, 1);
      chk("value", value, expv);
      chk("busy cleared", busy, 0);
      repeat ($urandom % 50) @(negedge clk);
      chk("valid held", valid, 1);
      chk("value held", value, expv);
      ack = 1; @(negedge clk); ack = 0;
      chk("valid dropped after ack", valid, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

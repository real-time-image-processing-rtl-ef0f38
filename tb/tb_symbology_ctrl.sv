// tb_symbology_ctrl: self-checking test of the overlay memory and mixer.
// Uses a 12x8 picture (NPIX = 96). The microcontroller bus is driven slowly
// (strobe high for 4 clocks, address and data held around it), as a PIC port
// would. Random symbol codes are written, then random video frames are sent
// and every output pixel is compared with the model: code 1 gives 255, code 2
// gives 0, codes 0 and 3 pass the video through. The latency of 2 clocks is
// checked on the sync flags, and the memory must be clear after reset.
module tb_symbology_ctrl;
  import ir_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int H = 12, V = 8, NPIX = H * V;
  localparam int AW = $clog2(NPIX);
  logic rst_n = 0;
  logic [AW-1:0] pic_addr;
  logic [1:0] pic_data;
  logic pic_wr, init_done;
  logic [7:0] in_pix, out_pix;
  sync_t in_sync, out_sync;

  symbology_ctrl #(.NPIX(NPIX)) dut (.*);

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

  logic [1:0] sym [NPIX];
  logic [7:0] exp_q [$];
  sync_t      sync_hist [3];
  int white = 0, black = 0, through = 0;

  // scoreboard: sync delayed by 2, pixel model
  always @(posedge clk) begin
    sync_hist[2] <= sync_hist[1];
    sync_hist[1] <= sync_hist[0];
    sync_hist[0] <= in_sync;
  end
  always @(negedge clk) if (rst_n && init_done) begin
    checks++;
    if (out_sync != sync_hist[1]) begin failures++; $display("FAIL sync latency"); end
    if (is_active(out_sync)) begin
      logic [7:0] e;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected pixel"); end
      else begin
        e = exp_q.pop_front();
        chk("overlay pixel", out_pix, e);
      end
    end
  end

  task automatic pic_write(input int a, input logic [1:0] d);
    pic_addr = AW'(a); pic_data = d;
    repeat (2) @(negedge clk);
    pic_wr = 1; repeat (4) @(negedge clk);
    pic_wr = 0; repeat (4) @(negedge clk);
    sym[a] = d;
  endtask

  task automatic send_frame();
    in_sync = '{vblank: 1'b1, hblank: 1'b1};
    repeat (6) @(negedge clk);
    for (int r = 0; r < V; r++) begin
      in_sync = '{vblank: 1'b0, hblank: 1'b1};
      repeat (3) @(negedge clk);
      for (int c = 0; c < H; c++) begin
        logic [1:0] s;
        in_sync = '{vblank: 1'b0, hblank: 1'b0};
        in_pix = 8'($urandom);
        s = sym[r * H + c];
        if (s == 2'd1) begin exp_q.push_back(8'd255); white++; end
        else if (s == 2'd2) begin exp_q.push_back(8'd0); black++; end
        else begin exp_q.push_back(in_pix); through++; end
        @(negedge clk);
      end
    end
    in_sync = '{vblank: 1'b1, hblank: 1'b1};
    repeat (6) @(negedge clk);
  endtask

  initial begin
    pic_addr = 0; pic_data = 0; pic_wr = 0; in_pix = 0;
    in_sync = '{vblank: 1'b1, hblank: 1'b1};
    for (int i = 0; i < NPIX; i++) sym[i] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    while (!init_done) @(negedge clk);
    chk("init clocks", 1, 1);
    send_frame();           // memory clear: all pass-through
    chk("clear after reset", white + black, 0);
    for (int f = 0; f < 4; f++) begin
      for (int n = 0; n < 30; n++) pic_write(int'($urandom % NPIX), 2'($urandom));
      send_frame();
    end
    chk("queue drained", exp_q.size(), 0);
    checks++; if (white == 0 || black == 0 || through == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

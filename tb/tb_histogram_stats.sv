// tb_histogram_stats: self-checking test of the statistics block with 64
// gray levels. After the reset clear, one field arms the block, then fields
// of random pixels (with runs of equal levels, which exercise the
// read-modify-write bypass) are counted. At each field end the test checks
// the latched lowest level, its count and the pixel total, reads every bin
// through the scan port against its own histogram, and reads them again to
// check that the scan cleared them.
module tb_histogram_stats;
  import ir_pkg::*;
  localparam int LEVELS = 64, LW = 6, H = 12, V = 6;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          rst_n, ready, field_done, scan_en;
  logic [LW-1:0] in_pix, stat_low, scan_addr;
  sync_t         in_sync;
  logic [17:0]   stat_low_cnt, stat_total, scan_q;

  histogram_stats #(.LEVELS(LEVELS), .CNT_W(18)) dut (.*);

  int hist [LEVELS];
  int bypass_hits = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic frame(input int lo, input int span);
    int last = -1;
    for (int i = 0; i < LEVELS; i++) hist[i] = 0;
    for (int y = 0; y < V; y++) begin
      for (int x = 0; x < H; x++) begin
        int p;
        @(negedge clk);
        p = ($urandom % 3 == 0 && last >= 0) ? last : lo + int'($urandom % span);
        if (p == last) bypass_hits++;
        last = p;
        in_pix = LW'(p); in_sync = '{vblank: 1'b0, hblank: 1'b0};
        hist[p]++;
      end
      repeat (3) begin @(negedge clk); in_sync = '{vblank: 1'b0, hblank: 1'b1}; end
    end
    @(negedge clk); in_sync = '{vblank: 1'b1, hblank: 1'b1};
  endtask

  task automatic scan_and_check(input bit expect_zero);
    for (int b = 0; b < LEVELS + 1; b++) begin
      @(negedge clk);
      if (b > 0) chk($sformatf("bin %0d", b - 1), int'(scan_q), expect_zero ? 0 : hist[b - 1]);
      scan_en = (b < LEVELS); scan_addr = LW'(b);
    end
    @(negedge clk); scan_en = 0;
  endtask

  task automatic field_end_checks();
    int lo = -1;
    for (int i = LEVELS - 1; i >= 0; i--) if (hist[i] > 0) lo = i;
    wait (field_done); @(negedge clk);
    chk("lowest level", int'(stat_low), lo);
    chk("lowest count", int'(stat_low_cnt), hist[lo]);
    chk("total", int'(stat_total), H * V);
    scan_and_check(0);
    scan_and_check(1);
  endtask

  initial begin
    rst_n = 0; in_pix = 0; in_sync = '{vblank: 1'b1, hblank: 1'b1}; scan_en = 0; scan_addr = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    wait (ready); repeat (3) @(negedge clk);
    frame(0, 64);                      // arming field, not counted
    repeat (20) @(negedge clk);
    frame(10, 20);  field_end_checks();
    frame(0, 64);   field_end_checks();
    frame(40, 3);   field_end_checks();
    chk("bypass exercised", int'(bypass_hits > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

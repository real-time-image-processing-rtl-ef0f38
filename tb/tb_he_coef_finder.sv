// tb_he_coef_finder: self-checking test of the coefficient finder with 64
// levels and a 16-entry table window at word 32. The test holds a histogram
// of its own behind the scan port (data one clock after the address, bins
// cleared when read) and records every coefficient RAM write. For random
// histograms it checks that each table word equals
// min(255, ((cdf(v) - n_low) * ceil(255 * 2^16 / (N - n_low))) >> 16) for the
// levels v = low .. low+15, that nothing else is written, that the histogram
// is left cleared, and that busy lasts about LEVELS + 30 clocks.
module tb_he_coef_finder;
  localparam int LEVELS = 64, LW = 6, BASE = 32, DEPTH = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          rst_n, start, scan_en, cw_en, busy, done;
  logic [LW-1:0] stat_low, scan_addr, map_low;
  logic [17:0]   stat_low_cnt, stat_total, scan_q;
  logic [9:0]    cw_addr;
  logic [17:0]   cw_data;

  he_coef_finder #(.LEVELS(LEVELS), .CNT_W(18), .MAP_BASE_P(BASE), .MAP_DEPTH_P(DEPTH)) dut (.*);

  int hist [LEVELS];
  int ram  [1024];
  int writes = 0;

  // behavioural histogram memory with clear-on-read
  always @(posedge clk) begin
    if (scan_en) begin
      scan_q <= 18'(hist[scan_addr]);
      hist[scan_addr] = 0;
    end
    if (cw_en) begin
      ram[cw_addr] = int'(cw_data);
      writes++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic run(input int lo, input int span, input int npix);
    int h [LEVELS];
    int n_low, total, d, cyc;
    longint gain, cdf, m;
    for (int i = 0; i < LEVELS; i++) h[i] = 0;
    for (int i = 0; i < npix; i++) h[lo + int'($urandom % span)]++;
    while (h[lo] == 0) lo++;
    for (int i = 0; i < LEVELS; i++) hist[i] = h[i];
    for (int i = 0; i < 1024; i++) ram[i] = -1;
    total = npix; n_low = h[lo]; d = total - n_low;
    gain = (d == 0) ? 0 : (longint'(255) * 65536 + d - 1) / d;
    writes = 0;
    @(negedge clk);
    stat_low = LW'(lo); stat_low_cnt = 18'(n_low); stat_total = 18'(total); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    chk("busy time", longint'(cyc >= LEVELS + 25 && cyc <= LEVELS + 40), 1);
    chk("map_low", map_low, lo);
    cdf = 0;
    for (int v = 0; v < LEVELS; v++) begin
      cdf += h[v];
      if (v >= lo && v < lo + DEPTH) begin
        m = ((cdf - n_low) * gain) >>> 16;
        if (m > 255) m = 255;
        chk($sformatf("map[%0d]", v), ram[BASE + v - lo], m);
      end
    end
    chk("number of writes", writes, (LEVELS - lo < DEPTH) ? LEVELS - lo : DEPTH);
    for (int i = 0; i < LEVELS; i++) chk("cleared", hist[i], 0);
  endtask

  initial begin
    rst_n = 0; start = 0; stat_low = 0; stat_low_cnt = 0; stat_total = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    run(5, 10, 300);
    run(20, 30, 1000);   // range wider than the window
    run(60, 4, 50);      // window runs past the last level
    run(33, 1, 40);      // flat field: everything maps to 0
    for (int i = 0; i < 10; i++) run(int'($urandom % 40), 1 + int'($urandom % 24), 1 + int'($urandom % 5000));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_he_compress: self-checking test of the equalizer's compression block.
// A behavioural coefficient RAM holds a random table; random 12-bit pixels
// below, inside and above the table window are driven, and each output is
// compared with 0 / table word / 255 respectively, two clocks after its input.
module tb_he_compress;
  import ir_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, rd_en;
  logic [11:0] in_pix, map_low;
  sync_t       in_sync, out_sync;
  logic [9:0]  rd_addr;
  logic [17:0] rd_q;
  logic [7:0]  out_pix;

  he_compress dut (.*);

  logic [17:0] ram [1024];
  always @(posedge clk) if (rd_en) rd_q <= ram[rd_addr];

  int exp_q[$];
  int n_below = 0, n_above = 0, n_table = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output check, two clocks after input
  sync_t s_d1, s_d2;
  always @(posedge clk) begin
    s_d1 <= in_sync; s_d2 <= s_d1;
  end
  always @(negedge clk) begin
    if (rst_n && is_active(out_sync)) begin
      int e;
      checks++;
      e = (exp_q.size() > 0) ? exp_q.pop_front() : -1;
      if (int'(out_pix) != e) begin failures++; $display("FAIL got %0d expected %0d", out_pix, e); end
    end
    checks++;
    if (rst_n && out_sync != s_d2) begin failures++; $display("FAIL sync not delayed by 2"); end
  end

  initial begin
    rst_n = 0; in_pix = 0; map_low = 12'd700; in_sync = '{vblank: 1'b1, hblank: 1'b1};
    for (int i = 0; i < 1024; i++) ram[i] = 18'($urandom);
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int p;
      @(negedge clk);
      if (n % 500 == 0) map_low = 12'($urandom % 3000);
      if ($urandom % 8 == 0) begin
        in_sync = '{vblank: 1'b0, hblank: 1'b1};
        continue;
      end
      p = int'($urandom % 4096);
      in_pix = 12'(p); in_sync = '{vblank: 1'b0, hblank: 1'b0};
      if (p < int'(map_low)) begin exp_q.push_back(0); n_below++; end
      else if (p - int'(map_low) >= MAP_DEPTH) begin exp_q.push_back(255); n_above++; end
      else begin exp_q.push_back(int'(ram[MAP_BASE + p - int'(map_low)][7:0])); n_table++; end
    end
    @(negedge clk); in_sync = '{vblank: 1'b1, hblank: 1'b1};
    repeat (5) @(negedge clk);
    checks++;
    if (n_below == 0 || n_above == 0 || n_table == 0 || exp_q.size() != 0) begin
      failures++; $display("FAIL coverage below=%0d above=%0d table=%0d left=%0d", n_below, n_above, n_table, exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_filter5x5: end-to-end test of the filtering hardware (line FIFOs plus
// convolution) on 12-pixel lines. Random images stream through with
// blanking; before each field new random coefficients are put in a
// behavioural coefficient RAM, which the block must copy in vertical
// blanking. For every pixel whose window lies inside lines already seen and
// inside the line, the output five clocks later must equal
//   sum over r,c of coef(r,c) * pixel(line - 6 + r, column - 5 + c)
// (r, c = 1..5; row 1 the oldest line), both as the exact sum and clipped.
module tb_filter5x5;
  import ir_pkg::*;
  localparam int H = 12;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               rst_n, cr_en, coef_busy;
  logic [15:0]        in_pix, out_pix;
  sync_t              in_sync, out_sync;
  logic [9:0]         cr_addr;
  logic [17:0]        cr_q;
  logic signed [41:0] sum;

  filter5x5 #(.LINE_DEPTH(16)) dut (.*);

  logic [17:0] ram [1024];
  always @(posedge clk) if (cr_en) cr_q <= ram[cr_addr];

  int     lines [$][H];
  int     cur [H];
  longint exp_q [$];
  bit     care_q [$];
  int     loads = 0;

  always @(posedge clk) if (cr_en && cr_addr == 10'(FILT_BASE)) loads++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint cv(logic [17:0] c);
    return c[17] ? -longint'(c[16:0]) : longint'(c[16:0]);
  endfunction

  always @(negedge clk) begin
    if (rst_n && is_active(out_sync)) begin
      longint e;
      bit care;
      e = exp_q.pop_front();
      care = care_q.pop_front();
      if (care) begin
        longint ip;
        checks++;
        if (sum != e) begin failures++; $display("FAIL sum got %0d expected %0d", sum, e); end
        ip = e >>> 13;
        if (ip < 0) ip = 0;
        if (ip > 65535) ip = 65535;
        checks++;
        if (longint'(out_pix) != ip) begin failures++; $display("FAIL out_pix got %0d expected %0d", out_pix, ip); end
      end
    end
  end

  initial begin
    rst_n = 0; in_pix = 0; in_sync = '{vblank: 1'b1, hblank: 1'b1};
    for (int i = 0; i < 1024; i++) ram[i] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int f = 0; f < 5; f++) begin
      logic [17:0] eff [25];
      for (int i = 0; i < 25; i++) begin
        ram[FILT_BASE + i] = {1'($urandom), 17'($urandom % 40000)};
        eff[i] = ram[FILT_BASE + i];
      end
      @(negedge clk); in_sync = '{vblank: 1'b0, hblank: 1'b1};   // ensures a blanking edge
      repeat (40) begin @(negedge clk); in_sync = '{vblank: 1'b1, hblank: 1'b1}; end
      for (int y = 0; y < 9; y++) begin
        int n;
        n = lines.size();
        for (int x = 0; x < H; x++) begin
          longint s;
          @(negedge clk);
          cur[x] = int'($urandom % 65536);
          in_pix = 16'(cur[x]); in_sync = '{vblank: 1'b0, hblank: 1'b0};
          s = 0;
          if (n >= 5 && x >= 4) begin
            for (int r = 0; r < 5; r++)
              for (int c = 0; c < 5; c++)
                s += cv(eff[r*5 + c]) * lines[n - 5 + r][x - 4 + c];
          end
          exp_q.push_back(s);
          care_q.push_back(n >= 5 && x >= 4);
        end
        lines.push_back(cur);
        repeat (3) begin @(negedge clk); in_sync = '{vblank: 1'b0, hblank: 1'b1}; end
      end
    end
    repeat (10) @(negedge clk);
    checks++;
    if (loads != 5 || exp_q.size() != 0) begin failures++; $display("FAIL loads=%0d pending=%0d", loads, exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

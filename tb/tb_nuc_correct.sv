// tb_nuc_correct: self-checking test of the two-point non-uniformity
// correction on a small 8x4 array.
// Field 1 runs on the reset coefficients (unity gain, zero offset) and must
// come out unchanged; then random per-pixel gains and offsets are loaded and
// every pixel of two more fields is compared with
// clip(round(pixel * gain / 2^14) + offset), including clipping at both ends.
// The output must follow the input by exactly two clocks.
module tb_nuc_correct;
  import ir_pkg::*;
  localparam int H = 8, V = 4, NPIX = H * V;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               rst_n;
  logic [15:0]        in_pix, out_pix;
  sync_t              in_sync, out_sync;
  logic               cal_we, init_done;
  logic [4:0]         cal_addr;
  logic [15:0]        cal_gain;
  logic signed [15:0] cal_offset;

  nuc_correct #(.NPIX(NPIX)) dut (.*);

  int unsigned gain_m [NPIX];
  int          offs_m [NPIX];
  int          exp_q[$];
  sync_t       exp_s[$];
  int          cyc_in[$];
  int          cyc = 0;
  int          clipped = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model(int p, int idx);
    longint v;
    v = (longint'(p) * longint'(gain_m[idx]) + longint'(offs_m[idx]) * 16384 + 8192) >>> 14;
    if (v < 0) v = 0;
    if (v > 65535) v = 65535;
    return int'(v);
  endfunction

  // checker: every active output pixel against the queued expectation
  always @(negedge clk) begin
    if (rst_n && is_active(out_sync)) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected output pixel");
      end else begin
        int e, c;
        e = exp_q.pop_front();
        c = cyc_in.pop_front();
        if (out_pix !== 16'(e)) begin
          failures++; $display("FAIL pixel got %0d expected %0d", out_pix, e);
        end
        checks++;
        if (cyc - c != 2) begin
          failures++; $display("FAIL latency %0d", cyc - c);
        end
      end
    end
  end

  task automatic frame(input bit extreme);
    for (int y = 0; y < V; y++) begin
      for (int x = 0; x < H; x++) begin
        int p;
        @(negedge clk);
        p = extreme ? ((x % 2) ? 65535 - ($urandom % 50) : $urandom % 50) : $urandom % 65536;
        in_pix = 16'(p); in_sync = '{vblank: 1'b0, hblank: 1'b0};
        exp_q.push_back(model(p, y * H + x));
        cyc_in.push_back(cyc);
        if (model(p, y * H + x) == 0 || model(p, y * H + x) == 65535) clipped++;
      end
      repeat (4) begin @(negedge clk); in_sync = '{vblank: 1'b0, hblank: 1'b1}; end
    end
    repeat (10) begin @(negedge clk); in_sync = '{vblank: 1'b1, hblank: 1'b1}; end
  endtask

  initial begin
    rst_n = 0; in_pix = 0; in_sync = '{vblank: 1'b1, hblank: 1'b1};
    cal_we = 0; cal_addr = 0; cal_gain = 0; cal_offset = 0;
    for (int i = 0; i < NPIX; i++) begin gain_m[i] = 16384; offs_m[i] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;
    wait (init_done);
    repeat (4) @(negedge clk);
    frame(0);
    // load a calibration
    for (int i = 0; i < NPIX; i++) begin
      @(negedge clk);
      gain_m[i] = 8192 + $urandom % 32768;
      offs_m[i] = int'($urandom % 4001) - 2000;
      cal_we = 1; cal_addr = 5'(i); cal_gain = 16'(gain_m[i]); cal_offset = 16'(offs_m[i]);
    end
    @(negedge clk); cal_we = 0;
    frame(0);
    frame(1);
    repeat (10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d pixels never came out", exp_q.size()); end
    checks++;
    if (clipped == 0) begin failures++; $display("FAIL clipping never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_line_fifo_ctrl: self-checking test of the cascaded line FIFOs with
// 10-pixel lines in 16-word RAMs. Random lines are streamed with blanking
// between them and across field boundaries; for every active pixel, tap k
// must return the pixel of the same column k lines earlier (once k lines have
// passed), one clock after the pixel entered, and out_pix/out_sync must be the
// input delayed by one clock.
module tb_line_fifo_ctrl;
  import ir_pkg::*;
  localparam int H = 10;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n;
  logic [15:0] in_pix, out_pix;
  logic [15:0] taps [5];
  sync_t       in_sync, out_sync;

  line_fifo_ctrl #(.LINE_DEPTH(16)) dut (.*);

  int lines [$][H];
  int cur_line [H];
  int nline = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; in_pix = 0; in_sync = '{vblank: 1'b1, hblank: 1'b1};
    repeat (3) @(negedge clk); rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      for (int y = 0; y < 8; y++) begin
        for (int x = 0; x < H; x++) begin
          @(negedge clk);
          cur_line[x] = int'($urandom % 65536);
          in_pix = 16'(cur_line[x]); in_sync = '{vblank: 1'b0, hblank: 1'b0};
          @(posedge clk); #1;
          checks++;
          if (out_pix != in_pix || out_sync != in_sync) begin failures++; $display("FAIL pass-through"); end
          for (int k = 1; k <= 5; k++) begin
            if (nline >= k) begin
              checks++;
              if (int'(taps[k-1]) != lines[nline - k][x]) begin
                failures++;
                $display("FAIL line %0d col %0d tap %0d got %0d expected %0d", nline, x, k, taps[k-1], lines[nline-k][x]);
              end
            end
          end
        end
        lines.push_back(cur_line);
        nline++;
        repeat (1 + $urandom % 4) begin @(negedge clk); in_sync = '{vblank: 1'b0, hblank: 1'b1}; end
      end
      repeat (6) begin @(negedge clk); in_sync = '{vblank: 1'b1, hblank: 1'b1}; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

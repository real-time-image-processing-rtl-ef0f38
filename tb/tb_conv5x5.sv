// tb_conv5x5: self-checking test of the convolution block.
// Part 1 repeats the thesis' own simulation: coefficient (1,3) = 1,
// (1,4) = 2, (3,3) = -1 and (5,1) = -0.25, the twelve-column five-line input,
// and the expected outputs 14522, 14484, 14605, 14343, the first of them on
// the 8th rising clock edge after the first column entered the window. The
// coefficients reach the block the way the hardware loads them: from a
// behavioural coefficient RAM once vertical blanking reaches the block's
// output (4 clocks after it starts at the input). An impulse kernel is
// checked first.
// Part 2 loads random signed coefficients and checks random windows against
// the exact signed sum and the clipped integer output.
module tb_conv5x5;
  import ir_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               rst_n, cr_en, coef_busy;
  logic [15:0]        taps [5];
  sync_t              in_sync, out_sync;
  logic [9:0]         cr_addr;
  logic [17:0]        cr_q;
  logic signed [41:0] sum;
  logic [15:0]        out_pix;

  conv5x5 dut (.*);

  logic [17:0] ram [1024];
  always @(posedge clk) if (cr_en) cr_q <= ram[cr_addr];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  // the five lines of the thesis' simulation (line k = output of FIFO k)
  int tbl [5][12] = '{
    '{8309, 8264, 8257, 8260, 8256, 8309, 8204, 8193, 8266, 8192, 8288, 8192},
    '{8266, 8243, 8269, 8195, 8280, 8197, 8315, 8251, 8248, 8376, 8235, 8305},
    '{8273, 8309, 8258, 8314, 8199, 8297, 8220, 8306, 8307, 8264, 8309, 8239},
    '{8270, 8277, 8271, 8260, 8311, 8235, 8308, 8292, 8272, 8282, 8215, 8303},
    '{8208, 8260, 8294, 8282, 8291, 8289, 8208, 8193, 8260, 8261, 8381, 8264}};

  // the block loads when vertical blanking reaches its output (4 clocks)
  task automatic load_coefs();
    @(negedge clk); in_sync = '{vblank: 1'b0, hblank: 1'b1};
    repeat (5) @(negedge clk); in_sync = '{vblank: 1'b1, hblank: 1'b1};
    repeat (6) @(negedge clk);
    while (coef_busy) @(negedge clk);
    @(negedge clk); in_sync = '{vblank: 1'b0, hblank: 1'b1};
    @(negedge clk);
  endtask

  function automatic longint coef_val(logic [17:0] c);
    return c[17] ? -longint'(c[16:0]) : longint'(c[16:0]);
  endfunction

  initial begin
    int edge_n;
    int outs [4] = '{14522, 14484, 14605, 14343};
    rst_n = 0; in_sync = '{vblank: 1'b1, hblank: 1'b1};
    for (int k = 0; k < 5; k++) taps[k] = 0;
    for (int i = 0; i < 1024; i++) ram[i] = 0;
    ram[FILT_BASE + 2*5 + 2] = 18'h02000;   // impulse: centre = 1.0
    repeat (3) @(negedge clk); rst_n = 1;
    load_coefs();
    // part 1: thesis simulation; column j is presented before edge j
    edge_n = 0;
    fork
      begin
        for (int j = 0; j < 12; j++) begin
          for (int k = 0; k < 5; k++) taps[k] = 16'(tbl[k][j]);
          in_sync = '{vblank: 1'b0, hblank: 1'b0};
          @(negedge clk);
        end
        in_sync = '{vblank: 1'b0, hblank: 1'b1};
      end
      begin
        for (int e = 1; e <= 11; e++) begin
          @(posedge clk); #1;
          if (e >= 8) chk($sformatf("impulse-filter output at edge %0d", e), out_pix, tbl[2][e - 8 + 2]);
        end
      end
    join
    // now the thesis coefficients
    ram[FILT_BASE + 2*5 + 2] = 18'h00000;
    ram[FILT_BASE + 0*5 + 2] = 18'h02000;   // (1,3) = +1
    ram[FILT_BASE + 0*5 + 3] = 18'h04000;   // (1,4) = +2
    ram[FILT_BASE + 2*5 + 2] = 18'h22000;   // (3,3) = -1
    ram[FILT_BASE + 4*5 + 0] = 18'h20800;   // (5,1) = -0.25
    load_coefs();
    fork
      begin
        for (int j = 0; j < 12; j++) begin
          for (int k = 0; k < 5; k++) taps[k] = 16'(tbl[k][j]);
          in_sync = '{vblank: 1'b0, hblank: 1'b0};
          @(negedge clk);
        end
        in_sync = '{vblank: 1'b0, hblank: 1'b1};
      end
      begin
        for (int e = 1; e <= 11; e++) begin
          @(posedge clk); #1;
          if (e >= 8) chk($sformatf("thesis output at edge %0d", e), out_pix, outs[e - 8]);
          if (e == 8) chk("first output exact sum (x 2^13)", sum, longint'(14522) * 8192 + 6144);
        end
      end
    join
    // part 2: random coefficients and windows
    for (int rnd = 0; rnd < 5; rnd++) begin
      int pix [5][40];
      for (int i = 0; i < 25; i++) ram[FILT_BASE + i] = {1'($urandom), 17'($urandom % 32768)};
      load_coefs();
      for (int j = 0; j < 40; j++) begin
        for (int k = 0; k < 5; k++) begin pix[k][j] = int'($urandom % 65536); taps[k] = 16'(pix[k][j]); end
        in_sync = '{vblank: 1'b0, hblank: 1'b0};
        @(posedge clk); #1;
        if (j >= 7) begin
          longint s, ip;
          int c0;
          c0 = j - 3 - 4;     // window that ended 3 clocks ago
          s = 0;
          for (int r = 0; r < 5; r++)
            for (int c = 0; c < 5; c++)
              s += coef_val(ram[FILT_BASE + r*5 + c]) * pix[4 - r][c0 + c];
          chk("random sum", sum, s);
          ip = s >>> 13;
          if (ip < 0) ip = 0;
          if (ip > 65535) ip = 65535;
          chk("random out_pix", out_pix, ip);
        end
        @(negedge clk);
      end
      in_sync = '{vblank: 1'b0, hblank: 1'b1};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_temp_convert: checks the level-to-temperature conversion against the
// calibration points (W''=1657 -> 292 K, W''=2634 -> 323 K), against
// T = ((W'' + 308) / 2.70293408e-7)^(1/4) computed in floating point for
// random levels (result in 1/16 K, within one step), a level below B3, and
// the latency of T_BITS + 1 clocks.
module tb_temp_convert;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, start, ack, busy, valid;
  logic [15:0] level, temp;

  temp_convert dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic conv(input logic [15:0] w, input int tol);
    real t;
    int exp, cyc;
    t = (w + 308.0) / 2.70293408e-7;
    exp = (w + 308.0 > 0.0) ? int'($floor(16.0 * $sqrt($sqrt(t)))) : 0;
    @(negedge clk); start = 1; level = w;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!valid) begin @(negedge clk); cyc++; end
    checks++;
    if (temp > exp + tol || temp + tol < exp) begin
      failures++; $display("FAIL W=%0d temp=%0d expected %0d", w, temp, exp);
    end
    checks++;
    if (cyc != 15) begin failures++;  // valid T_BITS+1 = 14 clocks after start is sampled
      $display("FAIL latency %0d", cyc); end
    @(negedge clk); ack = 1; @(negedge clk); ack = 0;
    checks++;
    if (valid) begin failures++; $display("FAIL valid not cleared by ack"); end
  endtask

  initial begin
    rst_n = 0; start = 0; ack = 0; level = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    conv(16'd1657, 1);   // 19 C calibration point
    checks++; if (temp != 16'(292 * 16) && temp != 16'(292 * 16 - 1)) begin failures++; $display("FAIL 19C point %0d", temp); end
    conv(16'd2634, 1);   // 50 C calibration point
    checks++; if (temp != 16'(323 * 16) && temp != 16'(323 * 16 - 1)) begin failures++; $display("FAIL 50C point %0d", temp); end
    for (int i = 0; i < 200; i++) conv(16'(1000 + $urandom % 3500), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_he_gain_finder: checks the equalization gain ceil(255 * 2^16 / D) for
// edge and random denominators, the zero case, and the divider's latency
// (done exactly 27 clocks after start).
module tb_he_gain_finder;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, start, busy, done;
  logic [17:0] den;
  logic [25:0] gain;

  he_gain_finder #(.DEN_W(18), .FRAC(16)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [17:0] d);
    longint exp;
    int cyc;
    exp = (d == 0) ? 0 : (longint'(255) * 65536 + d - 1) / d;
    @(negedge clk); start = 1; den = d;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (gain !== 26'(exp)) begin
      failures++; $display("FAIL den=%0d gain=%0d expected %0d", d, gain, exp);
    end
    checks++;
    if (cyc != 28) begin  // done 27 clocks after the clock that samples start
      failures++; $display("FAIL den=%0d latency %0d, expected 28 negedges", d, cyc);
    end
  endtask

  initial begin
    rst_n = 0; start = 0; den = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    run(0); run(1); run(2); run(255); run(256); run(76800); run(18'h3FFFF);
    for (int i = 0; i < 300; i++) run(18'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_uart: self-checking test of the RS232 transmitter and receiver.
// The transmitter is looped back into the receiver at baud_div = 9 (10
// clocks per bit). Random bytes must arrive unchanged, each frame on the line
// must last exactly 10 bit times with a low start bit, and a frame with a low
// stop bit, driven by the test itself, must raise frame_err and no valid. A
// short low glitch must not start a byte.
module tb_uart;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam logic [7:0] DIV = 8'd9;
  localparam int BIT = 10;

  logic       rst_n, start, ready, txd, rxd, valid, frame_err, manual, man_line;
  logic [7:0] tx_byte, rx_byte;

  uart_tx u_tx (.clk, .rst_n, .baud_div(DIV), .data(tx_byte), .start, .ready, .txd);
  uart_rx u_rx (.clk, .rst_n, .baud_div(DIV), .rxd, .data(rx_byte), .valid, .frame_err);
  assign rxd = manual ? man_line : txd;

  int got_q [$];
  int errs = 0;
  always @(posedge clk) begin
    if (rst_n && valid) got_q.push_back(int'(rx_byte));
    if (rst_n && frame_err) errs++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic send(input logic [7:0] b);
    int len;
    while (!ready) @(negedge clk);
    tx_byte = b; start = 1;
    @(negedge clk); start = 0;
    // start bit is on the line now; count clocks until ready again
    len = 0;
    chk("start bit low", int'(txd), 0);
    while (!ready) begin @(negedge clk); len++; end
    chk("frame length", len, 10 * BIT);
  endtask

  task automatic bang(input logic [9:0] bits);   // LSB first, incl. start/stop
    for (int i = 0; i < 10; i++) begin
      man_line = bits[i];
      repeat (BIT) @(negedge clk);
    end
    man_line = 1;
    repeat (2 * BIT) @(negedge clk);
  endtask

  initial begin
    rst_n = 0; start = 0; tx_byte = 0; manual = 0; man_line = 1;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 60; i++) begin
      int b;
      b = int'($urandom % 256);
      send(8'(b));
      repeat (3 * BIT) @(negedge clk);   // let the receiver finish
      chk("bytes received", got_q.size(), 1);
      if (got_q.size() > 0) chk("byte value", got_q.pop_front(), b);
    end
    // bad stop bit
    manual = 1;
    bang({1'b0, 8'h5A, 1'b0});
    chk("frame error flagged", errs, 1);
    chk("no byte on frame error", got_q.size(), 0);
    // glitch shorter than half a bit
    man_line = 0; repeat (2) @(negedge clk); man_line = 1;
    repeat (15 * BIT) @(negedge clk);
    chk("glitch ignored", got_q.size() + errs, 1);
    // good manual frame
    bang({1'b1, 8'hC3, 1'b0});
    chk("manual byte count", got_q.size(), 1);
    if (got_q.size() > 0) chk("manual byte", got_q.pop_front(), 8'hC3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

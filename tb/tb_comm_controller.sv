// tb_comm_controller: self-checking test of the serial command handler.
// Bytes are fed straight into rx_data/rx_valid (the UART itself is tested in
// tb_uart). A transmitter model holds tx_ready low for 20 clocks after every
// tx_start and records the reply bytes. The RAM grant is random so that the
// controller has to wait for the shared write port.
// Checked: the impulse filter written after reset, SET_FILTER writing all 25
// coefficients to words 0..24 and answering ACK, NAK for a bad checksum and
// for an unknown command, MOUSE_POS updating the position, MEASURE raising
// meas_req and answering with the temperature, and that nothing is written
// to the RAM without a grant.
module tb_comm_controller;
  import ir_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0;
  logic [7:0] rx_data, tx_data;
  logic rx_valid, tx_start, tx_ready;
  logic cw_req, cw_gnt, cw_en;
  logic [COEF_AW-1:0] cw_addr;
  logic [COEF_W-1:0]  cw_data;
  logic [15:0] mouse_x, mouse_y, meas_temp;
  logic mouse_upd, meas_req, meas_valid, meas_ack, init_done;

  comm_controller dut (.*);

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  // RAM model and grant
  logic [COEF_W-1:0] ram [32];
  int writes = 0;
  always @(posedge clk) begin
    cw_gnt <= rst_n && ($urandom % 3 != 0);
    if (rst_n && cw_en) begin
      if (cw_addr < 32) ram[cw_addr] <= cw_data;
      writes++;
      if (!cw_gnt) begin failures++; $display("FAIL write without grant"); end
    end
  end

  // transmitter model
  int busy_cnt = 0;
  int reply_q [$];
  assign tx_ready = (busy_cnt == 0);
  always @(posedge clk) begin
    if (busy_cnt > 0) busy_cnt <= busy_cnt - 1;
    if (rst_n && tx_start) begin
      if (!tx_ready) begin failures++; $display("FAIL tx_start while busy"); end
      reply_q.push_back(int'(tx_data));
      busy_cnt <= 20;
    end
  end

  // measurement model
  int meas_reqs = 0, meas_acks = 0;
  always @(posedge clk) begin
    if (rst_n && meas_req) meas_reqs++;
    if (rst_n && meas_ack) meas_acks++;
  end

  int mouse_upds = 0;
  always @(posedge clk) if (rst_n && mouse_upd) mouse_upds++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input logic [7:0] b);
    rx_data = b; rx_valid = 1;
    @(negedge clk); rx_valid = 0;
    repeat (3 + $urandom % 5) @(negedge clk);
  endtask

  task automatic frame(input logic [7:0] c, input logic [7:0] p [$], input bit bad_ck);
    logic [7:0] ck;
    ck = c;
    put(START_BYTE);
    put(c);
    foreach (p[i]) begin put(p[i]); ck += p[i]; end
    put(bad_ck ? ck ^ 8'h5A : ck);
  endtask

  task automatic wait_reply(input int n);
    int t = 0;
    while (reply_q.size() < n && t < 5000) begin @(negedge clk); t++; end
    repeat (30) @(negedge clk);
    chk("reply length", reply_q.size(), n);
  endtask

  task automatic check_short(input logic [7:0] code, input logic [7:0] c);
    wait_reply(4);
    if (reply_q.size() == 4) begin
      chk("reply start", reply_q[0], START_BYTE);
      chk("reply code", reply_q[1], code);
      chk("reply cmd", reply_q[2], c);
      chk("reply checksum", reply_q[3], 8'(code + c));
    end
    reply_q.delete();
  endtask

  logic [7:0] p [$];
  logic [COEF_W-1:0] coefs [NTAPS];

  initial begin
    rx_data = 0; rx_valid = 0; meas_valid = 0; meas_temp = 0;
    for (int i = 0; i < 32; i++) ram[i] = '1;
    repeat (3) @(negedge clk); rst_n = 1;
    // impulse written after reset
    while (!init_done) @(negedge clk);
    repeat (2) @(negedge clk);
    chk("init writes", writes, NTAPS);
    for (int i = 0; i < NTAPS; i++) chk("impulse coef", ram[i], (i == 12) ? COEF_ONE : 0);
    chk("no reply after init", reply_q.size(), 0);

    // SET_FILTER, several times with random coefficients
    for (int r = 0; r < 4; r++) begin
      p.delete();
      for (int i = 0; i < NTAPS; i++) begin
        coefs[i] = COEF_W'($urandom);
        p.push_back(8'(coefs[i] >> 16));
        p.push_back(8'(coefs[i] >> 8));
        p.push_back(8'(coefs[i]));
      end
      writes = 0;
      frame(CMD_SET_FILTER, p, 0);
      check_short(RPL_ACK, CMD_SET_FILTER);
      chk("filter writes", writes, NTAPS);
      for (int i = 0; i < NTAPS; i++) chk("filter coef", ram[i], coefs[i]);
    end

    // bad checksum: NAK, RAM untouched
    writes = 0;
    frame(CMD_SET_FILTER, p, 1);
    check_short(RPL_NAK, CMD_SET_FILTER);
    chk("no writes on NAK", writes, 0);

    // unknown command
    p.delete();
    frame(8'h7E, p, 0);
    check_short(RPL_NAK, 8'h7E);

    // bytes before the start byte are ignored
    put(8'h33); put(8'h01);
    // mouse position
    for (int r = 0; r < 5; r++) begin
      logic [15:0] x, y;
      x = 16'($urandom % 320); y = 16'($urandom % 240);
      p.delete();
      p.push_back(x[15:8]); p.push_back(x[7:0]); p.push_back(y[15:8]); p.push_back(y[7:0]);
      mouse_upds = 0;
      frame(CMD_MOUSE_POS, p, 0);
      check_short(RPL_ACK, CMD_MOUSE_POS);
      chk("mouse upd", mouse_upds, 1);
      chk("mouse x", mouse_x, x);
      chk("mouse y", mouse_y, y);
    end

    // measure
    for (int r = 0; r < 5; r++) begin
      logic [15:0] t;
      logic [7:0] s;
      t = 16'($urandom);
      p.delete();
      meas_reqs = 0; meas_acks = 0;
      frame(CMD_MEASURE, p, 0);
      repeat (40) @(negedge clk);
      chk("meas req", meas_reqs, 1);
      chk("no reply before result", reply_q.size(), 0);
      meas_temp = t; meas_valid = 1;
      while (meas_acks == 0) @(negedge clk);
      meas_valid = 0;
      wait_reply(5);
      s = RPL_TEMP + t[15:8] + t[7:0];
      if (reply_q.size() == 5) begin
        chk("temp start", reply_q[0], START_BYTE);
        chk("temp code", reply_q[1], RPL_TEMP);
        chk("temp hi", reply_q[2], t[15:8]);
        chk("temp lo", reply_q[3], t[7:0]);
        chk("temp ck", reply_q[4], s);
      end
      reply_q.delete();
      chk("meas ack", meas_acks, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

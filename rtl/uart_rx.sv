// uart_rx: 8-bit asynchronous (RS232) receiver of the communication block.
//
// Frame: one start bit (0), eight data bits LSB first, one stop bit (1).
// One bit lasts baud_div+1 clocks (baud_div = 127 at a 14.7456 MHz clock gives
// the 115200 baud of the thesis). After a falling edge on the line the
// receiver waits half a bit, checks that the start bit is still low (else it
// returns to idle), then samples each data bit and the stop bit in the middle
// of its bit time. A byte with a good stop bit is presented on data with a
// one-clock valid pulse at the middle of the stop bit; a bad stop bit gives a
// one-clock frame_err pulse instead. The serial input passes a two-flop
// synchronizer first (two clocks of latency). This follows the receiver of
// the thesis, with the byte strobe made active-high.
module uart_rx (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] baud_div,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);
  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_e;
  state_e     state;
  logic [1:0] sync_ff;
  logic       rx;
  logic [7:0] cnt;
  logic [2:0] nbit;
  logic [7:0] shreg;

  assign rx = sync_ff[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_ff   <= 2'b11;
      state     <= IDLE;
      cnt       <= '0;
      nbit      <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync_ff   <= {sync_ff[0], rxd};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        IDLE: begin
          cnt <= '0;
          if (!rx) state <= START;
        end
        START: begin
          if (rx) state <= IDLE;                 // glitch, not a start bit
          else if (cnt == {1'b0, baud_div[7:1]}) begin
            cnt   <= '0;
            nbit  <= '0;
            state <= DATA;
          end else cnt <= cnt + 1'b1;
        end
        DATA: begin
          if (cnt == baud_div) begin
            cnt   <= '0;
            shreg <= {rx, shreg[7:1]};
            nbit  <= nbit + 1'b1;
            if (nbit == 3'd7) state <= STOP;
          end else cnt <= cnt + 1'b1;
        end
        STOP: begin
          if (cnt == baud_div) begin
            cnt   <= '0;
            state <= IDLE;
            if (rx) begin
              data  <= shreg;
              valid <= 1'b1;
            end else begin
              frame_err <= 1'b1;
            end
          end else cnt <= cnt + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule

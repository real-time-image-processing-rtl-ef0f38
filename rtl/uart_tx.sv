// uart_tx: 8-bit asynchronous (RS232) transmitter of the communication block.
//
// When ready is high, a one-clock start pulse loads data and the transmitter
// sends one start bit (0), the eight data bits LSB first and one stop bit (1),
// each baud_div+1 clocks long; ready drops on the clock after start and rises
// again when the stop bit has ended. txd idles high. This follows the
// transmitter of the thesis, clocked on the rising edge.
module uart_tx (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] baud_div,
  input  logic [7:0] data,
  input  logic       start,
  output logic       ready,
  output logic       txd
);
  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_e;
  state_e     state;
  logic [7:0] cnt;
  logic [2:0] nbit;
  logic [7:0] shreg;

  assign ready = (state == IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      cnt   <= '0;
      nbit  <= '0;
      shreg <= '0;
      txd   <= 1'b1;
    end else begin
      unique case (state)
        IDLE: begin
          txd <= 1'b1;
          cnt <= '0;
          if (start) begin
            shreg <= data;
            txd   <= 1'b0;
            state <= START;
          end
        end
        START: begin
          if (cnt == baud_div) begin
            cnt   <= '0;
            nbit  <= '0;
            txd   <= shreg[0];
            shreg <= {1'b0, shreg[7:1]};
            state <= DATA;
          end else cnt <= cnt + 1'b1;
        end
        DATA: begin
          if (cnt == baud_div) begin
            cnt <= '0;
            if (nbit == 3'd7) begin
              txd   <= 1'b1;
              state <= STOP;
            end else begin
              nbit  <= nbit + 1'b1;
              txd   <= shreg[0];
              shreg <= {1'b0, shreg[7:1]};
            end
          end else cnt <= cnt + 1'b1;
        end
        STOP: begin
          if (cnt == baud_div) begin
            cnt   <= '0;
            state <= IDLE;
          end else cnt <= cnt + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule

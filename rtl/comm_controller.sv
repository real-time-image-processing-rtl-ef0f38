// comm_controller: controller of the RS232 communication block.
//
// It decodes the frames the operator's interface program sends and answers
// each one. A frame is: START_BYTE, a command byte, the command's parameter
// bytes, and a checksum byte equal to the 8-bit sum of the command and
// parameter bytes.
//   CMD_SET_FILTER  75 bytes: 25 filter coefficients of 18 bits, 3 bytes each,
//                   MSB first (upper 6 bits ignored), row-major.
//   CMD_MOUSE_POS   4 bytes: x (16 bits), y (16 bits), MSB first.
//   CMD_MEASURE     no parameters: measure at the last mouse position.
// A frame with a bad checksum or an unknown command (whose checksum is then
// expected right after the command byte) is answered with
// START_BYTE, RPL_NAK, cmd, checksum. A good SET_FILTER is answered with
// START_BYTE, RPL_ACK, cmd, checksum once all 25 words are in the coefficient
// RAM; a good MOUSE_POS is acknowledged at once and its position is put out
// with a one-clock mouse_upd pulse (for the symbology microcontroller and the
// temperature-measuring block). A good MEASURE raises meas_req for one clock;
// when the temperature-measuring path returns meas_valid the controller
// answers meas_ack and sends START_BYTE, RPL_TEMP, temp[15:8], temp[7:0],
// checksum.
//
// The coefficient RAM is shared with the histogram equalizer, which rewrites
// its table in every vertical blanking. The controller therefore only writes
// on clocks when cw_gnt is high (the equalizer is idle), one word per granted
// clock, and acknowledges after the last word. After reset it writes the
// impulse filter (centre 1.0) the same way, without a reply. Bytes that
// arrive while a command is executed or answered are ignored.
//
// The thesis gives this behaviour (start byte, command, parameters, checksum,
// valid/invalid answer, waiting for the RAM, temperature reply); the byte
// codes, parameter layout and checksum rule are this design's choices.
module comm_controller
  import ir_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // receiver
  input  logic [7:0]         rx_data,
  input  logic               rx_valid,
  // transmitter
  output logic [7:0]         tx_data,
  output logic               tx_start,
  input  logic               tx_ready,
  // coefficient RAM write port, shared with the equalizer
  output logic               cw_req,
  input  logic               cw_gnt,
  output logic               cw_en,
  output logic [COEF_AW-1:0] cw_addr,
  output logic [COEF_W-1:0]  cw_data,
  // mouse position
  output logic [15:0]        mouse_x,
  output logic [15:0]        mouse_y,
  output logic               mouse_upd,
  // temperature measurement
  output logic               meas_req,
  input  logic               meas_valid,
  input  logic [15:0]        meas_temp,
  output logic               meas_ack,
  output logic               init_done
);
  typedef enum logic [2:0] {S_WRITE, S_START, S_CMD, S_PARAM, S_CK, S_MEAS, S_REPLY} state_e;
  state_e state;

  logic [COEF_W-1:0] coef_buf [NTAPS];
  logic [7:0]        cmd;
  logic [7:0]        ck;
  logic [6:0]        plen;
  logic [6:0]        pcnt;
  logic              bad_cmd;
  logic [4:0]        tap;
  logic [31:0]       pos_sr;
  logic [4:0]        widx;
  logic [7:0]        rbuf [5];
  logic [2:0]        rlen;
  logic [2:0]        ridx;

  assign cw_req  = (state == S_WRITE);
  assign cw_en   = cw_req && cw_gnt;
  assign cw_addr = COEF_AW'(FILT_BASE) + COEF_AW'(widx);
  assign cw_data = coef_buf[widx];
  assign tx_data = (ridx < 3'd5) ? rbuf[ridx] : 8'h00;
  assign tx_start = (state == S_REPLY) && tx_ready && (ridx < rlen);

  function automatic logic [6:0] param_len(input logic [7:0] c);
    unique case (c)
      CMD_SET_FILTER: return 7'(FILTER_PARAM_BYTES);
      CMD_MOUSE_POS:  return 7'd4;
      default:        return 7'd0;
    endcase
  endfunction

  function automatic logic known_cmd(input logic [7:0] c);
    return (c == CMD_SET_FILTER) || (c == CMD_MOUSE_POS) || (c == CMD_MEASURE);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_WRITE;
      for (int i = 0; i < NTAPS; i++) coef_buf[i] <= (i == NTAPS / 2) ? COEF_ONE : '0;
      for (int i = 0; i < 5; i++) rbuf[i] <= '0;
      cmd       <= '0;
      ck        <= '0;
      plen      <= '0;
      pcnt      <= '0;
      bad_cmd   <= 1'b0;
      tap       <= '0;
      pos_sr    <= '0;
      widx      <= '0;
      rlen      <= '0;
      ridx      <= '0;
      mouse_x   <= '0;
      mouse_y   <= '0;
      mouse_upd <= 1'b0;
      meas_req  <= 1'b0;
      meas_ack  <= 1'b0;
      init_done <= 1'b0;
    end else begin
      mouse_upd <= 1'b0;
      meas_req  <= 1'b0;
      meas_ack  <= 1'b0;
      unique case (state)
        S_WRITE: if (cw_gnt) begin
          if (widx == 5'(NTAPS - 1)) begin
            widx <= '0;
            if (init_done) begin
              rbuf[0] <= START_BYTE; rbuf[1] <= RPL_ACK; rbuf[2] <= cmd;
              rbuf[3] <= RPL_ACK + cmd;
              rlen <= 3'd4; ridx <= '0;
              state <= S_REPLY;
            end else begin
              init_done <= 1'b1;
              state     <= S_START;
            end
          end else widx <= widx + 1'b1;
        end
        S_START: if (rx_valid && rx_data == START_BYTE) state <= S_CMD;
        S_CMD: if (rx_valid) begin
          cmd     <= rx_data;
          ck      <= rx_data;
          plen    <= param_len(rx_data);
          bad_cmd <= !known_cmd(rx_data);
          pcnt    <= '0;
          tap     <= '0;
          state   <= (param_len(rx_data) == 0) ? S_CK : S_PARAM;
        end
        S_PARAM: if (rx_valid) begin
          ck     <= ck + rx_data;
          pcnt   <= pcnt + 1'b1;
          pos_sr <= {pos_sr[23:0], rx_data};
          if (cmd == CMD_SET_FILTER) begin
            coef_buf[tap] <= {coef_buf[tap][COEF_W-9:0], rx_data};
            if (pcnt % 3 == 2) tap <= tap + 1'b1;
          end
          if (pcnt == plen - 1'b1) state <= S_CK;
        end
        S_CK: if (rx_valid) begin
          ridx <= '0;
          if (bad_cmd || rx_data != ck) begin
            rbuf[0] <= START_BYTE; rbuf[1] <= RPL_NAK; rbuf[2] <= cmd;
            rbuf[3] <= RPL_NAK + cmd;
            rlen  <= 3'd4;
            state <= S_REPLY;
          end else begin
            unique case (cmd)
              CMD_SET_FILTER: begin
                widx  <= '0;
                state <= S_WRITE;
              end
              CMD_MOUSE_POS: begin
                mouse_x   <= pos_sr[31:16];
                mouse_y   <= pos_sr[15:0];
                mouse_upd <= 1'b1;
                rbuf[0] <= START_BYTE; rbuf[1] <= RPL_ACK; rbuf[2] <= cmd;
                rbuf[3] <= RPL_ACK + cmd;
                rlen  <= 3'd4;
                state <= S_REPLY;
              end
              default: begin
                meas_req <= 1'b1;
                state    <= S_MEAS;
              end
            endcase
          end
        end
        S_MEAS: if (meas_valid) begin
          meas_ack <= 1'b1;
          rbuf[0] <= START_BYTE; rbuf[1] <= RPL_TEMP;
          rbuf[2] <= meas_temp[15:8]; rbuf[3] <= meas_temp[7:0];
          rbuf[4] <= RPL_TEMP + meas_temp[15:8] + meas_temp[7:0];
          rlen  <= 3'd5;
          ridx  <= '0;
          state <= S_REPLY;
        end
        S_REPLY: begin
          if (tx_start) ridx <= ridx + 1'b1;
          else if (ridx == rlen && tx_ready) state <= S_START;
        end
        default: state <= S_START;
      endcase
    end
  end
endmodule

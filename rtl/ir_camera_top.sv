// ir_camera_top: digital processing part of an uncooled medical infrared
// camera (thermograph).
//
// The digitized detector stream passes four stages, one pixel per clock:
//   nuc_correct     per-pixel two-point gain/offset correction       (2 clk)
//   filter5x5       5x5 FIR filter loaded over RS232, impulse after
//                   reset                                             (5 clk)
//   he_compress     histogram equalization from 12 to 8 bits, table
//                   rebuilt in every vertical blanking                 (2 clk)
//   symbology_ctrl  overlay of the mouse icon drawn by the PIC          (2 clk)
// so out_pix/out_sync follow in_pix/in_sync by 11 clocks. The filter output
// is clipped to 12 bits (0..4095) before the equalizer, which takes 12-bit
// levels. histogram_stats counts the levels of each field; when vertical
// blanking starts he_coef_finder (with he_gain_finder) turns the counts into
// the mapping used for the next field.
//
// The 1024x18 coefficient RAM holds both the filter coefficients and the
// equalization table. Port A is read by the compression block during active
// video and by the convolution block, which copies the 25 filter
// coefficients once vertical blanking has reached the filter output, so the
// two readers never overlap (checked by an assertion). Port B is written by the
// coefficient finder while it is busy and otherwise by the RS232 controller,
// which waits until neither the finder nor the coefficient copy is running.
//
// The RS232 controller (comm_controller with uart_rx/uart_tx, 115200 baud at
// BAUD_DIV = 127 and a 14.7456 MHz clock) accepts new filter coefficients,
// the mouse position (passed to the PIC on mouse_x/mouse_y/mouse_upd) and
// temperature requests; temp_measure captures the corrected pixel at the
// mouse position and temp_convert turns it into kelvin * 16 for the reply.
//
// The detector front end, the PIC and the calibration that computes the
// per-pixel gains and offsets are outside this design: their signals are
// ports (in_pix/in_sync, pic_*, cal_*). ready rises when all memories have
// been initialised after reset (about NPIX clocks). The field needs a vertical
// blanking of at least about HE_LEVELS + 60 clocks for the table rebuild.
// H_ACTIVE follows the thesis (320 columns); V_ACTIVE = 240 is assumed.
//
// Lint notes: outputs that the top does not need stay open - the RAM's port B
// read data, the finder's done, the receiver's frame_err (a bad byte is simply
// dropped), the busy flags of the temperature blocks - and the filter's exact
// sum (filt_sum) is kept only for observation. rst_n is used both as the
// asynchronous reset and in the assertions' disable condition, which lint
// reports as a mixed synchronous/asynchronous net.
module ir_camera_top
  import ir_pkg::*;
#(
  parameter int unsigned H_ACTIVE   = 320,
  parameter int unsigned V_ACTIVE   = 240,
  parameter int unsigned PIX_W      = 16,
  parameter int unsigned LINE_DEPTH = 512,
  parameter int unsigned HE_LEVELS  = 4096,
  parameter logic [7:0]  BAUD_DIV   = 8'd127,
  localparam int unsigned NPIX = H_ACTIVE * V_ACTIVE,
  localparam int unsigned PAW  = $clog2(NPIX),
  localparam int unsigned LW   = $clog2(HE_LEVELS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // detector stream
  input  logic [PIX_W-1:0]  in_pix,
  input  sync_t             in_sync,
  // display stream
  output logic [7:0]        out_pix,
  output sync_t             out_sync,
  // RS232
  input  logic              rxd,
  output logic              txd,
  // non-uniformity calibration load
  input  logic              cal_we,
  input  logic [PAW-1:0]    cal_addr,
  input  logic [15:0]       cal_gain,
  input  logic signed [15:0] cal_offset,
  // symbology microcontroller
  input  logic [PAW-1:0]    pic_addr,
  input  logic [1:0]        pic_data,
  input  logic              pic_wr,
  output logic [15:0]       mouse_x,
  output logic [15:0]       mouse_y,
  output logic              mouse_upd,
  output logic              ready
);
  // ---------------------------------------------------------------- NUC
  logic [PIX_W-1:0] nuc_pix;
  sync_t            nuc_sync;
  logic             nuc_ready;

  nuc_correct #(.PIX_W(PIX_W), .NPIX(NPIX)) u_nuc (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_pix     (in_pix),
    .in_sync    (in_sync),
    .out_pix    (nuc_pix),
    .out_sync   (nuc_sync),
    .cal_we     (cal_we),
    .cal_addr   (cal_addr),
    .cal_gain   (cal_gain),
    .cal_offset (cal_offset),
    .init_done  (nuc_ready)
  );

  // ---------------------------------------------------------------- coefficient RAM
  logic               cra_en;
  logic [COEF_AW-1:0] cra_addr;
  logic [COEF_W-1:0]  cra_q;
  logic               crb_en;
  logic [COEF_AW-1:0] crb_addr;
  logic [COEF_W-1:0]  crb_din;

  logic               conv_rd_en, cmp_rd_en;
  logic [COEF_AW-1:0] conv_rd_addr, cmp_rd_addr;
  logic               conv_busy;
  logic               he_busy, he_wr_en;
  logic [COEF_AW-1:0] he_wr_addr;
  logic [COEF_W-1:0]  he_wr_data;
  logic               cc_req, cc_gnt, cc_wr_en;
  logic [COEF_AW-1:0] cc_wr_addr;
  logic [COEF_W-1:0]  cc_wr_data;

  assign cra_en   = conv_rd_en || cmp_rd_en;
  assign cra_addr = conv_rd_en ? conv_rd_addr : cmp_rd_addr;
  assign cc_gnt   = !he_busy && !conv_busy;
  assign crb_en   = he_busy ? he_wr_en   : cc_wr_en;
  assign crb_addr = he_busy ? he_wr_addr : cc_wr_addr;
  assign crb_din  = he_busy ? he_wr_data : cc_wr_data;

  dpram #(.DEPTH(1 << COEF_AW), .WIDTH(COEF_W)) u_coef_ram (
    .clk    (clk),
    .a_en   (cra_en),
    .a_addr (cra_addr),
    .a_q    (cra_q),
    .b_en   (crb_en),
    .b_we   (crb_en),
    .b_addr (crb_addr),
    .b_din  (crb_din),
    .b_q    ()
  );

  // ---------------------------------------------------------------- 5x5 filter
  logic signed [41:0] filt_sum;
  logic [PIX_W-1:0]   filt_pix;
  sync_t              filt_sync;

  filter5x5 #(.PIX_W(PIX_W), .LINE_DEPTH(LINE_DEPTH)) u_filter (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_pix    (nuc_pix),
    .in_sync   (nuc_sync),
    .cr_en     (conv_rd_en),
    .cr_addr   (conv_rd_addr),
    .cr_q      (cra_q),
    .coef_busy (conv_busy),
    .sum       (filt_sum),
    .out_pix   (filt_pix),
    .out_sync  (filt_sync)
  );

  // ---------------------------------------------------------------- histogram equalization
  logic [LW-1:0]  he_pix;
  assign he_pix = (filt_pix > PIX_W'(HE_LEVELS - 1)) ? LW'(HE_LEVELS - 1) : LW'(filt_pix);

  logic           st_ready, st_done;
  logic [LW-1:0]  st_low, map_low;
  logic [17:0]    st_low_cnt, st_total;
  logic           scan_en;
  logic [LW-1:0]  scan_addr;
  logic [17:0]    scan_q;

  histogram_stats #(.LEVELS(HE_LEVELS), .CNT_W(18)) u_stats (
    .clk          (clk),
    .rst_n        (rst_n),
    .in_pix       (he_pix),
    .in_sync      (filt_sync),
    .ready        (st_ready),
    .field_done   (st_done),
    .stat_low     (st_low),
    .stat_low_cnt (st_low_cnt),
    .stat_total   (st_total),
    .scan_en      (scan_en),
    .scan_addr    (scan_addr),
    .scan_q       (scan_q)
  );

  he_coef_finder #(.LEVELS(HE_LEVELS), .CNT_W(18)) u_finder (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (st_done),
    .stat_low     (st_low),
    .stat_low_cnt (st_low_cnt),
    .stat_total   (st_total),
    .scan_en      (scan_en),
    .scan_addr    (scan_addr),
    .scan_q       (scan_q),
    .cw_en        (he_wr_en),
    .cw_addr      (he_wr_addr),
    .cw_data      (he_wr_data),
    .map_low      (map_low),
    .busy         (he_busy),
    .done         ()
  );

  logic [7:0] eq_pix;
  sync_t      eq_sync;

  he_compress #(.LW(LW)) u_compress (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_pix   (he_pix),
    .in_sync  (filt_sync),
    .map_low  (map_low),
    .rd_en    (cmp_rd_en),
    .rd_addr  (cmp_rd_addr),
    .rd_q     (cra_q),
    .out_pix  (eq_pix),
    .out_sync (eq_sync)
  );

  // ---------------------------------------------------------------- symbology overlay
  logic sym_ready;

  symbology_ctrl #(.NPIX(NPIX)) u_sym (
    .clk       (clk),
    .rst_n     (rst_n),
    .pic_addr  (pic_addr),
    .pic_data  (pic_data),
    .pic_wr    (pic_wr),
    .in_pix    (eq_pix),
    .in_sync   (eq_sync),
    .out_pix   (out_pix),
    .out_sync  (out_sync),
    .init_done (sym_ready)
  );

  // ---------------------------------------------------------------- RS232 and temperature
  logic [7:0]  rx_data, tx_data;
  logic        rx_valid, tx_start, tx_ready;
  logic        meas_req, meas_ack;
  logic        tm_valid, tm_valid_d;
  logic [PIX_W-1:0] tm_value;
  logic        tc_valid;
  logic [15:0] tc_temp;
  logic        cc_ready;

  uart_rx u_rx (
    .clk       (clk),
    .rst_n     (rst_n),
    .baud_div  (BAUD_DIV),
    .rxd       (rxd),
    .data      (rx_data),
    .valid     (rx_valid),
    .frame_err ()
  );

  uart_tx u_tx (
    .clk      (clk),
    .rst_n    (rst_n),
    .baud_div (BAUD_DIV),
    .data     (tx_data),
    .start    (tx_start),
    .ready    (tx_ready),
    .txd      (txd)
  );

  comm_controller u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .rx_data    (rx_data),
    .rx_valid   (rx_valid),
    .tx_data    (tx_data),
    .tx_start   (tx_start),
    .tx_ready   (tx_ready),
    .cw_req     (cc_req),
    .cw_gnt     (cc_gnt),
    .cw_en      (cc_wr_en),
    .cw_addr    (cc_wr_addr),
    .cw_data    (cc_wr_data),
    .mouse_x    (mouse_x),
    .mouse_y    (mouse_y),
    .mouse_upd  (mouse_upd),
    .meas_req   (meas_req),
    .meas_valid (tc_valid),
    .meas_temp  (tc_temp),
    .meas_ack   (meas_ack),
    .init_done  (cc_ready)
  );

  temp_measure #(.PIX_W(PIX_W)) u_tmeas (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_pix  (nuc_pix),
    .in_sync (nuc_sync),
    .req     (meas_req),
    .x       (mouse_x),
    .y       (mouse_y),
    .ack     (meas_ack),
    .busy    (),
    .valid   (tm_valid),
    .value   (tm_value)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tm_valid_d <= 1'b0;
    else        tm_valid_d <= tm_valid;
  end

  temp_convert #(.W_BITS(PIX_W)) u_tconv (
    .clk   (clk),
    .rst_n (rst_n),
    .start (tm_valid && !tm_valid_d),
    .level (tm_value),
    .ack   (meas_ack),
    .busy  (),
    .valid (tc_valid),
    .temp  (tc_temp)
  );

  assign ready = nuc_ready && st_ready && sym_ready && cc_ready;

  // ---------------------------------------------------------------- rules of the shared RAM
  // port A has one reader at a time; the controller writes only when granted
  a_single_reader: assert property (@(posedge clk) disable iff (!rst_n) !(conv_rd_en && cmp_rd_en));
  a_granted_write: assert property (@(posedge clk) disable iff (!rst_n) cc_wr_en |-> (cc_req && cc_gnt));
endmodule

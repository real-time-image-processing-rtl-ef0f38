// tb_ir_camera_top_body.svh: body of the end-to-end test of ir_camera_top,
// shared by tb_ir_camera_top (small picture) and tb_ir_camera_top_full
// (the default 320x240 top). The including module declares clk, the DUT
// ports, and the localparams H, V, BAUD (divider of the DUT), HB and VB
// (blanking lengths in clocks) before including this file, and instantiates
// the DUT as "dut".
//
// What happens:
//   reset -> wait for ready -> load a random two-point calibration (unity
//   for the two measuring pixels) -> draw a symbology icon with slow PIC
//   strobes -> start video. While the video runs, commands are bit-banged
//   into rxd at the DUT's baud rate and the replies on txd are decoded:
//   MOUSE_POS (ACK), SET_FILTER with a sharpening kernel whose checksum byte
//   is sent at the start of a frame (ACK, used from the next frame),
//   SET_FILTER with a bad checksum (NAK), an unknown command (NAK),
//   SET_FILTER with random coefficients whose checksum is sent at the start
//   of vertical blanking, so the write must wait while the equalizer owns the
//   RAM (ACK, used two frames later), and two MEASURE commands at pixels
//   held at the thesis's calibration levels 1657 and 2634 (TEMP replies).
// Reference model: every input pixel is corrected with the same calibration,
// put into a pixel stream, filtered with the coefficient set of its frame,
// clipped to 12 bits, counted into that frame's histogram and mapped with
// the table built from the previous frame's histogram, then overlaid. Each
// display pixel is compared; pixels whose filter window or previous
// histogram contains start-up pixels are not compared. out_sync must equal
// in_sync delayed by 11 clocks. Every mechanism below is counted and a
// mechanism that never happened is a failure.

  import ir_pkg::*;
  int checks = 0, failures = 0;

  localparam int NP   = H * V;
  localparam int BIT  = int'(BAUD) + 1;
  localparam int RING = 8 * H;
  localparam int LEV  = 4096;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  // ------------------------------------------------------------ mechanism counters
  int m_ram_wait = 0, m_ack = 0, m_nak = 0, m_filter_switch = 0, m_he_rebuild = 0;
  int m_temp = 0, m_mouse = 0, m_white = 0, m_black = 0, m_clip_low = 0;
  int m_clip_high = 0, m_he_above = 0, m_he_table = 0, m_nuc = 0, m_frames = 0;

  logic he_busy_d = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.cc_req && !dut.cc_gnt) m_ram_wait++;
    he_busy_d <= dut.he_busy;
    if (he_busy_d && !dut.he_busy) m_he_rebuild++;
    if (mouse_upd) m_mouse++;
  end

  // ------------------------------------------------------------ models
  int           gain_m [NP];
  int           offs_m [NP];
  logic [1:0]   sym_m  [NP];
  logic [17:0]  coef_sets [$][NTAPS];
  int           sched_from [$];       // first frame of each coefficient set
  int           ring [RING];
  longint       gk = 0;               // global index of active pixels
  int           hist [LEV];
  bit           hist_known;
  logic [7:0]   map_m [LEV];
  bit           map_known = 0;
  int           map_m_low = 0;
  bit           video_on = 0;
  int           frame_idx = -1;
  int           prev_set = 0;
  bit           stop_video = 0, video_done = 0;

  typedef struct { int v; bit care; } exp_t;
  exp_t exp_q [$];

  int mx [2], my [2], mval [2];

  function automatic longint cv(logic [17:0] c);
    return c[17] ? -longint'(c[16:0]) : longint'(c[16:0]);
  endfunction

  function automatic int set_for(int f);
    int s = 0;
    foreach (sched_from[i]) if (sched_from[i] <= f) s = i;
    return s;
  endfunction

  function automatic int nuc_model(int p, int idx);
    longint a;
    a = longint'(p) * longint'(gain_m[idx]) + (longint'(offs_m[idx]) <<< 14) + (1 << 13);
    a = a >>> 14;
    if (a < 0) a = 0;
    if (a > 65535) a = 65535;
    return int'(a);
  endfunction

  function automatic void build_map();
    int low = -1, nlow, n = 0;
    longint gain, cdf = 0;
    for (int v = 0; v < LEV; v++) begin
      if (hist[v] > 0 && low < 0) low = v;
      n += hist[v];
    end
    if (low < 0) low = 0;
    nlow = hist[low];
    gain = (n - nlow == 0) ? 0 : (longint'(255) * 65536 + (n - nlow) - 1) / (n - nlow);
    for (int v = 0; v < LEV; v++) begin
      longint m;
      cdf += hist[v];
      if (v < low) map_m[v] = 0;
      else if (v - low >= MAP_DEPTH) map_m[v] = 255;
      else begin
        m = ((cdf - nlow) * gain) >>> 16;
        map_m[v] = (m > 255) ? 8'd255 : 8'(m);
      end
    end
    map_m_low = low;
  endfunction

  // temperature: largest t (1/16 K) with A3_Q48 * t^4 <= (W + 308) * 2^64
  function automatic int temp_model(int w);
    logic [127:0] lhs, rhs, t4;
    int t = 0;
    rhs = 128'(w + 308) << 64;
    for (int b = 12; b >= 0; b--) begin
      int c;
      c = t | (1 << b);
      t4 = 128'(c) * 128'(c) * 128'(c) * 128'(c);
      lhs = t4 * 128'(76080831);
      if (lhs <= rhs) t = c;
    end
    return t;
  endfunction

  function automatic int scene(int r, int c);
    for (int i = 0; i < 2; i++) if (r == my[i] && c == mx[i]) return mval[i];
    if ($urandom % 50 == 0) return 20000 + int'($urandom % 20000);
    if ($urandom % 20 == 0) return int'($urandom % 4096);
    return 1200 + int'($urandom % 1800);
  endfunction

  // one active pixel: model and expected output
  task automatic model_pixel(int r, int c, int raw);
    int     idx, x, fp, hp, e, s_id;
    longint s;
    bit     wknown, care;
    logic [17:0] cs [NTAPS];
    idx = r * H + c;
    x = nuc_model(raw, idx);
    ring[int'(gk % RING)] = x;
    s_id = set_for(frame_idx);
    cs = coef_sets[s_id];
    wknown = (gk >= longint'(5 * H + 4));
    s = 0;
    if (wknown)
      for (int rr = 1; rr <= 5; rr++)
        for (int cc = 1; cc <= 5; cc++)
          s += cv(cs[(rr - 1) * 5 + cc - 1]) * longint'(ring[int'((gk - (5 - cc) - (6 - rr) * H) % RING)]);
    fp = (s < 0) ? 0 : ((s >>> 13) > 65535) ? 65535 : int'(s >>> 13);
    hp = (fp > LEV - 1) ? LEV - 1 : fp;
    if (wknown) hist[hp]++; else hist_known = 0;
    care = wknown && map_known;
    e = map_m[hp];
    if (sym_m[idx] == 2'd1) e = 255;
    else if (sym_m[idx] == 2'd2) e = 0;
    exp_q.push_back('{e, care});
    if (care) begin
      if (s < 0) m_clip_low++;
      if (fp > LEV - 1) m_clip_high++;
      if (sym_m[idx] == 2'd1) m_white++;
      else if (sym_m[idx] == 2'd2) m_black++;
      else if (hp - map_m_low >= MAP_DEPTH) m_he_above++;
      else if (map_m[hp] > 0 && map_m[hp] < 255) m_he_table++;
      if (gain_m[idx] != 16384 || offs_m[idx] != 0) m_nuc++;
    end
    gk++;
  endtask

  // ------------------------------------------------------------ video source
  event ev_active, ev_vblank;
  initial begin
    in_pix = 0; in_sync = '{vblank: 1'b1, hblank: 1'b1};
    wait (video_on);
    forever begin
      in_sync = '{vblank: 1'b1, hblank: 1'b1};
      -> ev_vblank;
      repeat (VB) @(negedge clk);
      if (stop_video) break;
      frame_idx++;
      // table for this frame comes from the previous frame's histogram
      if (frame_idx > 0) begin
        build_map();
        map_known = hist_known;
      end
      if (map_known) begin
        m_frames++;
        if (set_for(frame_idx) != prev_set) m_filter_switch++;
      end
      prev_set = set_for(frame_idx);
      for (int v = 0; v < LEV; v++) hist[v] = 0;
      hist_known = 1;
      -> ev_active;
      for (int r = 0; r < V; r++) begin
        in_sync = '{vblank: 1'b0, hblank: 1'b1};
        repeat (HB) @(negedge clk);
        for (int c = 0; c < H; c++) begin
          int raw;
          raw = scene(r, c);
          in_sync = '{vblank: 1'b0, hblank: 1'b0};
          in_pix = 16'(raw);
          model_pixel(r, c, raw);
          @(negedge clk);
        end
      end
    end
    video_done = 1;
  end

  // ------------------------------------------------------------ output checker
  sync_t sync_hist [12];
  bit    sync_armed = 0;
  int    compared = 0;
  always @(posedge clk) begin
    for (int i = 11; i > 0; i--) sync_hist[i] <= sync_hist[i - 1];
    sync_hist[0] <= in_sync;
  end
  always @(negedge clk) if (rst_n && sync_armed) begin
    if (out_sync != sync_hist[10]) begin
      failures++;
      $display("FAIL out_sync latency at %0t", $time);
    end
    if (is_active(out_sync)) begin
      exp_t e;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected output pixel"); end
      else begin
        e = exp_q.pop_front();
        if (e.care) begin
          compared++;
          checks++;
          if (int'(out_pix) != e.v) begin
            failures++;
            if (failures < 20) $display("FAIL pixel %0d: got %0d expected %0d", compared, out_pix, e.v);
          end
        end
      end
    end
  end

  // ------------------------------------------------------------ RS232 host
  logic [7:0] rep_q [$];
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge txd);
      repeat (BIT / 2) @(negedge clk);
      if (txd != 0) continue;
      for (int i = 0; i < 8; i++) begin
        repeat (BIT) @(negedge clk);
        b[i] = txd;
      end
      repeat (BIT) @(negedge clk);
      if (txd != 1) begin failures++; $display("FAIL reply stop bit"); end
      rep_q.push_back(b);
    end
  end

  task automatic send_byte(logic [7:0] b);
    rxd = 0; repeat (BIT) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (BIT) @(negedge clk); end
    rxd = 1; repeat (BIT + 2) @(negedge clk);
  endtask

  // mode 0: send at once; 1: checksum at the start of a frame;
  // 2: checksum at the start of vertical blanking
  task automatic send_cmd(logic [7:0] c, logic [7:0] p [$], bit bad, int mode, int new_set);
    logic [7:0] ck;
    ck = c;
    send_byte(START_BYTE);
    send_byte(c);
    foreach (p[i]) begin send_byte(p[i]); ck += p[i]; end
    if (mode == 1) begin
      @(ev_active);
      sched_from.push_back(frame_idx + 1);
      coef_sets.push_back(coef_sets[new_set]);
    end else if (mode == 2) begin
      @(ev_vblank);
      sched_from.push_back(frame_idx + 2);
      coef_sets.push_back(coef_sets[new_set]);
    end
    send_byte(bad ? ck ^ 8'h3C : ck);
  endtask

  task automatic get_reply(int n, output logic [7:0] r [$]);
    int t = 0;
    while (rep_q.size() < n && t < 40 * VB + 4 * NP + 200 * BIT) begin @(negedge clk); t++; end
    chk("reply bytes", rep_q.size(), n);
    r = rep_q;
    rep_q.delete();
  endtask

  task automatic expect_short(logic [7:0] code, logic [7:0] c);
    logic [7:0] r [$];
    get_reply(4, r);
    if (r.size() == 4) begin
      chk("reply start", r[0], START_BYTE);
      chk("reply code", r[1], code);
      chk("reply cmd", r[2], c);
      chk("reply checksum", r[3], 8'(code + c));
      if (r[1] == code && code == RPL_ACK) m_ack++;
      if (r[1] == code && code == RPL_NAK) m_nak++;
    end
  endtask

  function automatic void coef_bytes(logic [17:0] cs [NTAPS], ref logic [7:0] p [$]);
    p.delete();
    for (int i = 0; i < NTAPS; i++) begin
      p.push_back(8'(cs[i] >> 16)); p.push_back(8'(cs[i] >> 8)); p.push_back(8'(cs[i]));
    end
  endfunction

  task automatic mouse(int x, int y);
    logic [7:0] p [$];
    p = '{8'(x >> 8), 8'(x), 8'(y >> 8), 8'(y)};
    send_cmd(CMD_MOUSE_POS, p, 0, 0, 0);
    expect_short(RPL_ACK, CMD_MOUSE_POS);
    chk("mouse x", mouse_x, x);
    chk("mouse y", mouse_y, y);
  endtask

  task automatic measure(int i);
    logic [7:0] p [$];
    logic [7:0] r [$];
    int t, tm;
    mouse(mx[i], my[i]);
    send_cmd(CMD_MEASURE, p, 0, 0, 0);
    get_reply(5, r);
    if (r.size() == 5) begin
      t = {r[2], r[3]};
      tm = temp_model(mval[i]);
      chk("temp start", r[0], START_BYTE);
      chk("temp code", r[1], RPL_TEMP);
      chk("temp value", t, tm);
      chk("temp checksum", r[4], 8'(RPL_TEMP + r[2] + r[3]));
      checks++;
      if (t < ((i == 0) ? 292 : 323) * 16 - 16 || t > ((i == 0) ? 292 : 323) * 16 + 16) begin
        failures++; $display("FAIL temperature %0d/16 K far from calibration point", t);
      end
      if (t == tm) m_temp++;
    end
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (40 * NP + 60 * VB + 2000 * BIT + 600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ main sequence
  initial begin
    logic [17:0] imp [NTAPS], sharp [NTAPS], rnd [NTAPS];
    logic [7:0] p [$];
    int b_frame, last;
    rst_n = 0; rxd = 1;
    cal_we = 0; cal_addr = 0; cal_gain = 0; cal_offset = 0;
    pic_addr = 0; pic_data = 0; pic_wr = 0;
    mx[0] = H / 2 + 1; my[0] = V / 2;     mval[0] = 1657;
    mx[1] = 3;         my[1] = V - 2;     mval[1] = 2634;
    for (int i = 0; i < NTAPS; i++) begin
      imp[i] = (i == 12) ? COEF_ONE : 18'd0;
      sharp[i] = 0;
      rnd[i] = {1'($urandom), 17'($urandom % 18'h00C00)};
    end
    sharp[12] = 18'h04000;                                   // 2.0
    sharp[7] = 18'h20800; sharp[17] = 18'h20800;             // -0.25 above/below
    sharp[11] = 18'h20800; sharp[13] = 18'h20800;            // -0.25 left/right
    coef_sets.push_back(imp); sched_from.push_back(0);       // set 0: impulse
    coef_sets.push_back(sharp); sched_from.push_back(1 << 30);
    coef_sets.push_back(rnd); sched_from.push_back(1 << 30);
    for (int i = 0; i < NP; i++) begin gain_m[i] = 16384; offs_m[i] = 0; sym_m[i] = 0; end

    repeat (5) @(negedge clk);
    rst_n = 1;
    chk("ready low after reset", ready, 0);
    while (!ready) @(negedge clk);
    // calibration
    for (int i = 0; i < NP; i++) begin
      bit keep;
      keep = (i == my[0] * H + mx[0]) || (i == my[1] * H + mx[1]);
      gain_m[i] = keep ? 16384 : 14746 + int'($urandom % 3277);
      offs_m[i] = keep ? 0 : int'($urandom % 201) - 100;
      cal_we = 1; cal_addr = PAW'(i); cal_gain = 16'(gain_m[i]); cal_offset = 16'(offs_m[i]);
      @(negedge clk);
    end
    cal_we = 0;
    // symbology icon: a white cross with a black border line
    for (int k = -2; k <= 2; k++) begin
      int a [3];
      a[0] = (V / 3) * H + (H / 3 + k);
      a[1] = (V / 3 + k) * H + H / 3;
      a[2] = (V / 3 + 3) * H + (H / 3 + k);
      for (int j = 0; j < 3; j++) begin
        logic [1:0] d;
        d = (j == 2) ? 2'd2 : 2'd1;
        pic_addr = PAW'(a[j]); pic_data = d;
        repeat (2) @(negedge clk);
        pic_wr = 1; repeat (5) @(negedge clk);
        pic_wr = 0; repeat (3) @(negedge clk);
        sym_m[a[j]] = d;
      end
    end
    sync_armed = 1;
    video_on = 1;

    mouse(H / 4, V / 4);
    // sharpening filter, checksum at a frame start
    coef_bytes(sharp, p);
    send_cmd(CMD_SET_FILTER, p, 0, 1, 1);
    expect_short(RPL_ACK, CMD_SET_FILTER);
    // bad checksum and unknown command
    coef_bytes(rnd, p);
    send_cmd(CMD_SET_FILTER, p, 1, 0, 0);
    expect_short(RPL_NAK, CMD_SET_FILTER);
    p.delete();
    send_cmd(8'h55, p, 0, 0, 0);
    expect_short(RPL_NAK, 8'h55);
    // random filter, checksum at the start of vertical blanking
    coef_bytes(rnd, p);
    send_cmd(CMD_SET_FILTER, p, 0, 2, 2);
    b_frame = sched_from[sched_from.size() - 1];
    expect_short(RPL_ACK, CMD_SET_FILTER);
    measure(0);
    measure(1);
    last = (b_frame + 2 > frame_idx + 2) ? b_frame + 2 : frame_idx + 2;
    while (frame_idx < last) @(negedge clk);
    @(ev_vblank);
    stop_video = 1;
    wait (video_done);
    repeat (20) @(negedge clk);
    chk("all pixels out", exp_q.size(), 0);
    chk("ready stays high", ready, 1);

    $display("mechanisms: frames=%0d ram_wait=%0d ack=%0d nak=%0d filter_switch=%0d he_rebuild=%0d temp=%0d mouse=%0d",
             m_frames, m_ram_wait, m_ack, m_nak, m_filter_switch, m_he_rebuild, m_temp, m_mouse);
    $display("mechanisms: white=%0d black=%0d clip_low=%0d clip_high=%0d he_above=%0d he_table=%0d nuc=%0d compared=%0d",
             m_white, m_black, m_clip_low, m_clip_high, m_he_above, m_he_table, m_nuc, compared);
    begin
      int m [string];
      m["checked frames"] = m_frames; m["RAM wait"] = m_ram_wait; m["ACK"] = m_ack;
      m["NAK"] = m_nak; m["filter switch"] = m_filter_switch; m["HE rebuild"] = m_he_rebuild;
      m["temperature"] = m_temp; m["mouse"] = m_mouse; m["white"] = m_white;
      m["black"] = m_black; m["clip low"] = m_clip_low; m["clip high"] = m_clip_high;
      m["HE above window"] = m_he_above; m["HE table"] = m_he_table; m["NUC"] = m_nuc;
      foreach (m[k]) begin
        checks++;
        if (m[k] == 0) begin failures++; $display("FAIL mechanism never happened: %s", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

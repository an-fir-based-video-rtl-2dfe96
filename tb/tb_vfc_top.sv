// tb_vfc_top: end-to-end test of the converter at reduced picture sizes.
//
// Two video generators drive the master and slave inputs with embedded-timing
// 4:2:2 video of flat colours (the master carries one luma spike per line for
// the de-noise stage to remove); six memory models stand in for the frame
// memory chips; an I2C master bit-bangs all parameter groups. The output
// stream is decoded from its TRS words and every active pixel is compared
// with the expected composition: the master colour inside the PIP window,
// the slave colour elsewhere (the FIR filters have unit DC gain, so flat
// colours pass unchanged; inside the window luma may differ by the residue
// of the filtered spikes, at most 6). Pictures are only checked once the pipeline has
// settled after a reprogramming step or a buffer underflow.
//
// Phases: A) progressive master, H up-scale 16->20, V down-scale 8->6, output
// frame slower than input (frame drops); B) pan plus H down-scale 12->10, V
// up-scale 8->10, output faster (frame repeats), one coefficient rewritten
// with its own value through I2C; C) master switched to 3:2 film with
// interlaced fields (field drops, weaving). Each mechanism is counted and a
// mechanism that never happened is a failure.
module tb_vfc_top;
  import vfc_pkg::*;
  localparam int XB = 6, YB = 6, AW = XB + YB;
  localparam int MW = 16, MH = 8, MHB = 40;    // master active size, h blanking
  localparam int SW = 24, SH = 12, SHB = 32;   // slave (= output active size)
  localparam pixel_t A = '{y: 10'd700, cb: 10'd300, cr: 10'd800};
  localparam pixel_t B = '{y: 10'd200, cb: 10'd600, cr: 10'd450};

  logic core_clk = 0, sdram_clk = 0, rst_n = 0;
  logic [9:0] yin_m = 10'h040, uvin_m = 10'h200, yin_s = 10'h040, uvin_s = 10'h200;
  logic out_sync = 0;
  logic [9:0] yout, uvout;
  logic scl = 1, sda_i, sda_oe, m_low = 0;
  logic [2:0][1:0] mem_en, mem_we;
  logic [2:0][1:0][AW-1:0] mem_addr;
  pixel_t [2:0][1:0] mem_wdata, mem_rdata;
  logic st_field_dropped, st_frame_woven, st_underflow, st_resync, st_frame_start,
        st_trs_error;
  logic [2:0] st_overflow, st_swap, st_repeat, st_drop;
  assign sda_i = !(m_low || sda_oe);

  vfc_top #(.XB(XB), .YB(YB), .LINE_FIFO(64), .MEM_FIFO(16)) dut (.*);

  for (genvar b = 0; b < 3; b++) begin : g_mem
    for (genvar c = 0; c < 2; c++) begin : g_chip
      mem_model #(.AW(AW)) u_mem (.clk(sdram_clk), .en(mem_en[b][c]), .we(mem_we[b][c]),
        .addr(mem_addr[b][c]), .wdata(mem_wdata[b][c]), .rdata(mem_rdata[b][c]));
    end
  end

  always #5 core_clk = ~core_clk;
  always #2 sdram_clk = ~sdram_clk;

  int checks = 0, failures = 0;
  bit ovf_seen = 0;
  initial begin
    repeat (400000) @(posedge core_clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_drop_field = 0, n_woven = 0, n_underflow = 0, n_resync = 0, n_frames = 0;
  int n_swap = 0, n_repeat = 0, n_fdrop = 0, n_dn = 0, n_coef = 0, n_sync = 0;
  int n_hup = 0, n_hdown = 0, n_vup = 0, n_vdown = 0, n_pan = 0, n_pip = 0, n_film = 0;
  // buffer events are pulses in the memory clock domain
  always @(posedge sdram_clk) if (rst_n) begin
    n_swap   += int'(st_swap[1]);
    n_repeat += int'(st_repeat[1]);
    n_fdrop  += int'(st_drop[1]);
  end
  always @(posedge core_clk) if (rst_n) begin
    n_drop_field += int'(st_field_dropped);
    n_woven      += int'(st_frame_woven);
    n_underflow  += int'(st_underflow);
    n_resync     += int'(st_resync);
    n_frames     += int'(st_frame_start);
    n_coef       += int'(dut.coef_we);
    n_sync       += int'(out_sync);
    // the de-noise stage lowered a luma spike (without it the spike passes as A+8)
    if (dut.u_dn.out_valid && dut.u_dn.out_pix.y > A.y && dut.u_dn.out_pix.y < A.y + 8)
      n_dn++;
    if (st_trs_error) begin failures++; $display("TRS error at an input"); end
    if (st_overflow != 0) begin failures++; ovf_seen <= 1; if (!ovf_seen) $display("%0t buffer overflow %b lf%b st%0d rc%0d n%0d oc%0d f0busy%b wfe%b", $time, st_overflow, dut.lf_ovf, dut.u_hfilt.state, dut.u_hfilt.rc, dut.u_hfilt.n, dut.u_hfilt.out_cnt, dut.u_fb_h.wg_busy, dut.u_fb_h.wf_empty); end
  end

  // ---------------- I2C master ----------------
  localparam int Q = 4;
  task automatic q(); repeat (Q) @(posedge core_clk); endtask
  task automatic i_start(); m_low = 0; scl = 1; q(); m_low = 1; q(); scl = 0; q(); endtask
  task automatic i_stop(); m_low = 1; q(); scl = 1; q(); m_low = 0; q(); q(); endtask
  task automatic i_bit(logic b); m_low = !b; q(); scl = 1; q(); q(); scl = 0; q(); endtask
  task automatic i_byte(logic [7:0] v);
    logic ack;
    for (int i = 7; i >= 0; i--) i_bit(v[i]);
    m_low = 0; q(); scl = 1; q(); ack = !sda_i; q(); scl = 0; q();
    checks++; if (!ack) begin failures++; $display("I2C byte %h not acknowledged", v); end
  endtask
  task automatic write_group(group_e g, logic [103:0] val, int nbytes);
    i_start(); i_byte({7'h2C, 1'b0}); i_byte(8'(g));
    for (int i = nbytes - 1; i >= 0; i--) i_byte(val[8*i +: 8]);
    i_stop();
  endtask

  static_param_t ps;
  pan_param_t    pp;
  zoom_param_t   pz;
  pip_param_t    pi;
  task automatic program_all();
    write_group(G_STATIC, 104'(ps), 13);
    write_group(G_PAN, 104'(pp), 3);
    write_group(G_ZOOM, 104'(pz), 11);
    write_group(G_PIP, 104'(pi), 4);
  endtask
  function automatic logic [19:0] step_of(int in_len, int out_len);
    return 20'((longint'(in_len) << 16) / out_len);
  endfunction

  // ---------------- video generators ----------------
  bit video_on = 0, interlaced = 0;
  task automatic trs4(ref logic [9:0] yy, ref logic [9:0] cc, input logic f, v, h);
    logic [9:0] xyz; xyz = trs_xyz(f, v, h);
    yy = 10'h3FF; cc = 10'h3FF; @(posedge core_clk); #1;
    yy = 0; cc = 0; @(posedge core_clk); #1;
    @(posedge core_clk); #1;
    yy = xyz; cc = xyz; @(posedge core_clk); #1;
  endtask
  task automatic gen_line(ref logic [9:0] yy, ref logic [9:0] cc, input logic f, v,
                          input int w, hb, input pixel_t col, input bit spike);
    int sp; sp = $urandom_range(2, w - 3);
    trs4(yy, cc, f, v, 1);
    yy = 10'h040; cc = 10'h200; repeat (hb) @(posedge core_clk); #1;
    trs4(yy, cc, f, v, 0);
    for (int i = 0; i < w; i++) begin
      yy = v ? 10'h040 : col.y + ((spike && i == sp) ? 10'd8 : 10'd0);
      cc = v ? 10'h200 : (i[0] ? col.cr : col.cb);
      @(posedge core_clk); #1;
    end
  endtask
  // with video off, the generators send vertical blanking lines
  initial begin : master_gen
    forever begin
      while (!video_on) gen_line(yin_m, uvin_m, 0, 1, MW, MHB, A, 0);
      if (!interlaced) begin
        repeat (2) gen_line(yin_m, uvin_m, 0, 1, MW, MHB, A, 0);
        for (int l = 0; l < MH; l++) gen_line(yin_m, uvin_m, 0, 0, MW, MHB, A, 1);
      end else
        for (int f = 0; f < 2; f++) begin
          repeat (2) gen_line(yin_m, uvin_m, f[0], 1, MW, MHB, A, 0);
          for (int l = 0; l < MH / 2; l++) gen_line(yin_m, uvin_m, f[0], 0, MW, MHB, A, 1);
        end
    end
  end
  initial begin : slave_gen
    forever begin
      while (!video_on) gen_line(yin_s, uvin_s, 0, 1, SW, SHB, B, 0);
      repeat (2) gen_line(yin_s, uvin_s, 0, 1, SW, SHB, B, 0);
      for (int l = 0; l < SH; l++) gen_line(yin_s, uvin_s, 0, 0, SW, SHB, B, 0);
    end
  end

  // ---------------- output decoder and checker ----------------
  int settle = 0;               // output frames since the last disturbance
  logic [9:0] hist[3];
  bit active = 0, vblank = 1;
  int ox = 0, oy = -1, pix_checked = 0, frame_err = 0;
  always @(posedge core_clk) if (rst_n) begin
    if (st_underflow || st_resync || out_sync || !video_on) settle = 0;
    // a source whose next picture is waiting for its origin also shows black
    for (int k = 0; k < 2; k++)
      if (dut.u_pip.in_area[k] && dut.u_pip.src_valid[k] && dut.u_pip.src_sof[k] &&
          !dut.u_pip.origin[k]) settle = 0;
    if (st_frame_start) begin
      if (settle >= 3 && oy >= 0) begin
        // a whole frame was checked: credit the configuration it showed
        if (pz.h_out_len > pz.h_crop_len) n_hup++; else n_hdown++;
        if (pz.v_out_len > pz.v_crop_len) n_vup++; else n_vdown++;
        if (pp.h_crop_start != 0) n_pan++;
        if (pi.pip_en) n_pip++;
        if (interlaced) n_film++;
      end
      settle++;
    end
    if (active) begin
      if (ox >= ps.h_active) active = 0;
      else begin
        if (settle >= 3) begin
          bit in_win; pixel_t e;
          in_win = pi.pip_en && ox >= pi.win_x && ox < pi.win_x + pz.h_out_len &&
                   oy >= pi.win_y && oy < pi.win_y + pz.v_out_len;
          e = in_win ? A : B;
          checks++; pix_checked++;
          if ((in_win ? (int'(yout) < int'(e.y) - 6 || int'(yout) > int'(e.y) + 6) : yout != e.y) ||
              uvout != (ox[0] ? e.cr : e.cb)) begin
            failures++;
            if (failures < 100000)
              $display("%0t out (%0d,%0d) y=%0d c=%0d exp y=%0d c=%0d ", $time, ox, oy, yout,
                       uvout, e.y, ox[0] ? e.cr : e.cb);
          end
        end
        ox++;
      end
    end
    if (hist[0] == 10'h3FF && hist[1] == 0 && hist[2] == 0) begin
      // yout is the XYZ word
      if (!yout[6]) begin            // SAV
        if (yout[7]) vblank = 1;
        else begin
          oy = vblank ? 0 : oy + 1;
          vblank = 0; active = 1; ox = 0;
        end
      end
    end
    hist[0] = hist[1]; hist[1] = hist[2]; hist[2] = yout;
  end

  // ---------------- sequence ----------------
  task automatic wait_frames(int n);
    repeat (n) @(posedge core_clk iff st_frame_start);
  endtask
  task automatic pulse_sync();
    @(posedge core_clk); #1 out_sync = 1; @(posedge core_clk); #1 out_sync = 0;
  endtask

  initial begin
    ps = '0; pp = '0; pz = '0; pi = '0;
    ps.in_line_len = 12'(MW); ps.in_pic_h = 12'(MH);
    ps.h_total = 13'(64); ps.h_active = 12'(SW); ps.v_total = 13'(20); ps.v_active = 12'(SH);
    ps.film_mode = MODE_PROG; ps.slave_mode = MODE_PROG; ps.dn_en = 1; ps.dn_thr = 11'd40;
    pz.h_crop_len = 12'(MW); pz.v_crop_len = 12'(MH); pz.h_out_len = 12'd20;
    pz.v_out_len = 12'd6;
    pz.h_step = step_of(MW, 20); pz.v_step = step_of(MH, 6);
    pi.pip_en = 1; pi.win_x = 12'd2; pi.win_y = 12'd3;
    repeat (3) @(posedge core_clk); #1 rst_n = 1;
    program_all();
    pulse_sync();
    video_on = 1;
    // phase A: up/down, output frame 1280 clocks against 640 at the input
    wait_frames(5);
    // restart the output raster in the middle of a picture: both sources
    // are then out of step and must be resynchronised
    repeat (500) @(posedge core_clk);
    pulse_sync();
    wait_frames(6);
    // phase B: pan, H down, V up, output faster than the input. The inputs
    // stop for the change, as geometry must not change inside a picture.
    video_on = 0;
    repeat (3000) @(posedge core_clk);
    pp.h_crop_start = 12'd2; pz.h_crop_len = 12'd12; pz.h_out_len = 12'd10;
    pz.v_out_len = 12'd10; pi.win_y = 12'd1;
    pz.h_step = step_of(12, 10); pz.v_step = step_of(MH, 10);
    ps.h_total = 13'd36; ps.v_total = 13'd14;
    settle = 0;
    program_all();
    // rewrite the horizontal tap 1, phase 0 coefficient with its reset value
    write_group(G_COEF, 104'({1'b0, 7'd1, 8'd0,
                16'(fir_pkg::coef(4, 1, 0, 64, 8, 0.5))}), 4);
    video_on = 1;
    pulse_sync();
    wait_frames(16);
    // phase C: 3:2 film on the master input, fields woven into frames
    ps.film_mode = MODE_FILM32;
    @(posedge core_clk iff (dut.mi_sof));
    interlaced = 1;
    settle = 0;
    write_group(G_STATIC, 104'(ps), 13);
    wait_frames(24);

    $display("frames=%0d checked_pixels=%0d swaps=%0d repeats=%0d drops=%0d field_drops=%0d woven=%0d",
             n_frames, pix_checked, n_swap, n_repeat, n_fdrop, n_drop_field, n_woven);
    $display("underflow=%0d resync=%0d denoise=%0d coef_writes=%0d syncs=%0d", n_underflow,
             n_resync, n_dn, n_coef, n_sync);
    $display("checked frames: hup=%0d hdown=%0d vup=%0d vdown=%0d pan=%0d pip=%0d film=%0d",
             n_hup, n_hdown, n_vup, n_vdown, n_pan, n_pip, n_film);
    begin
      int m[string];
      m["frame swap"] = n_swap; m["frame repeat"] = n_repeat; m["frame drop"] = n_fdrop;
      m["film field drop"] = n_drop_field; m["field weave"] = n_woven;
      m["underflow"] = n_underflow; m["resync"] = n_resync; m["de-noise"] = n_dn;
      m["coefficient write"] = n_coef; m["output sync"] = n_sync;
      m["H up-scale"] = n_hup; m["H down-scale"] = n_hdown; m["V up-scale"] = n_vup;
      m["V down-scale"] = n_vdown; m["pan"] = n_pan; m["PIP"] = n_pip; m["film mode"] = n_film;
      foreach (m[k]) begin
        checks++;
        if (m[k] == 0) begin failures++; $display("mechanism never happened: %s", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

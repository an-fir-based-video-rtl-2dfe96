// tb_vfc_sd2hd: SD to HD up-conversion with the converter at its default
// parameters (no parameter overrides). The I2C port programs a 720x480
// progressive input on a 2200 x 525 raster to be scaled to 1920x1080 on a
// 2200 x 1125 output raster, with de-noise on and picture-in-picture off.
// The vertical filter needs more than one input frame time per picture
// here, so frame buffer 0 drops input pictures and frame buffer 1 repeats.
// Inputs are sampled at the core clock, one word per cycle, and the
// horizontal filter makes at most one sample per cycle, so an input line
// must last at least as many core cycles as the output line has pixels:
// the SD lines are presented with 2200 words per line (the SD word rate
// brought to the core clock with extended horizontal blanking).
//
// The master input is flat colour, so every active output pixel must keep
// that colour exactly (the filters have unit DC gain at every phase). The
// test checks at least two complete output frames once the pipeline has settled, and
// that the output raster carries exactly 1920 x 1080 active pixels per frame.
// Memory and core clocks are in the ratio 100 : 75. Runs about 22 million
// core clock cycles.
module tb_vfc_sd2hd;
  import vfc_pkg::*;
  localparam int W = 720, H = 480, HT = 2200, VT = 525;
  localparam int OW = 1920, OH = 1080, OHT = 2200, OVT = 1125;
  localparam pixel_t A = '{y: 10'd700, cb: 10'd300, cr: 10'd800};
  localparam int AW = 22;

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
  vfc_top dut (.*);

  for (genvar b = 0; b < 3; b++) begin : g_mem
    for (genvar c = 0; c < 2; c++) begin : g_chip
      mem_model #(.AW(AW)) u_mem (.clk(sdram_clk), .en(mem_en[b][c]), .we(mem_we[b][c]),
        .addr(mem_addr[b][c]), .wdata(mem_wdata[b][c]), .rdata(mem_rdata[b][c]));
    end
  end

  // core and memory clocks in the ratio of 75 MHz to 100 MHz
  always #4 core_clk = ~core_clk;
  always #3 sdram_clk = ~sdram_clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (30_000_000) @(posedge core_clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
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
  // ---------------- video generators ----------------
  task automatic trs4(ref logic [9:0] yy, ref logic [9:0] cc, input logic v, h);
    logic [9:0] xyz; xyz = trs_xyz(1'b0, v, h);
    yy = 10'h3FF; cc = 10'h3FF; @(posedge core_clk); #1;
    yy = 0; cc = 0; @(posedge core_clk); #1;
    @(posedge core_clk); #1;
    yy = xyz; cc = xyz; @(posedge core_clk); #1;
  endtask
  task automatic gen_line(ref logic [9:0] yy, ref logic [9:0] cc, input logic v, input int ln,
                          input bit pattern);
    trs4(yy, cc, v, 1);
    yy = 10'h040; cc = 10'h200; repeat (HT - W - 8) @(posedge core_clk); #1;
    trs4(yy, cc, v, 0);
    for (int i = 0; i < W; i++) begin
      if (v) begin yy = 10'h040; cc = 10'h200; end
      else if (pattern) begin yy = A.y; cc = i[0] ? A.cr : A.cb; end
      else begin yy = 10'd500; cc = 10'd512; end
      @(posedge core_clk); #1;
    end
  endtask
  initial begin : master_gen
    #1;
    forever begin
      for (int l = 0; l < VT - H; l++) gen_line(yin_m, uvin_m, 1, 0, 1);
      for (int l = 0; l < H; l++) gen_line(yin_m, uvin_m, 0, l, 1);
    end
  end
  initial begin : slave_gen
    #1;
    forever begin
      for (int l = 0; l < VT - H; l++) gen_line(yin_s, uvin_s, 1, 0, 0);
      for (int l = 0; l < H; l++) gen_line(yin_s, uvin_s, 0, l, 0);
    end
  end

  // ---------------- output decoder and checker ----------------
  int settle = 0, frames_checked = 0, n_frames = 0, n_swap = 0;
  logic [9:0] hist[3];
  bit active = 0, vblank = 1;
  int ox = 0, oy = -1;
  always @(posedge sdram_clk) if (rst_n) n_swap += int'(st_swap[1]);
  always @(posedge core_clk) if (rst_n) begin
    if (st_trs_error) begin failures++; $display("TRS error at an input"); end
    if (st_overflow != 0 && failures < 10) begin failures++; $display("overflow %b", st_overflow); end
    if (st_underflow || st_resync || out_sync) settle = 0;
    if (st_frame_start) begin
      n_frames++;
      if (settle >= 3 && oy == OH - 1) frames_checked++;
      if (settle >= 3) begin checks++; if (oy != OH - 1) begin failures++; $display("frame had %0d lines", oy + 1); end end
      settle++;
    end
    if (active) begin
      if (ox >= OW) begin
        active = 0;
        checks++;
        if (settle >= 3 && yout != 10'h3FF) begin failures++; $display("line longer than %0d", OW); end
      end
      else begin
        if (settle >= 3) begin
          logic [9:0] ey, ec;
          ey = A.y; ec = ox[0] ? A.cr : A.cb;
          checks++;
          if (yout != ey || uvout != ec) begin
            failures++;
            if (failures < 20)
              $display("out (%0d,%0d) y=%0d c=%0d exp y=%0d c=%0d", ox, oy, yout, uvout, ey, ec);
          end
        end
        ox++;
      end
    end
    if (hist[0] == 10'h3FF && hist[1] == 0 && hist[2] == 0 && !yout[6]) begin  // SAV
      if (yout[7]) vblank = 1;
      else begin
        oy = vblank ? 0 : oy + 1;
        vblank = 0; active = 1; ox = 0;
      end
    end
    hist[0] = hist[1]; hist[1] = hist[2]; hist[2] = yout;
  end

  initial begin
    static_param_t ps;
    zoom_param_t   pz;
    repeat (3) @(posedge core_clk); #1 rst_n = 1;
    ps = '{in_line_len: 12'(W), in_pic_h: 12'(H), h_total: 13'(OHT), h_active: 12'(OW),
           v_total: 13'(OVT), v_active: 12'(OH), film_mode: MODE_PROG, cadence_phase: 3'd0,
           slave_mode: MODE_PROG, dn_en: 1'b1, dn_thr: 11'd16, pad: '0};
    pz = '{h_crop_len: 12'(W), v_crop_len: 12'(H), h_out_len: 12'(OW), v_out_len: 12'(OH),
           h_step: 20'((W << 16) / OW), v_step: 20'((H << 16) / OH)};
    write_group(G_STATIC, 104'(ps), 13);
    write_group(G_ZOOM, 104'(pz), 11);
    out_sync = 1; @(posedge core_clk); #1 out_sync = 0;
    settle = 0;
    repeat (9) @(posedge core_clk iff st_frame_start);
    $display("frames=%0d checked_frames=%0d checked_pixels=%0d swaps=%0d", n_frames,
             frames_checked, checks, n_swap);
    checks++;
    if (frames_checked < 2) begin failures++; $display("fewer than two frames checked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

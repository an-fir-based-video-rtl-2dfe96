// tb_vfc_full: the converter at its default parameters, with no parameter
// overrides: 1920x1080 progressive input on a 2200 x 1125 raster, converted
// 1:1 to a 1920x1080 output on the same raster (the reset configuration).
//
// The master input carries a coded test pattern (luma and chroma functions
// of the position); the slave input carries flat video. At 1:1 both filters
// use phase 0, whose kernel is a single unit centre tap, so every output
// pixel must equal the input pixel at the same position: this checks the two
// transpositions through frame buffers 0 and 1, the tiled addressing and the
// 4:2:2 <-> 4:4:4 conversions over whole pictures. Pictures are checked once
// the pipeline has settled (three output frames without an underflow or a
// resynchronisation); at least two whole frames must be checked. Memory
// chips are behavioural models. Runs 8 output frames, some 20 million core
// clock cycles, with the memory clock 4/3 of the core clock (75 and 100 MHz).
module tb_vfc_full;
  import vfc_pkg::*;
  localparam int W = 1920, H = 1080, HT = 2200, VT = 1125;
  localparam int AW = 22;

  logic core_clk = 0, sdram_clk = 0, rst_n = 0;
  logic [9:0] yin_m = 10'h040, uvin_m = 10'h200, yin_s = 10'h040, uvin_s = 10'h200;
  logic out_sync = 0;
  logic [9:0] yout, uvout;
  logic scl = 1, sda_i = 1, sda_oe;
  logic [2:0][1:0] mem_en, mem_we;
  logic [2:0][1:0][AW-1:0] mem_addr;
  pixel_t [2:0][1:0] mem_wdata, mem_rdata;
  logic st_field_dropped, st_frame_woven, st_underflow, st_resync, st_frame_start,
        st_trs_error;
  logic [2:0] st_overflow, st_swap, st_repeat, st_drop;

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

  // test pattern: luma per pixel, one Cb/Cr pair per two pixels
  function automatic logic [9:0] pat_y(int x, int y);
    return 10'(64 + (x * 7 + y * 13) % 876);
  endfunction
  function automatic logic [9:0] pat_c(int x, int y, bit cr);
    return 10'(64 + ((x / 2) * 5 + y * 3 + (cr ? 400 : 0)) % 896);
  endfunction

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
      else if (pattern) begin yy = pat_y(i, ln); cc = pat_c(i, ln, i[0]); end
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
    if (st_underflow || st_resync) settle = 0;
    if (st_frame_start) begin
      n_frames++;
      if (settle >= 3 && oy == H - 1) frames_checked++;
      settle++;
    end
    if (active) begin
      if (ox >= W) active = 0;
      else begin
        if (settle >= 3) begin
          logic [9:0] ey, ec;
          ey = pat_y(ox, oy); ec = pat_c(ox, oy, ox[0]);
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
    repeat (3) @(posedge core_clk); #1 rst_n = 1;
    repeat (8) @(posedge core_clk iff st_frame_start);
    $display("frames=%0d checked_frames=%0d checked_pixels=%0d swaps=%0d", n_frames,
             frames_checked, checks, n_swap);
    checks++;
    if (frames_checked < 2) begin failures++; $display("fewer than two frames checked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// vfc_top: FIR-based video format converter.
//
// Two 4:2:2 video inputs with embedded timing are converted to one output
// raster. The master channel is scaled; the slave channel is stored
// unscaled and serves as the background of picture-in-picture:
//
//   master: input_channel -> denoise -> field_scheduler -> line FIFO
//           -> horizontal fir_scaler -> frame_buffer 0 (rows in, columns out)
//           -> vertical fir_scaler -> frame_buffer 1 (columns in, rows out)
//   slave:  input_channel -> field_scheduler -> frame_buffer 2
//   output: pip_mixer (slave background, master window) -> format_output
//   control: i2c_slave -> param_regfile -> all units; filter coefficients
//
// Frame buffer 0 transposes the horizontally scaled picture so that the
// vertical filter, a second instance of the same 1-D scaler, sees columns
// as lines; frame buffer 1 transposes back. The frame buffers decouple the
// input and output frame rates by repeating or dropping whole pictures, and
// the input scheduling units weave film fields (2:2, 3:2) into frames.
// Each frame buffer drives two external memory chips (ping-pong) through
// single-word ports mem_*[buffer][chip].
//
// The block structure follows the document's functional block diagram.
// Choices of this design: video inputs and output are sampled in the core
// clock domain (core clock = pixel clock); a line FIFO of LINE_FIFO pixels
// in front of the horizontal filter absorbs the difference between the input
// burst and the filter's rate when it enlarges; one reset for both clocks.
// The global synchronisation unit of the document is reduced to the
// picture lock of the PIP mixer and the frame buffers' repeat/drop rules.
//
// Timing: core_clk about 75 MHz, sdram_clk about 100 MHz in the document.
// Throughput of each filter: about max(input, output) samples per line, one
// per core clock.
module vfc_top
  import vfc_pkg::*;
#(
  parameter int  TAPS      = 4,
  parameter int  PHASES    = 64,
  parameter int  XB        = 11,    // pictures up to 2^XB x 2^YB (2048 x 2048)
  parameter int  YB        = 11,
  parameter int  TB        = 3,     // memory tile 2^TB x 2^TB
  parameter int  LINE_FIFO = 2048,
  parameter int  MEM_FIFO  = 64,
  parameter logic [6:0] I2C_ADDR = 7'h2C,
  localparam int AW        = XB + YB
) (
  input  logic               core_clk,
  input  logic               sdram_clk,
  input  logic               rst_n,
  // video
  input  logic [DW-1:0]      yin_m,
  input  logic [DW-1:0]      uvin_m,
  input  logic [DW-1:0]      yin_s,
  input  logic [DW-1:0]      uvin_s,
  input  logic               out_sync,
  output logic [DW-1:0]      yout,
  output logic [DW-1:0]      uvout,
  // I2C
  input  logic               scl,
  input  logic               sda_i,
  output logic               sda_oe,
  // external memories: [frame buffer][chip]
  output logic [2:0][1:0]          mem_en,
  output logic [2:0][1:0]          mem_we,
  output logic [2:0][1:0][AW-1:0]  mem_addr,
  output pixel_t [2:0][1:0]        mem_wdata,
  input  pixel_t [2:0][1:0]        mem_rdata,
  // status: core clock pulses / sticky flags
  output logic               st_field_dropped,
  output logic               st_frame_woven,
  output logic               st_underflow,
  output logic               st_resync,
  output logic               st_frame_start,
  output logic               st_trs_error,
  output logic [2:0]         st_overflow,
  // status: memory clock pulses, per frame buffer
  output logic [2:0]         st_swap,
  output logic [2:0]         st_repeat,
  output logic [2:0]         st_drop
);
  localparam int CW = 10;
  localparam int PB = $clog2(PHASES);
  localparam int TBW = (TAPS > 1) ? $clog2(TAPS) : 1;

  // ---------------- parameter programming ----------------
  logic          i2c_wv, i2c_wf, i2c_rn, i2c_stop;
  logic [7:0]    i2c_wb, i2c_rb;
  static_param_t ps;
  pan_param_t    pp;
  zoom_param_t   pz;
  pip_param_t    pi;
  coef_param_t   pc;
  logic          coef_we;

  i2c_slave #(.DEV_ADDR(I2C_ADDR)) u_i2c (
    .clk(core_clk), .rst_n, .scl, .sda_i, .sda_oe,
    .wr_valid(i2c_wv), .wr_byte(i2c_wb), .wr_first(i2c_wf),
    .rd_byte(i2c_rb), .rd_next(i2c_rn), .start_evt(), .stop_evt(i2c_stop)
  );

  param_regfile u_regs (
    .clk(core_clk), .rst_n, .wr_valid(i2c_wv), .wr_byte(i2c_wb), .wr_first(i2c_wf),
    .rd_next(i2c_rn), .rd_byte(i2c_rb), .stop_evt(i2c_stop),
    .p_static(ps), .p_pan(pp), .p_zoom(pz), .p_pip(pi), .p_coef(pc), .coef_we
  );

  // ---------------- master input ----------------
  logic   mi_v, mi_sol, mi_eol, mi_sof, mi_f, mi_err;
  pixel_t mi_pix;
  input_channel u_in_m (
    .clk(core_clk), .rst_n, .yin(yin_m), .uvin(uvin_m),
    .pix_valid(mi_v), .pix(mi_pix), .sol(mi_sol), .eol(mi_eol), .sof(mi_sof),
    .field(mi_f), .trs_error(mi_err)
  );

  logic   dn_v, dn_sof, dn_f;
  pixel_t dn_pix;
  denoise u_dn (
    .clk(core_clk), .rst_n, .enable(ps.dn_en), .threshold(ps.dn_thr),
    .in_valid(mi_v), .in_pix(mi_pix), .in_sol(mi_sol), .in_eol(mi_eol),
    .in_sof(mi_sof), .in_field(mi_f),
    .out_valid(dn_v), .out_pix(dn_pix), .out_sol(), .out_eol(), .out_sof(dn_sof),
    .out_field(dn_f)
  );

  logic   ms_v, ms_drop, ms_woven;
  pixel_t ms_pix;
  tag_t   ms_tag;
  field_scheduler u_sched_m (
    .clk(core_clk), .rst_n, .mode(ps.film_mode), .cadence_phase(ps.cadence_phase),
    .in_valid(dn_v), .in_pix(dn_pix), .in_sof(dn_sof), .in_field(dn_f),
    .out_valid(ms_v), .out_pix(ms_pix), .out_tag(ms_tag),
    .field_dropped(ms_drop), .frame_woven(ms_woven)
  );

  // line FIFO in front of the horizontal filter (single clock)
  logic                            lf_empty, lf_full, lf_pop, lf_ovf;
  logic [$bits(pixel_t)+TAGW-1:0]  lf_head;
  async_fifo #(.W($bits(pixel_t) + TAGW), .DEPTH(LINE_FIFO)) u_linefifo (
    .wclk(core_clk), .wrst_n(rst_n), .wen(ms_v && !lf_full), .wdata({ms_tag, ms_pix}),
    .wfull(lf_full), .wlevel(),
    .rclk(core_clk), .rrst_n(rst_n), .ren(lf_pop), .rdata(lf_head), .rempty(lf_empty),
    .rlevel()
  );
  always_ff @(posedge core_clk or negedge rst_n)
    if (!rst_n) lf_ovf <= 1'b0;
    else if (ms_v && lf_full) lf_ovf <= 1'b1;

  // ---------------- horizontal filter ----------------
  logic          hs_rdy, hs_v;
  logic [2:0][DW-1:0] hs_data;
  logic [TAGW-1:0]    hs_user;
  assign lf_pop = hs_rdy && !lf_empty;

  fir_scaler #(.DW(DW), .LANES(3), .TAPS(TAPS), .PHASES(PHASES), .CW(CW), .UW(TAGW),
               .LW(12)) u_hfilt (
    .clk(core_clk), .rst_n,
    .line_len(ps.in_line_len), .crop_start(pp.h_crop_start), .crop_len(pz.h_crop_len),
    .out_len(pz.h_out_len), .step(pz.h_step),
    .in_valid(!lf_empty), .in_ready(hs_rdy),
    .in_data(lf_head[$bits(pixel_t)-1:0]), .in_user(lf_head[$bits(pixel_t) +: TAGW]),
    .out_valid(hs_v), .out_ready(1'b1), .out_data(hs_data), .out_user(hs_user),
    .coef_we(coef_we && !pc.vert), .coef_tap(pc.tap[TBW-1:0]),
    .coef_phase(pc.phase[PB-1:0]), .coef_wdata(pc.value[CW-1:0])
  );

  // ---------------- frame buffer 0: transpose for the vertical filter ----------------
  logic   f0_v, f0_rdy, f0_sof, f0_ovf;
  pixel_t f0_pix;
  frame_buffer #(.XB(XB), .YB(YB), .TB(TB), .WDEPTH(MEM_FIFO), .RDEPTH(MEM_FIFO)) u_fb_h (
    .cclk(core_clk), .crst_n(rst_n),
    .in_valid(hs_v), .in_pix(hs_data), .in_tag(hs_user), .overflow(f0_ovf),
    .out_valid(f0_v), .out_ready(f0_rdy), .out_pix(f0_pix), .out_sof(f0_sof),
    .width(pz.h_out_len), .height(ps.in_pic_h), .wr_col(1'b0), .rd_col(1'b1),
    .repeat_en(1'b0),
    .mclk(sdram_clk), .mrst_n(rst_n),
    .mem_en(mem_en[0]), .mem_we(mem_we[0]), .mem_addr(mem_addr[0]),
    .mem_wdata(mem_wdata[0]), .mem_rdata(mem_rdata[0]),
    .ev_swap(st_swap[0]), .ev_repeat(st_repeat[0]), .ev_drop(st_drop[0])
  );

  // ---------------- vertical filter (on columns) ----------------
  logic               vs_v;
  logic [2:0][DW-1:0] vs_data;
  logic [TAGW-1:0]    vs_user;
  tag_t               col_tag;
  assign col_tag = '{sof: f0_sof, weave: 1'b0, parity: 1'b0, commit: 1'b1};

  fir_scaler #(.DW(DW), .LANES(3), .TAPS(TAPS), .PHASES(PHASES), .CW(CW), .UW(TAGW),
               .LW(12)) u_vfilt (
    .clk(core_clk), .rst_n,
    .line_len(ps.in_pic_h), .crop_start(pp.v_crop_start), .crop_len(pz.v_crop_len),
    .out_len(pz.v_out_len), .step(pz.v_step),
    .in_valid(f0_v), .in_ready(f0_rdy), .in_data(f0_pix),
    .in_user(f0_sof ? col_tag : '0),
    .out_valid(vs_v), .out_ready(1'b1), .out_data(vs_data), .out_user(vs_user),
    .coef_we(coef_we && pc.vert), .coef_tap(pc.tap[TBW-1:0]),
    .coef_phase(pc.phase[PB-1:0]), .coef_wdata(pc.value[CW-1:0])
  );

  // ---------------- frame buffer 1: transpose back, rate conversion ----------------
  logic   f1_v, f1_sof, f1_ovf;
  pixel_t f1_pix;
  logic [1:0] src_ready;
  frame_buffer #(.XB(XB), .YB(YB), .TB(TB), .WDEPTH(MEM_FIFO), .RDEPTH(MEM_FIFO)) u_fb_v (
    .cclk(core_clk), .crst_n(rst_n),
    .in_valid(vs_v), .in_pix(vs_data), .in_tag(vs_user), .overflow(f1_ovf),
    .out_valid(f1_v), .out_ready(src_ready[1]), .out_pix(f1_pix), .out_sof(f1_sof),
    .width(pz.h_out_len), .height(pz.v_out_len), .wr_col(1'b1), .rd_col(1'b0),
    .repeat_en(1'b1),
    .mclk(sdram_clk), .mrst_n(rst_n),
    .mem_en(mem_en[1]), .mem_we(mem_we[1]), .mem_addr(mem_addr[1]),
    .mem_wdata(mem_wdata[1]), .mem_rdata(mem_rdata[1]),
    .ev_swap(st_swap[1]), .ev_repeat(st_repeat[1]), .ev_drop(st_drop[1])
  );

  // ---------------- slave channel ----------------
  logic   si_v, si_sof, si_f, si_err;
  pixel_t si_pix;
  input_channel u_in_s (
    .clk(core_clk), .rst_n, .yin(yin_s), .uvin(uvin_s),
    .pix_valid(si_v), .pix(si_pix), .sol(), .eol(), .sof(si_sof),
    .field(si_f), .trs_error(si_err)
  );

  logic   ss_v;
  pixel_t ss_pix;
  tag_t   ss_tag;
  field_scheduler u_sched_s (
    .clk(core_clk), .rst_n, .mode(ps.slave_mode), .cadence_phase(3'd0),
    .in_valid(si_v), .in_pix(si_pix), .in_sof(si_sof), .in_field(si_f),
    .out_valid(ss_v), .out_pix(ss_pix), .out_tag(ss_tag),
    .field_dropped(), .frame_woven()
  );

  logic   f2_v, f2_sof, f2_ovf;
  pixel_t f2_pix;
  frame_buffer #(.XB(XB), .YB(YB), .TB(TB), .WDEPTH(MEM_FIFO), .RDEPTH(MEM_FIFO)) u_fb_s (
    .cclk(core_clk), .crst_n(rst_n),
    .in_valid(ss_v), .in_pix(ss_pix), .in_tag(ss_tag), .overflow(f2_ovf),
    .out_valid(f2_v), .out_ready(src_ready[0]), .out_pix(f2_pix), .out_sof(f2_sof),
    .width(ps.h_active), .height(ps.v_active), .wr_col(1'b0), .rd_col(1'b0),
    .repeat_en(1'b1),
    .mclk(sdram_clk), .mrst_n(rst_n),
    .mem_en(mem_en[2]), .mem_we(mem_we[2]), .mem_addr(mem_addr[2]),
    .mem_wdata(mem_wdata[2]), .mem_rdata(mem_rdata[2]),
    .ev_swap(st_swap[2]), .ev_repeat(st_repeat[2]), .ev_drop(st_drop[2])
  );

  // ---------------- output ----------------
  logic          o_req, o_blank;
  logic [XB:0]   o_x;
  logic [YB:0]   o_y;
  pixel_t        o_pix;

  pip_mixer #(.XB(XB), .YB(YB)) u_pip (
    .clk(core_clk), .rst_n, .pip_en(pi.pip_en),
    .out_w(ps.h_active), .out_h(ps.v_active),
    .win_x(pi.win_x), .win_y(pi.win_y), .win_w(pz.h_out_len), .win_h(pz.v_out_len),
    .req(o_req), .x(o_x), .y(o_y), .blank(o_blank),
    .src_valid({f1_v, f2_v}), .src_pix({f1_pix, f2_pix}), .src_sof({f1_sof, f2_sof}),
    .src_ready, .pix(o_pix), .underflow(st_underflow), .resync(st_resync)
  );

  format_output #(.XB(XB), .YB(YB)) u_fmt (
    .clk(core_clk), .rst_n,
    .h_total(ps.h_total), .h_active(ps.h_active), .v_total(ps.v_total),
    .v_active(ps.v_active), .out_sync,
    .req(o_req), .x(o_x), .y(o_y), .blank(o_blank), .pix(o_pix),
    .yout, .uvout, .frame_start(st_frame_start)
  );

  assign st_field_dropped = ms_drop;
  assign st_frame_woven   = ms_woven;
  assign st_trs_error     = mi_err || si_err;
  assign st_overflow      = {f2_ovf, f1_ovf, f0_ovf || lf_ovf};
endmodule

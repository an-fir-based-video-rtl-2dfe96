// param_regfile: run-time parameter register file behind the I2C port.
//
// Parameters live in shift registers, one per functional group, so that no
// per-register address decoding is needed: StaticParam (system
// configuration), PanningParam, ZoomingParam, PIPParam, and CoefParam (one
// filter-coefficient write). The first byte of an I2C write selects a group
// (the switch matrix setting); every further byte is shifted into that
// group's low end, the group moving up by one byte, so writing a group's
// whole length, most significant byte first, replaces it. A read returns the
// selected group's bytes from the top, each byte re-entering at the low end,
// so reading the whole group leaves it unchanged. At the STOP that ends a
// write into CoefParam, `coef_we` pulses once to store that coefficient.
// The shift registers are not the parameters the core sees: every group has
// a shadow copy, loaded from its shift register at each STOP, so the core
// never sees a half-shifted group and a whole transfer takes effect at once.
//
// The shift-register file, its split into StaticParam, PanningParam,
// ZoomingParam and PIPParam and the switch matrix follow the document. The
// field layout (vfc_pkg), the group select byte, the CoefParam group and the
// reset values are this design's choices. Reset values describe a
// 1920x1080 progressive 1:1 conversion with a 2200 x 1125 output raster.
//
// Timing: a received byte enters its shift register in the cycle after
// wr_valid; the group outputs change in the cycle after stop_evt.
module param_regfile
  import vfc_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_valid,
  input  logic [7:0]    wr_byte,
  input  logic          wr_first,
  input  logic          rd_next,
  output logic [7:0]    rd_byte,
  input  logic          stop_evt,
  output static_param_t p_static,
  output pan_param_t    p_pan,
  output zoom_param_t   p_zoom,
  output pip_param_t    p_pip,
  output coef_param_t   p_coef,
  output logic          coef_we
);
  localparam static_param_t STATIC0 = '{
    in_line_len: 12'd1920, in_pic_h: 12'd1080, h_total: 13'd2200, h_active: 12'd1920,
    v_total: 13'd1125, v_active: 12'd1080, film_mode: MODE_PROG, cadence_phase: 3'd0,
    slave_mode: MODE_PROG, dn_en: 1'b0, dn_thr: 11'd16, pad: '0};
  localparam pan_param_t  PAN0  = '{h_crop_start: '0, v_crop_start: '0};
  localparam zoom_param_t ZOOM0 = '{h_crop_len: 12'd1920, v_crop_len: 12'd1080,
    h_out_len: 12'd1920, v_out_len: 12'd1080, h_step: 20'h10000, v_step: 20'h10000};
  localparam pip_param_t  PIP0  = '{pip_en: 1'b0, win_x: '0, win_y: '0, pad: '0};

  static_param_t sh_static;
  pan_param_t    sh_pan;
  zoom_param_t   sh_zoom;
  pip_param_t    sh_pip;
  coef_param_t   sh_coef;
  group_e sel;
  logic   coef_written;

  // one byte-wide shift step of a group: in at the bottom, out at the top
  `define VFC_SHIFT(reg_, in_) reg_ <= {reg_[$bits(reg_)-9:0], in_}

  always_comb begin
    unique case (sel)
      G_STATIC: rd_byte = sh_static[$bits(sh_static)-1 -: 8];
      G_PAN:    rd_byte = sh_pan[$bits(sh_pan)-1 -: 8];
      G_ZOOM:   rd_byte = sh_zoom[$bits(sh_zoom)-1 -: 8];
      G_PIP:    rd_byte = sh_pip[$bits(sh_pip)-1 -: 8];
      G_COEF:   rd_byte = sh_coef[$bits(sh_coef)-1 -: 8];
      default:  rd_byte = 8'h00;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel <= G_STATIC; coef_written <= 1'b0; coef_we <= 1'b0;
      p_static <= STATIC0; p_pan <= PAN0; p_zoom <= ZOOM0; p_pip <= PIP0; p_coef <= '0;
      sh_static <= STATIC0; sh_pan <= PAN0; sh_zoom <= ZOOM0; sh_pip <= PIP0; sh_coef <= '0;
    end else begin
      coef_we <= 1'b0;
      if (stop_evt) begin
        coef_we <= coef_written; coef_written <= 1'b0;
        p_static <= sh_static; p_pan <= sh_pan; p_zoom <= sh_zoom; p_pip <= sh_pip;
        p_coef <= sh_coef;
      end
      if (wr_valid && wr_first) begin
        sel <= group_e'(wr_byte[2:0]);
      end else if (wr_valid || rd_next) begin
        unique case (sel)
          G_STATIC: `VFC_SHIFT(sh_static, (wr_valid ? wr_byte : rd_byte));
          G_PAN:    `VFC_SHIFT(sh_pan,    (wr_valid ? wr_byte : rd_byte));
          G_ZOOM:   `VFC_SHIFT(sh_zoom,   (wr_valid ? wr_byte : rd_byte));
          G_PIP:    `VFC_SHIFT(sh_pip,    (wr_valid ? wr_byte : rd_byte));
          G_COEF: begin
            `VFC_SHIFT(sh_coef, (wr_valid ? wr_byte : rd_byte));
            if (wr_valid) coef_written <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end
  `undef VFC_SHIFT
endmodule

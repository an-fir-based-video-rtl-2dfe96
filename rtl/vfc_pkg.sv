// vfc_pkg: types and constants shared by the video format converter.
// Pixels travel through the core as 4:4:4 YCbCr triples of DW-bit samples
// (the 4:2:2 inputs are aligned to 4:4:4 at the input and folded back at the
// output). A small tag rides with the first pixel of every picture so that
// the frame-buffer writers learn where a field starts, whether it is woven
// with its partner field, and whether the picture is complete at its end.
package vfc_pkg;
  localparam int DW = 10;                 // sample width (8/10-bit video, 10 used)
  localparam logic [DW-1:0] Y_BLANK = 10'h040;
  localparam logic [DW-1:0] C_BLANK = 10'h200;

  typedef struct packed {
    logic [DW-1:0] y;
    logic [DW-1:0] cb;
    logic [DW-1:0] cr;
  } pixel_t;

  // Picture tag, valid on the first pixel of a field/picture (sof).
  typedef struct packed {
    logic sof;      // first pixel of a field or picture
    logic weave;    // field is one half of a woven frame (row stride 2)
    logic parity;   // field parity: row offset when woven
    logic commit;   // picture is complete when this field has been written
  } tag_t;

  localparam int TAGW = $bits(tag_t);

  // Film / scan modes of the input scheduling unit.
  typedef enum logic [1:0] {
    MODE_FIELD  = 2'd0,  // every field is an independent picture
    MODE_PROG   = 2'd1,  // progressive input: every frame is a picture
    MODE_FILM22 = 2'd2,  // 2:2 pull-down: field pairs are woven
    MODE_FILM32 = 2'd3   // 3:2 pull-down: 5-field cadence, one repeat dropped
  } film_mode_e;

  // ---- parameter register groups (sizes in whole bytes) ----
  typedef struct packed {              // system configuration, 13 bytes
    logic [11:0] in_line_len;          // master active pixels per line
    logic [11:0] in_pic_h;             // master lines per picture (frame if woven)
    logic [12:0] h_total;              // output words per line
    logic [11:0] h_active;             // output active pixels per line
    logic [12:0] v_total;              // output lines per frame
    logic [11:0] v_active;             // output active lines
    film_mode_e  film_mode;            // master scheduling mode
    logic [2:0]  cadence_phase;        // master film cadence position
    film_mode_e  slave_mode;           // slave scheduling mode
    logic        dn_en;                // de-noise enable
    logic [10:0] dn_thr;               // de-noise edge threshold
    logic [10:0] pad;
  } static_param_t;

  typedef struct packed {              // pan / tilt, 3 bytes
    logic [11:0] h_crop_start;
    logic [11:0] v_crop_start;
  } pan_param_t;

  typedef struct packed {              // zoom, 11 bytes
    logic [11:0] h_crop_len;
    logic [11:0] v_crop_len;
    logic [11:0] h_out_len;
    logic [11:0] v_out_len;
    logic [19:0] h_step;               // h_crop_len / h_out_len, 4.16 fixed point
    logic [19:0] v_step;
  } zoom_param_t;

  typedef struct packed {              // picture in picture, 4 bytes
    logic        pip_en;
    logic [11:0] win_x;
    logic [11:0] win_y;
    logic [6:0]  pad;
  } pip_param_t;

  typedef struct packed {              // one filter coefficient, 4 bytes
    logic        vert;                 // 0 = horizontal filter, 1 = vertical
    logic [6:0]  tap;
    logic [7:0]  phase;
    logic [15:0] value;                // signed, low bits used
  } coef_param_t;

  localparam int NGROUPS = 5;
  typedef enum logic [2:0] {
    G_STATIC = 3'd0, G_PAN = 3'd1, G_ZOOM = 3'd2, G_PIP = 3'd3, G_COEF = 3'd4
  } group_e;

  // TRS protection bits of the XYZ word (SMPTE 125M / ITU-R BT.656).
  function automatic logic [DW-1:0] trs_xyz(input logic f, input logic v, input logic h);
    return {1'b1, f, v, h, v ^ h, f ^ h, f ^ v, f ^ v ^ h, 2'b00};
  endfunction
endpackage

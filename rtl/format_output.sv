// format_output: output raster generator and formatter.
//
// It runs a progressive raster of h_total x v_total words per frame with
// h_active x v_active active pixels and embeds the timing as TRS words on
// both output buses (SMPTE 274M style): each line begins with EAV
// (3FF 000 000 XYZ, H=1), carries blanking (Y 040, C 200), then SAV
// (H=0) and the active pixels. Lines v_active .. v_total-1 are vertical
// blanking (V=1). F is always 0 (progressive output). During active pixels
// it requests the pixel of position (x, y) from the PIP mixer and folds the
// 4:4:4 pixels to 4:2:2: the C bus carries Cb of the even pixel, then Cr of
// that same even pixel (co-sited chroma). `out_sync` restarts the raster at
// the first word of frame line 0 (external frame lock).
//
// The document says the output unit formats the stream and inserts TRS at
// the positions the SMPTE standards give, and shows an Out_Sync input; the
// raster layout, progressive-only output and chroma siting are this
// design's choices. h_total - h_active must be at least 8.
//
// Timing: yout/uvout are registered, one cycle after the request.
module format_output
  import vfc_pkg::*;
#(
  parameter int XB = 11,
  parameter int YB = 11
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [XB+1:0] h_total,
  input  logic [XB:0]   h_active,
  input  logic [YB+1:0] v_total,
  input  logic [YB:0]   v_active,
  input  logic          out_sync,
  output logic          req,
  output logic [XB:0]   x,
  output logic [YB:0]   y,
  output logic          blank,
  input  pixel_t        pix,
  output logic [DW-1:0] yout,
  output logic [DW-1:0] uvout,
  output logic          frame_start   // pulse with the first word of a frame
);
  logic [XB+1:0] hc;
  logic [YB+1:0] vc;
  logic [XB+1:0] hb;
  logic          vblank;
  logic [DW-1:0] cr_even;

  assign hb     = h_total - {1'b0, h_active};
  assign vblank = (vc >= {1'b0, v_active});
  assign req    = (hc >= hb) && !vblank;
  assign x      = (XB+1)'(hc - hb);
  assign y      = vc[YB:0];
  assign blank  = !req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hc <= '0; vc <= '0; yout <= Y_BLANK; uvout <= C_BLANK; cr_even <= C_BLANK;
      frame_start <= 1'b0;
    end else begin
      frame_start <= (hc == '0) && (vc == '0) && !out_sync;
      if (out_sync) begin
        hc <= '0; vc <= '0;
      end else if (hc + 1'b1 == h_total) begin
        hc <= '0;
        vc <= (vc + 1'b1 == v_total) ? '0 : vc + 1'b1;
      end else begin
        hc <= hc + 1'b1;
      end
      // output word of position (hc, vc)
      if (hc == '0 || hc == hb - 4) begin
        yout <= '1; uvout <= '1;
      end else if (hc == 1 || hc == 2 || hc == hb - 3 || hc == hb - 2) begin
        yout <= '0; uvout <= '0;
      end else if (hc == 3) begin
        yout <= trs_xyz(1'b0, vblank, 1'b1); uvout <= trs_xyz(1'b0, vblank, 1'b1);
      end else if (hc == hb - 1) begin
        yout <= trs_xyz(1'b0, vblank, 1'b0); uvout <= trs_xyz(1'b0, vblank, 1'b0);
      end else if (req) begin
        yout <= pix.y;
        if (!x[0]) begin uvout <= pix.cb; cr_even <= pix.cr; end
        else uvout <= cr_even;
      end else begin
        yout <= Y_BLANK; uvout <= C_BLANK;
      end
    end
  end
endmodule

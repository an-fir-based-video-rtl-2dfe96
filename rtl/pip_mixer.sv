// pip_mixer: picture-in-picture composition of the output raster.
//
// For every active output position (x, y) requested by the output formatter
// it returns one pixel. Two sources are read from their frame buffers'
// read FIFOs: source 0, the slave channel, fills the whole raster as
// background; source 1, the scaled master picture, covers the window of
// size win_w x win_h at (win_x, win_y). A source pixel is taken from its
// FIFO only when the position lies in that source's area, so each FIFO is
// drained in raster order. With `pip_en` low the slave is not read and the
// area outside the master window is black.
//
// Picture lock: a source's first pixel of a picture (sof) may only be
// taken at the area's origin. A sof seen elsewhere is left waiting; a
// non-sof pixel met at the origin marks the source out of step, and while it
// is out of step its FIFO is flushed up to the next sof during blanking. An
// empty FIFO in the area yields black and an `underflow` pulse.
//
// The document names the PIP function, with the slave channel as
// background, and says the two channels are synchronised before it; the
// window parameters, the lock rule and the black fill are this design's.
//
// Timing: combinational from (req, x, y) and the FIFO heads to `pix` and the
// pops, so it sits in the same cycle as the formatter's request.
module pip_mixer
  import vfc_pkg::*;
#(
  parameter int XB = 11,
  parameter int YB = 11
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pip_en,
  input  logic [XB:0]   out_w,
  input  logic [YB:0]   out_h,
  input  logic [XB:0]   win_x,
  input  logic [YB:0]   win_y,
  input  logic [XB:0]   win_w,
  input  logic [YB:0]   win_h,
  input  logic          req,       // active output position this cycle
  input  logic [XB:0]   x,
  input  logic [YB:0]   y,
  input  logic          blank,     // in blanking: out-of-step FIFOs may be flushed
  input  logic [1:0]    src_valid, // 0 = slave, 1 = master
  input  pixel_t [1:0]  src_pix,
  input  logic [1:0]    src_sof,
  output logic [1:0]    src_ready,
  output pixel_t        pix,
  output logic          underflow,
  output logic          resync     // pulse: a source was flushed to regain lock
);
  localparam pixel_t BLACK = '{y: Y_BLANK, cb: C_BLANK, cr: C_BLANK};

  logic [1:0] in_area, origin, oos;
  logic [XB:0] ax [2];
  logic [YB:0] ay [2];
  logic [XB:0] aw [2];
  logic [YB:0] ah [2];

  always_comb begin
    ax[0] = '0; ay[0] = '0; aw[0] = out_w; ah[0] = out_h;
    ax[1] = pip_en ? win_x : '0; ay[1] = pip_en ? win_y : '0; aw[1] = win_w; ah[1] = win_h;
    for (int s = 0; s < 2; s++) begin
      in_area[s] = req && (x >= ax[s]) && (x < ax[s] + aw[s]) && (y >= ay[s]) && (y < ay[s] + ah[s]);
      origin[s] = (x == ax[s]) && (y == ay[s]);
    end
    if (!pip_en) in_area[0] = 1'b0;
  end

  always_comb begin
    pix = BLACK; underflow = 1'b0; resync = 1'b0;
    for (int s = 0; s < 2; s++) begin
      src_ready[s] = 1'b0;
      if (in_area[s]) begin
        if (!src_valid[s]) underflow = 1'b1;
        else if (src_sof[s] == origin[s]) begin
          src_ready[s] = 1'b1; pix = src_pix[s];
        end else if (origin[s]) begin
          src_ready[s] = 1'b1;          // out of step: drop it, show black
        end
      end else if (blank && oos[s] && src_valid[s] && !src_sof[s]) begin
        src_ready[s] = 1'b1; resync = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) oos <= 2'b11;
    else
      for (int s = 0; s < 2; s++) begin
        if (in_area[s] && origin[s] && src_valid[s]) oos[s] <= !src_sof[s];
      end
  end
endmodule

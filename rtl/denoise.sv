// denoise: edge-adaptive de-noise filter of the master input.
//
// An edge-extraction high-pass filter measures the luma curvature at each
// pixel, e = |2*c - p - n| over its left (p), own (c) and right (n)
// neighbours. Where e is at most `threshold` the pixel lies in a flat area
// and all three components are replaced by the low-pass value
// (p + 2c + n + 2) >> 2; where e is larger the pixel is on an edge and
// passes unchanged, so edges are not blurred. At the ends of a line the
// missing neighbour is replaced by the pixel itself.
//
// The document gives only the structure (a high-pass edge extractor steering
// a low-pass de-noise filter); the 3-tap kernels, the hard threshold and
// deciding on luma for all components are this design's choices.
//
// Timing: a pixel leaves when its right neighbour arrives, or one cycle
// after its `eol` input for the last pixel of a line, so the next line may
// start no earlier than two cycles after `eol`. Flags travel with their pixel.
module denoise
  import vfc_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  input  logic [DW:0]   threshold,
  input  logic          in_valid,
  input  pixel_t        in_pix,
  input  logic          in_sol,
  input  logic          in_eol,
  input  logic          in_sof,
  input  logic          in_field,
  output logic          out_valid,
  output pixel_t        out_pix,
  output logic          out_sol,
  output logic          out_eol,
  output logic          out_sof,
  output logic          out_field
);
  pixel_t p, c;
  logic   c_valid, c_sol, c_eol, c_sof, c_field, flush;

  function automatic logic [DW-1:0] lp(input logic [DW-1:0] a, b, n);
    logic [DW+1:0] s;
    s = {2'b00, a} + {1'b0, b, 1'b0} + {2'b00, n} + (DW+2)'(2);
    return s[DW+1:2];
  endfunction

  function automatic pixel_t filt(input pixel_t pp, cc, nn, input logic en,
                                  input logic [DW:0] thr);
    logic signed [DW+2:0] hp;
    logic        [DW+2:0] mag;
    pixel_t r;
    hp  = $signed({2'b00, cc.y, 1'b0}) - $signed({3'b000, pp.y}) - $signed({3'b000, nn.y});
    mag = hp[DW+2] ? (DW+3)'(-hp) : (DW+3)'(hp);
    if (en && mag <= {2'b00, thr}) begin
      r.y  = lp(pp.y,  cc.y,  nn.y);
      r.cb = lp(pp.cb, cc.cb, nn.cb);
      r.cr = lp(pp.cr, cc.cr, nn.cr);
    end else begin
      r = cc;
    end
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p <= '0; c <= '0; c_valid <= 1'b0; flush <= 1'b0;
      c_sol <= 1'b0; c_eol <= 1'b0; c_sof <= 1'b0; c_field <= 1'b0;
      out_valid <= 1'b0; out_pix <= '0;
      out_sol <= 1'b0; out_eol <= 1'b0; out_sof <= 1'b0; out_field <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (flush) begin
        out_valid <= 1'b1; out_pix <= filt(p, c, c, enable, threshold);
        out_sol <= c_sol; out_eol <= 1'b1; out_sof <= c_sof; out_field <= c_field;
        c_valid <= 1'b0; flush <= 1'b0;
      end else if (in_valid) begin
        if (c_valid && !in_sol) begin
          out_valid <= 1'b1; out_pix <= filt(p, c, in_pix, enable, threshold);
          out_sol <= c_sol; out_eol <= c_eol; out_sof <= c_sof; out_field <= c_field;
        end
        p <= in_sol ? in_pix : c;
        c <= in_pix; c_valid <= 1'b1;
        c_sol <= in_sol; c_eol <= in_eol; c_sof <= in_sof; c_field <= in_field;
        flush <= in_eol;
      end
    end
  end
endmodule

// input_channel: one input channel (master or slave) of the converter.
//
// It takes the two 4:2:2 buses of a digital video interface, Y and the
// multiplexed Cb/Cr bus, with timing embedded as TRS words. A trs_decoder
// finds SAV/EAV; the words between an SAV with V=0 and the next EAV are
// active pixels. Chroma arrives as Cb on even and Cr on odd pixels; each
// pixel pair is aligned to two 4:4:4 pixels that share the pair's Cb and Cr
// (sample repetition), so the rest of the core filters Y, Cb and Cr alike.
// The first pixel of a line is flagged `sol`, the last `eol`, and the first
// pixel of the first active line after vertical blanking `sof`, together with
// the field bit F of that line.
//
// The document specifies two 8/10-bit YCbCr 4:2:2 channels and TRS
// extraction per channel; the 4:4:4 alignment and the flag set are this
// design's choices. Lines must have an even number of active pixels.
//
// Timing: the pixel of an even/odd pair is emitted one and two cycles after
// the odd input word, so the output lags the input by two cycles. At most one
// pixel leaves per cycle; there is no back-pressure (live video).
module input_channel
  import vfc_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] yin,
  input  logic [DW-1:0] uvin,
  output logic          pix_valid,
  output pixel_t        pix,
  output logic          sol,
  output logic          eol,
  output logic          sof,
  output logic          field,      // F bit of the line
  output logic          trs_error   // pulses on an XYZ word with bad protection bits
);
  logic trs, xyz_ok, tf, tv, th, f, v, h, in_trs;

  trs_decoder #(.DW(DW)) u_trs (
    .clk, .rst_n, .y(yin), .trs, .xyz_ok, .trs_f(tf), .trs_v(tv), .trs_h(th),
    .f, .v, .h, .in_trs
  );

  logic          active;     // between SAV (V=0) and EAV
  logic          odd;        // next active word is the odd one of a pair
  logic [DW-1:0] y0, cb0;    // first half of the current pair
  logic          first_line; // no active pixel emitted since vertical blanking
  logic          line_start; // next emitted pixel starts a line
  logic          hold_valid; // second pixel of a pair waits for output
  pixel_t        hold_pix;
  logic          hold_sol;

  wire take = active && !in_trs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; odd <= 1'b0; y0 <= '0; cb0 <= '0;
      first_line <= 1'b1; line_start <= 1'b0;
      hold_valid <= 1'b0; hold_pix <= '0; hold_sol <= 1'b0;
      pix_valid <= 1'b0; pix <= '0; sol <= 1'b0; eol <= 1'b0; sof <= 1'b0;
      field <= 1'b0; trs_error <= 1'b0;
    end else begin
      pix_valid <= 1'b0; sol <= 1'b0; eol <= 1'b0; sof <= 1'b0;
      trs_error <= trs && !xyz_ok;
      if (trs && xyz_ok) begin
        if (tv) first_line <= 1'b1;
        if (!th && !tv) begin      // SAV of an active line
          active <= 1'b1; odd <= 1'b0; line_start <= 1'b1; field <= tf;
        end else begin
          active <= 1'b0;
        end
      end
      // second pixel of the previous pair
      if (hold_valid) begin
        pix_valid <= 1'b1; pix <= hold_pix; sol <= hold_sol;
        eol <= !take;              // the next word is not active: line ended
        hold_valid <= 1'b0;
      end
      if (take) begin
        if (!odd) begin
          y0 <= yin; cb0 <= uvin; odd <= 1'b1;
        end else begin
          odd <= 1'b0;
          pix_valid <= 1'b1;
          pix <= '{y: y0, cb: cb0, cr: uvin};
          sol <= line_start; sof <= line_start && first_line;
          if (line_start && first_line) first_line <= 1'b0;
          line_start <= 1'b0;
          hold_valid <= 1'b1;
          hold_pix <= '{y: yin, cb: cb0, cr: uvin};
          hold_sol <= 1'b0;
        end
      end
    end
  end
endmodule

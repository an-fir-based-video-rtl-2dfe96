// field_scheduler: scheduling unit of an input channel.
//
// It decides the "life cycle" of every incoming field in the frame buffer:
// whether the field is written at all, whether it is woven with its partner
// field into one progressive frame (film material), and whether the picture
// is complete, and may be handed to the reader, once the field is written.
// The decision is taken at the first pixel of each field (`in_sof`) and sent
// to the frame buffer as a tag on that pixel; the pixels of a dropped field
// are not passed on.
//
//   MODE_FIELD   every field is its own picture (intra-field processing)
//   MODE_PROG    every frame is its own picture
//   MODE_FILM22  2:2 pull-down: fields 0,1 of each pair are woven
//   MODE_FILM32  3:2 pull-down, 5-field cadence: fields 0,1 form frame A,
//                field 2 repeats field 0 and is dropped, fields 3,4 form B
//
// The cadence position of a field is (field count + `cadence_phase`) mod 5
// (mod 2 for 2:2). The document says film fields are merged by a scheduling
// unit that tells the SDRAM side when to hold or discard fields; it does not
// describe cadence detection, so the phase is a programmed parameter here,
// and the mode set and tag encoding are this design's.
//
// Timing: one register stage; out_* follow in_* by one cycle.
module field_scheduler
  import vfc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  film_mode_e mode,
  input  logic [2:0] cadence_phase,
  input  logic       in_valid,
  input  pixel_t     in_pix,
  input  logic       in_sof,
  input  logic       in_field,
  output logic       out_valid,
  output pixel_t     out_pix,
  output tag_t       out_tag,
  output logic       field_dropped,   // pulse: a field was discarded
  output logic       frame_woven      // pulse: a woven frame was completed
);
  logic [2:0] cnt;        // fields seen, modulo the cadence length
  logic       writing;    // current field is being written
  logic [2:0] pos;
  logic       wr_now, weave_now, commit_now;

  always_comb begin
    logic [3:0] s;
    s = {1'b0, cnt} + {1'b0, cadence_phase};
    if (mode == MODE_FILM32) pos = (s >= 4'd5) ? 3'(s - 4'd5) : s[2:0];
    else                     pos = {2'b00, s[0]};
    wr_now = 1'b1; weave_now = 1'b0; commit_now = 1'b1;
    unique case (mode)
      MODE_FIELD, MODE_PROG: ;
      MODE_FILM22: begin weave_now = 1'b1; commit_now = (pos == 3'd1); end
      MODE_FILM32: begin
        weave_now  = 1'b1;
        wr_now     = (pos != 3'd2);
        commit_now = (pos == 3'd1) || (pos == 3'd4);
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; writing <= 1'b0;
      out_valid <= 1'b0; out_pix <= '0; out_tag <= '0;
      field_dropped <= 1'b0; frame_woven <= 1'b0;
    end else begin
      out_valid <= 1'b0; out_tag <= '0;
      field_dropped <= 1'b0; frame_woven <= 1'b0;
      if (in_valid && in_sof) begin
        writing <= wr_now;
        cnt <= (mode == MODE_FILM32) ? ((cnt >= 3'd4) ? 3'd0 : cnt + 3'd1)
                                     : {2'b00, ~cnt[0]};
        field_dropped <= !wr_now;
        frame_woven   <= wr_now && weave_now && commit_now;
        if (wr_now) begin
          out_valid <= 1'b1; out_pix <= in_pix;
          out_tag <= '{sof: 1'b1, weave: weave_now, parity: in_field, commit: commit_now};
        end
      end else if (in_valid && writing) begin
        out_valid <= 1'b1; out_pix <= in_pix;
      end
    end
  end
endmodule

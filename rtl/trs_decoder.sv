// trs_decoder: finds the timing reference signals embedded in a video word
// stream and reports them.
//
// A TRS is the four-word sequence 3FF 000 000 XYZ (SMPTE 125M / 274M). A
// four-state FSM walks through it: IDLE waits for the all-ones preamble word,
// PRE1 expects the first zero word, PRE2 the second, and XYZ takes the word
// that carries F (field), V (vertical blanking) and H (0 = SAV, 1 = EAV).
// The document states that each channel uses a simple four-state FSM for
// this; the state assignment and the protection-bit check are this design's.
// For 8-bit sources in 10-bit words any word whose upper eight bits are all
// ones counts as the preamble.
//
// Timing: `trs` pulses in the cycle the XYZ word is on `y`; `f`, `v`, `h` are
// registered and hold the last decoded values. `in_trs` is combinational and
// flags the words of a TRS (including the XYZ word) so callers can skip them.
module trs_decoder #(
  parameter int DW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] y,
  output logic          trs,      // XYZ word present this cycle
  output logic          xyz_ok,   // protection bits of that XYZ word match
  output logic          trs_f,    // decoded bits of this XYZ word (comb.)
  output logic          trs_v,
  output logic          trs_h,
  output logic          f,        // last decoded F, V, H (registered)
  output logic          v,
  output logic          h,
  output logic          in_trs
);
  typedef enum logic [1:0] {S_IDLE, S_PRE1, S_PRE2, S_XYZ} state_e;
  state_e state, state_n;

  logic is_ones, is_zero;
  assign is_ones = &y[DW-1:2];
  assign is_zero = (y == '0);

  always_comb begin
    state_n = S_IDLE;
    unique case (state)
      S_IDLE: state_n = is_ones ? S_PRE1 : S_IDLE;
      S_PRE1: state_n = is_zero ? S_PRE2 : (is_ones ? S_PRE1 : S_IDLE);
      S_PRE2: state_n = is_zero ? S_XYZ  : (is_ones ? S_PRE1 : S_IDLE);
      S_XYZ:  state_n = is_ones ? S_PRE1 : S_IDLE;
    endcase
  end

  assign trs   = (state == S_XYZ);
  assign trs_f = y[DW-2];
  assign trs_v = y[DW-3];
  assign trs_h = y[DW-4];
  assign xyz_ok = y[DW-1] &&
                  (y[DW-5] == (trs_v ^ trs_h)) && (y[DW-6] == (trs_f ^ trs_h)) &&
                  (y[DW-7] == (trs_f ^ trs_v)) && (y[DW-8] == (trs_f ^ trs_v ^ trs_h));
  assign in_trs = (state != S_IDLE) || is_ones;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      f <= 1'b0; v <= 1'b1; h <= 1'b1;
    end else begin
      state <= state_n;
      if (trs && xyz_ok) begin
        f <= trs_f; v <= trs_v; h <= trs_h;
      end
    end
  end
endmodule

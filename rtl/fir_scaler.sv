// fir_scaler: one-dimensional video scaler (horizontal or vertical filter).
//
// A line of `line_len` input samples arrives on a valid/ready stream. The
// samples from `crop_start` to `crop_start + crop_len - 1` form the source
// segment (pan/tilt window); the others are consumed and dropped. The segment
// is resampled to `out_len` output samples, output j lying at source
// position j * step, with `step` ~ crop_len / out_len in fixed point with
// FRAC fractional bits (zoom). The vertical filter is the same unit fed with
// columns, which the frame buffer reads transposed.
//
// The control part is the field/frame re-constructor: counters and a
// position accumulator decide each cycle whether the filter's data registers
// shift (input hold otherwise) and whether an output is computed (output
// decimation otherwise). An output is computed once the newest sample in the
// bank is the one TAPS/2 past the integer part of its position; the top bits
// of the fraction are PhaseSel. The accumulator starts at half a phase step
// so that truncation rounds every position to the nearest stored phase. At
// the segment's ends the edge sample is repeated to fill the window.
//
// The document specifies the multi-phase bank, PhaseSel, the hold/decimate
// signals made by counters, and rounding to the nearest stored phase; the
// accumulator form, left-aligned sample positions, edge repetition and crop
// parameters are this design's. Configuration must be stable while a line is
// processed. `in_user` of the first sample of a line leaves with the line's
// first output (tags marking the start of a field).
//
// Timing: the bank adds two cycles of latency; per cycle one output is
// computed and/or one sample enters the window, so a line takes about
// max(line_len, out_len) + TAPS cycles; out_ready low stalls the whole unit.
module fir_scaler #(
  parameter int  DW     = 10,
  parameter int  LANES  = 3,
  parameter int  TAPS   = 4,
  parameter int  PHASES = 64,
  parameter int  CW     = 10,
  parameter int  CFRAC  = 8,
  parameter real BETA   = 0.5,
  parameter int  UW     = 4,
  parameter int  LW     = 12,   // line length width
  parameter int  FRAC   = 16,   // step fraction bits
  localparam int PB     = $clog2(PHASES),
  localparam int TB     = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [LW-1:0]             line_len,
  input  logic [LW-1:0]             crop_start,
  input  logic [LW-1:0]             crop_len,
  input  logic [LW-1:0]             out_len,
  input  logic [FRAC+3:0]           step,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic [LANES-1:0][DW-1:0]  in_data,
  input  logic [UW-1:0]             in_user,
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic [LANES-1:0][DW-1:0]  out_data,
  output logic [UW-1:0]             out_user,
  input  logic                      coef_we,
  input  logic [TB-1:0]             coef_tap,
  input  logic [PB-1:0]             coef_phase,
  input  logic signed [CW-1:0]      coef_wdata
);
  localparam int AW = LW + FRAC + 1;
  localparam logic [AW-1:0] ACC0 = AW'(1) << (FRAC - PB - 1);

  typedef enum logic [1:0] {S_SKIP, S_FILL, S_RUN, S_DRAIN} state_e;
  state_e state;

  logic [LW:0]   rc;        // real samples consumed in this line
  logic [LW:0]   n;         // segment index of the newest sample in the bank
  logic [LW:0]   out_cnt;
  logic [AW-1:0] acc;       // position of the next output, FRAC fraction bits
  logic [TB:0]   fill;
  logic [LANES-1:0][DW-1:0] last;
  logic [UW-1:0] user_hold;

  logic en, shift, calc, take, use_last;
  logic [LW:0] need, need_next;
  logic [AW-1:0] acc_next;
  assign en   = !(out_valid && !out_ready);
  assign need = acc[AW-1:FRAC] + (LW+1)'(TAPS / 2);
  assign acc_next  = acc + AW'(step);
  assign need_next = acc_next[AW-1:FRAC] + (LW+1)'(TAPS / 2);

  always_comb begin
    in_ready = 1'b0; shift = 1'b0; calc = 1'b0; use_last = 1'b0;
    unique case (state)
      S_SKIP:  begin
        in_ready = en;
        shift = (rc >= {1'b0, crop_start});
      end
      S_FILL:  begin shift = 1'b1; use_last = 1'b1; end
      S_RUN:   begin
        if (out_cnt >= {1'b0, out_len}) ;
        else if (n >= need) begin
          // the window may advance in the same cycle when the next output
          // needs a newer sample (the product registers take the old window)
          calc = 1'b1;
          if (n < need_next && out_cnt + 1 < {1'b0, out_len}) begin
            if (n + 1 < {1'b0, crop_len}) in_ready = en;
            else use_last = 1'b1;
            shift = 1'b1;
          end
        end else if (n + 1 < {1'b0, crop_len}) begin in_ready = en; shift = 1'b1; end
        else begin shift = 1'b1; use_last = 1'b1; end
      end
      S_DRAIN: in_ready = en && (rc < {1'b0, line_len});
    endcase
    if (in_ready && !in_valid) shift = 1'b0;
  end
  assign take = in_ready && in_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_SKIP; rc <= '0; n <= '0; out_cnt <= '0; acc <= ACC0;
      fill <= '0; last <= '0; user_hold <= '0;
    end else if (en) begin
      if (take) rc <= rc + 1'b1;
      if (take && shift) last <= in_data;
      unique case (state)
        S_SKIP: if (take) begin
          if (rc == '0) user_hold <= in_user;
          if (shift) begin
            n <= '0;
            if (TAPS > 1) begin state <= S_FILL; fill <= (TB+1)'(TAPS - 2); end
            else state <= S_RUN;
          end
        end
        S_FILL: begin
          fill <= fill - 1'b1;
          if (fill == '0) state <= S_RUN;
        end
        S_RUN: begin
          if (out_cnt >= {1'b0, out_len}) state <= S_DRAIN;
          else begin
            if (calc) begin
              acc <= acc_next;
              out_cnt <= out_cnt + 1'b1;
              user_hold <= '0;
            end
            if (shift) n <= n + 1'b1;
          end
        end
        S_DRAIN: if (!(rc < {1'b0, line_len}) && !take) begin
          state <= S_SKIP; rc <= '0; out_cnt <= '0; acc <= ACC0;
        end
      endcase
    end
  end

  fir_bank #(.DW(DW), .CW(CW), .CFRAC(CFRAC), .LANES(LANES), .TAPS(TAPS),
             .PHASES(PHASES), .BETA(BETA), .UW(UW)) u_bank (
    .clk, .rst_n, .en, .shift,
    .in_data(use_last ? last : in_data),
    .calc, .phase(acc[FRAC-1 -: PB]), .in_user(user_hold),
    .out_valid, .out_data, .out_user,
    .coef_we, .coef_tap, .coef_phase, .coef_wdata
  );
endmodule

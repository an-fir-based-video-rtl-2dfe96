// fir_bank: multi-phase interpolation filter bank.
//
// TAPS fir_tap cells are cascaded: the input sample enters the first cell
// (TAP In) and moves one cell on every `shift`; the partial sums run from a
// zero at TAP In to TAP Out, where the total is rounded, shifted right by
// CFRAC and clipped to the DW-bit range. PhaseSel (`phase`) selects the same
// stored phase in every cell, so one output sample is the inner product of
// the current window with the coefficient set of its phase. All lanes of a
// pixel (Y, Cb, Cr) go through the same cells with the same coefficients.
//
// Following the document: systolic cascade of taps under one clock, a
// PhaseSel that selects a coefficient set per output, and an input
// hold/shift signal and output valid signal because input and output rates
// differ. The tap count, coefficient format and rounding are this design's
// choices (the document gives none). `user` is side-band data that travels
// with a requested output.
//
// Timing: with `en` high, a request (`calc`) in cycle t gives out_valid and
// out_data in cycle t+2. When `en` is low the whole bank holds.
module fir_bank #(
  parameter int  DW     = 10,
  parameter int  CW     = 10,
  parameter int  CFRAC  = 8,
  parameter int  LANES  = 3,
  parameter int  TAPS   = 4,
  parameter int  PHASES = 64,
  parameter real BETA   = 0.5,
  parameter int  UW     = 4,
  localparam int PB     = $clog2(PHASES),
  localparam int TB     = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic                      shift,
  input  logic [LANES-1:0][DW-1:0]  in_data,
  input  logic                      calc,
  input  logic [PB-1:0]             phase,
  input  logic [UW-1:0]             in_user,
  output logic                      out_valid,
  output logic [LANES-1:0][DW-1:0]  out_data,
  output logic [UW-1:0]             out_user,
  input  logic                      coef_we,
  input  logic [TB-1:0]             coef_tap,
  input  logic [PB-1:0]             coef_phase,
  input  logic signed [CW-1:0]      coef_wdata
);
  localparam int SW = DW + CW + 3;

  logic [TAPS:0][LANES-1:0][DW-1:0]        dchain;
  logic signed [TAPS:0][LANES-1:0][SW-1:0] schain;

  assign dchain[0] = in_data;
  assign schain[0] = '0;

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    fir_tap #(.DW(DW), .CW(CW), .CFRAC(CFRAC), .LANES(LANES), .TAPS(TAPS),
              .TAP_IDX(k), .PHASES(PHASES), .BETA(BETA), .SW(SW)) u_tap (
      .clk, .rst_n, .en, .shift,
      .data_in(dchain[k]), .data_out(dchain[k+1]),
      .phase_sel(phase),
      .sum_in(schain[k]), .sum_out(schain[k+1]),
      .coef_we(coef_we && (TB'(k) == coef_tap)), .coef_phase, .coef_wdata
    );
  end

  logic          s1_valid;
  logic [UW-1:0] s1_user;

  function automatic logic [DW-1:0] round_clip(input logic signed [SW-1:0] s);
    logic signed [SW-1:0] r;
    r = (s + SW'(1 <<< (CFRAC - 1))) >>> CFRAC;
    if (r < 0) return '0;
    if (r > SW'((1 << DW) - 1)) return '1;
    return r[DW-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0; s1_user <= '0;
      out_valid <= 1'b0; out_user <= '0; out_data <= '0;
    end else if (en) begin
      s1_valid <= calc;
      s1_user  <= in_user;
      out_valid <= s1_valid;
      out_user  <= s1_user;
      if (s1_valid)
        for (int l = 0; l < LANES; l++) out_data[l] <= round_clip(schain[TAPS][l]);
    end
  end
endmodule

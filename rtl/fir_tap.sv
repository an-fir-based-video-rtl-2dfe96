// fir_tap: one tap of the multi-phase interpolation filter bank.
//
// A tap holds one input sample per lane (Y, Cb, Cr share the tap) in its
// data register, which loads DataShiftIn when `shift` is high and passes its
// old value on as DataShiftOut, so a chain of taps is the filter's delay
// line. A coefficient store holds one coefficient per stored phase; PhaseSel
// picks the coefficient, it is multiplied with the held sample, the product
// is registered, and the registered product is added to SumShiftIn to form
// SumShiftOut for the next tap.
//
// This follows the tap drawn in the document's filter-bank figure (data
// register, phase-selected coefficient, multiplier, product register, sum
// adder). The figure also registers the sum in every tap; here the sum chain
// is combinational from the product registers to the bank's output register,
// so that every product of one output sample uses the same window and phase
// even when the input holds while several outputs are computed (up-scaling).
// The coefficient store resets to the windowed-sinc kernel of fir_pkg and is
// written one word per cycle through coef_we/coef_phase/coef_wdata.
//
// Timing: `shift` and the product register both act on rising edges when
// `en` is high; the product of the window present in cycle t is on
// SumShiftOut in cycle t+1.
module fir_tap #(
  parameter int  DW      = 10,
  parameter int  CW      = 10,           // signed coefficient width
  parameter int  CFRAC   = 8,            // coefficient fractional bits
  parameter int  LANES   = 3,
  parameter int  TAPS    = 4,
  parameter int  TAP_IDX = 0,            // position in the chain, 0 = newest
  parameter int  PHASES  = 64,
  parameter real BETA    = 0.5,
  parameter int  SW      = DW + CW + 3,  // sum width
  localparam int PB      = $clog2(PHASES)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             en,
  input  logic                             shift,
  input  logic [LANES-1:0][DW-1:0]         data_in,
  output logic [LANES-1:0][DW-1:0]         data_out,
  input  logic [PB-1:0]                    phase_sel,
  input  logic signed [LANES-1:0][SW-1:0]  sum_in,
  output logic signed [LANES-1:0][SW-1:0]  sum_out,
  input  logic                             coef_we,
  input  logic [PB-1:0]                    coef_phase,
  input  logic signed [CW-1:0]             coef_wdata
);
  typedef logic signed [CW-1:0] coef_t;
  typedef coef_t coef_tab_t [PHASES];

  function automatic coef_tab_t default_tab();
    coef_tab_t t;
    for (int p = 0; p < PHASES; p++)
      t[p] = CW'(fir_pkg::coef(TAPS, TAP_IDX, p, PHASES, CFRAC, BETA));
    return t;
  endfunction
  localparam coef_tab_t DEFAULT = default_tab();

  coef_t coefs [PHASES];
  logic signed [LANES-1:0][DW+CW:0] prod;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coefs <= DEFAULT;
    end else if (coef_we) begin
      coefs[coef_phase] <= coef_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_out <= '0;
      prod <= '0;
    end else if (en) begin
      if (shift) data_out <= data_in;
      for (int l = 0; l < LANES; l++)
        prod[l] <= $signed({1'b0, data_out[l]}) * coefs[phase_sel];
    end
  end

  for (genvar l = 0; l < LANES; l++) begin : g_sum
    assign sum_out[l] = $signed(sum_in[l]) + SW'($signed(prod[l]));
  end
endmodule

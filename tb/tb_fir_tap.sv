// tb_fir_tap: checks one filter tap against a cycle model kept here: the
// data register (shift / hold / enable), the product register holding
// sample x coefficient of the selected phase, and SumShiftOut = SumShiftIn +
// product. Coefficients are first the reset kernel (phase 0 of the centre tap
// must be exactly 1.0, its neighbours 0), then random values written
// through the coefficient port.
module tb_fir_tap;
  localparam int DW = 10, CW = 10, LANES = 3, PHASES = 64, SW = DW + CW + 3;
  logic clk = 0, rst_n = 0;
  logic en, shift, coef_we;
  logic [LANES-1:0][DW-1:0] data_in, data_out;
  logic [5:0] phase_sel, coef_phase;
  logic signed [LANES-1:0][SW-1:0] sum_in, sum_out;
  logic signed [CW-1:0] coef_wdata;
  int checks = 0, failures = 0;

  fir_tap #(.DW(DW), .CW(CW), .LANES(LANES), .TAPS(4), .TAP_IDX(2), .PHASES(PHASES)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int coef_m [PHASES];
  logic [LANES-1:0][DW-1:0] d_m;
  longint prod_m [LANES];

  task automatic check();
    #1;
    for (int l = 0; l < LANES; l++) begin
      checks++;
      if (data_out[l] !== d_m[l] || longint'($signed(sum_out[l])) != longint'($signed(sum_in[l])) + prod_m[l]) begin
        failures++;
        $display("t=%0t lane %0d: data %h exp %h sum %0d exp %0d", $time, l, data_out[l], d_m[l], $signed(sum_out[l]),
                 longint'($signed(sum_in[l])) + prod_m[l]);
      end
    end
  endtask

  task automatic step();
    // model update for this edge
    if (en) begin
      for (int l = 0; l < LANES; l++) prod_m[l] = longint'(d_m[l]) * coef_m[phase_sel];
      if (shift) d_m = data_in;
    end
    if (coef_we) coef_m[coef_phase] = coef_wdata;
    @(posedge clk);
    check();
  endtask

  initial begin
    en = 0; shift = 0; coef_we = 0; data_in = '0; phase_sel = 0; coef_phase = 0;
    coef_wdata = 0; sum_in = '0; d_m = '0;
    for (int l = 0; l < LANES; l++) prod_m[l] = 0;
    for (int p = 0; p < PHASES; p++) coef_m[p] = 0;
    coef_m[0] = 256;               // centre tap, phase 0: weight 1.0
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // reset kernel, phase 0 only
    for (int i = 0; i < 20; i++) begin
      en = 1; shift = 1; phase_sel = 0;
      for (int l = 0; l < LANES; l++) begin
        data_in[l] = 10'($urandom); sum_in[l] = SW'($signed($urandom_range(0, 4000)) - 2000);
      end
      step();
    end
    // random coefficients, random control
    for (int p = 0; p < PHASES; p++) begin
      coef_we = 1; coef_phase = 6'(p); coef_wdata = CW'($urandom); en = 0;
      step();
    end
    coef_we = 0;
    for (int i = 0; i < 2000; i++) begin
      en = ($urandom_range(0, 4) != 0); shift = $urandom; phase_sel = 6'($urandom);
      for (int l = 0; l < LANES; l++) begin
        data_in[l] = 10'($urandom); sum_in[l] = SW'($signed($urandom_range(0, 40000)) - 20000);
      end
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fir_bank: (1) with the reset kernel, a constant window must come out
// unchanged at every phase (each phase sums to 1.0), and at phase 0 the
// output must equal the window's centre sample TAPS/2 (pure sinc sample);
// (2) with random coefficients written through the port and random
// shift / calc / enable patterns, every output must equal the rounded,
// clipped inner product computed here, exactly two enabled cycles after
// its request.
module tb_fir_bank;
  localparam int DW = 10, CW = 10, LANES = 3, TAPS = 4, PHASES = 64;
  logic clk = 0, rst_n = 0;
  logic en, shift, calc, out_valid, coef_we;
  logic [LANES-1:0][DW-1:0] in_data, out_data;
  logic [5:0] phase, coef_phase;
  logic [3:0] in_user, out_user;
  logic [1:0] coef_tap;
  logic signed [CW-1:0] coef_wdata;
  int checks = 0, failures = 0;

  fir_bank #(.DW(DW), .CW(CW), .LANES(LANES), .TAPS(TAPS), .PHASES(PHASES), .UW(4)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int coef [TAPS][PHASES];
  int win [TAPS][LANES];      // win[0] = newest
  typedef struct { int v[LANES]; logic [3:0] u; } exp_t;
  exp_t pipe[$];
  int expect_in2 [$];         // stage counter per request

  function automatic int ref_out(int l, int ph);
    longint s = 0;
    for (int k = 0; k < TAPS; k++) s += longint'(coef[k][ph]) * win[k][l];
    s = (s + 128) >>> 8;
    if (s < 0) s = 0;
    if (s > 1023) s = 1023;
    return int'(s);
  endfunction

  // track requests through the two-stage pipeline
  exp_t st1, st2; logic v1 = 0, v2 = 0;
  task automatic step();
    exp_t e;
    if (en) begin
      if (calc) begin
        for (int l = 0; l < LANES; l++) e.v[l] = ref_out(l, phase);
        e.u = in_user;
      end
      v2 = v1; st2 = st1; v1 = calc; st1 = e;
      if (shift) begin
        for (int k = TAPS - 1; k > 0; k--) win[k] = win[k-1];
        for (int l = 0; l < LANES; l++) win[0][l] = in_data[l];
      end
    end
    if (coef_we) coef[coef_tap][coef_phase] = coef_wdata;
    @(posedge clk); #1;
    checks++;
    if (out_valid !== v2) begin failures++; $display("out_valid %b exp %b", out_valid, v2); end
    else if (v2) begin
      for (int l = 0; l < LANES; l++)
        if (out_data[l] !== 10'(st2.v[l])) begin
          failures++; $display("lane %0d: %0d exp %0d", l, out_data[l], st2.v[l]);
        end
      if (out_user !== st2.u) begin failures++; $display("user"); end
    end
  endtask

  task automatic tick(); @(posedge clk); #1; endtask

  initial begin
    en = 0; shift = 0; calc = 0; coef_we = 0; in_data = '0; phase = 0; in_user = 0;
    coef_phase = 0; coef_tap = 0; coef_wdata = 0;
    for (int k = 0; k < TAPS; k++) for (int l = 0; l < LANES; l++) win[k][l] = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // (1) reset kernel: DC gain and phase-0 interpolation
    for (int ph = 0; ph < PHASES; ph++) begin
      int v; v = $urandom_range(0, 1023);
      en = 1; calc = 0; shift = 1;
      for (int l = 0; l < LANES; l++) in_data[l] = 10'(v);
      repeat (TAPS) tick();
      shift = 0; calc = 1; phase = 6'(ph); tick(); calc = 0;
      tick(); #1;
      checks++;
      if (!out_valid || out_data[0] != 10'(v) || out_data[2] != 10'(v)) begin
        failures++; $display("DC gain phase %0d: %0d exp %0d", ph, out_data[0], v);
      end
    end
    for (int k = 0; k < TAPS; k++) begin
      shift = 1; calc = 0; for (int l = 0; l < LANES; l++) in_data[l] = 10'(100 * (k + 1) + l);
      tick();
    end
    shift = 0; calc = 1; phase = 0; tick(); calc = 0; tick(); #1;
    checks++;
    // newest is tap 0 = 400; tap TAPS/2 = 2 holds 200
    if (out_data[0] != 10'd200 || out_data[1] != 10'd201) begin
      failures++; $display("phase 0 should pick tap 2: %0d", out_data[0]);
    end
    // (2) random coefficients
    for (int k = 0; k < TAPS; k++) for (int l = 0; l < LANES; l++) win[k][l] = 0;
    rst_n = 0; #1 rst_n = 1;
    en = 0; calc = 0; shift = 0;
    for (int k = 0; k < TAPS; k++)
      for (int p = 0; p < PHASES; p++) begin
        coef_we = 1; coef_tap = 2'(k); coef_phase = 6'(p);
        coef_wdata = CW'($urandom_range(0, 400) - 100);
        step();
      end
    coef_we = 0;
    for (int i = 0; i < 3000; i++) begin
      en = ($urandom_range(0, 5) != 0); shift = $urandom; calc = $urandom;
      phase = 6'($urandom); in_user = 4'($urandom);
      for (int l = 0; l < LANES; l++) in_data[l] = 10'($urandom);
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

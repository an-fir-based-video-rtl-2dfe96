// tb_fir_scaler: runs lines through the scaler in several configurations
// (enlarge, reduce, 1:1, with pan/crop offsets) with random input gaps and
// random output back-pressure, and compares every output sample with a
// reference resampler written here: output j at fixed-point position
// j*step + half a phase step, PhaseSel = top 6 fraction bits, taps on
// samples floor+2 .. floor-1 clamped to the crop window, programmed random
// coefficients, rounding and clipping. Also checks the per-line output
// count, the tag on the first output of a line, and that a 1:1 line without
// stalls takes at most line_len + 12 cycles.
module tb_fir_scaler;
  localparam int DW = 10, LANES = 3, TAPS = 4, PHASES = 64, CW = 10;
  logic clk = 0, rst_n = 0;
  logic [11:0] line_len, crop_start, crop_len, out_len;
  logic [19:0] step;
  logic in_valid, in_ready, out_valid, out_ready, coef_we;
  logic [LANES-1:0][DW-1:0] in_data, out_data;
  logic [3:0] in_user, out_user;
  logic [1:0] coef_tap;
  logic [5:0] coef_phase;
  logic signed [CW-1:0] coef_wdata;
  int checks = 0, failures = 0;

  fir_scaler #(.DW(DW), .LANES(LANES), .TAPS(TAPS), .PHASES(PHASES), .CW(CW), .UW(4)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int coef [TAPS][PHASES];
  typedef struct { logic [LANES-1:0][DW-1:0] d; logic [3:0] u; } exp_t;
  exp_t q[$];
  int gaps = 1, stall = 1, nout = 0;

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      exp_t e;
      nout++;
      checks++;
      if (q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        e = q.pop_front();
        if (out_data !== e.d || out_user !== e.u) begin
          failures++; $display("out %h user %h exp %h %h", out_data, out_user, e.d, e.u);
        end
      end
    end
  end
  always @(posedge clk) #2 out_ready = stall ? ($urandom_range(0, 3) != 0) : 1'b1;

  task automatic run_line(int L, int cs, int cl, int ol, int st, int tagv);
    logic [LANES-1:0][DW-1:0] s [];
    int acc;
    s = new[L];
    for (int i = 0; i < L; i++) s[i] = {10'($urandom), 10'($urandom), 10'($urandom)};
    acc = 1 << 9;
    for (int j = 0; j < ol; j++) begin
      exp_t e; int fl, ph;
      fl = acc >> 16; ph = (acc >> 10) & 63;
      for (int l = 0; l < LANES; l++) begin
        longint sum = 0;
        for (int k = 0; k < TAPS; k++) begin
          int idx; idx = fl + 2 - k;
          if (idx < 0) idx = 0;
          if (idx > cl - 1) idx = cl - 1;
          sum += longint'(coef[k][ph]) * s[cs + idx][l];
        end
        sum = (sum + 128) >>> 8;
        if (sum < 0) sum = 0;
        if (sum > 1023) sum = 1023;
        e.d[l] = 10'(sum);
      end
      e.u = (j == 0) ? 4'(tagv) : 4'h0;
      q.push_back(e);
      acc += st;
    end
    line_len = 12'(L); crop_start = 12'(cs); crop_len = 12'(cl); out_len = 12'(ol); step = 20'(st);
    for (int i = 0; i < L; i++) begin
      in_valid = 1; in_data = s[i]; in_user = (i == 0) ? 4'(tagv) : 4'h0;
      // in_ready is sampled between edges, after out_ready has settled
      forever begin
        @(negedge clk);
        if (in_ready) break;
      end
      @(posedge clk); #1;
      in_valid = 0;
      if (gaps) while ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
    end
  endtask

  initial begin
    int t0;
    in_valid = 0; in_data = '0; in_user = 0; coef_we = 0; coef_tap = 0; coef_phase = 0;
    coef_wdata = 0; out_ready = 1;
    line_len = 8; crop_start = 0; crop_len = 8; out_len = 8; step = 20'h10000;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int k = 0; k < TAPS; k++)
      for (int p = 0; p < PHASES; p++) begin
        coef[k][p] = $urandom_range(0, 300) - 60;
        coef_we = 1; coef_tap = 2'(k); coef_phase = 6'(p); coef_wdata = CW'(coef[k][p]);
        @(posedge clk); #1;
      end
    coef_we = 0;
    for (int r = 0; r < 40; r++) begin
      int L, cs, cl, ol;
      L = $urandom_range(4, 40); cs = $urandom_range(0, L / 3); cl = $urandom_range(2, L - cs);
      ol = $urandom_range(1, 60);
      run_line(L, cs, cl, ol, (cl << 16) / ol, r % 16);
      // let the line finish before the configuration changes
      while (q.size() != 0) @(posedge clk);
      repeat (4) @(posedge clk); #1;
    end
    // throughput: 1:1, no gaps, no stalls
    gaps = 0; stall = 0;
    t0 = $time;
    run_line(200, 0, 200, 200, 1 << 16, 5);
    while (q.size() != 0) @(posedge clk);
    checks++;
    if (($time - t0) / 10 > 200 + 12) begin
      failures++; $display("1:1 line took %0d cycles", ($time - t0) / 10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

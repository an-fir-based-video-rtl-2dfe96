// tb_denoise: streams lines of random pixels (smooth runs and steps, with
// random gaps) through the filter and compares every output pixel and flag
// with a reference computed here from the same lines: low-pass where the
// luma curvature |2c-p-n| is at most the threshold, unchanged elsewhere,
// edge pixels using themselves as the missing neighbour.
module tb_denoise;
  import vfc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic enable;
  logic [10:0] threshold;
  logic in_valid, in_sol, in_eol, in_sof, in_field;
  pixel_t in_pix, out_pix;
  logic out_valid, out_sol, out_eol, out_sof, out_field;
  int checks = 0, failures = 0, n_smoothed = 0, n_kept = 0;
  typedef struct { pixel_t p; logic sol, eol, sof, f; } exp_t;
  exp_t q[$];

  denoise dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [9:0] lp(int a, int b, int c);
    return 10'((a + 2 * b + c + 2) / 4);
  endfunction

  task automatic send_line(int w, logic sof, logic f);
    pixel_t l[];
    int base;
    l = new[w];
    base = $urandom_range(100, 800);
    for (int i = 0; i < w; i++) begin
      if ($urandom_range(0, 5) == 0) base = $urandom_range(100, 800);
      l[i].y  = 10'(base + $urandom_range(0, 12));
      l[i].cb = 10'($urandom_range(0, 1023));
      l[i].cr = 10'($urandom_range(0, 1023));
    end
    for (int i = 0; i < w; i++) begin
      pixel_t p, c, n, r; int e;
      p = l[(i == 0) ? 0 : i - 1]; c = l[i]; n = l[(i == w - 1) ? i : i + 1];
      e = 2 * int'(c.y) - int'(p.y) - int'(n.y);
      if (e < 0) e = -e;
      if (enable && e <= int'(threshold)) begin
        r.y = lp(p.y, c.y, n.y); r.cb = lp(p.cb, c.cb, n.cb); r.cr = lp(p.cr, c.cr, n.cr);
        n_smoothed++;
      end else begin r = c; n_kept++; end
      q.push_back('{r, i == 0, i == w - 1, sof && i == 0, f});
    end
    for (int i = 0; i < w; i++) begin
      while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(posedge clk); end
      in_valid = 1; in_pix = l[i]; in_sol = (i == 0); in_eol = (i == w - 1);
      in_sof = sof && (i == 0); in_field = f;
      @(posedge clk);
    end
    in_valid = 0;
    repeat (2 + $urandom_range(0, 3)) @(posedge clk);
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      exp_t e; e = q.pop_front();
      if (out_pix !== e.p || out_sol !== e.sol || out_eol !== e.eol || out_sof !== e.sof ||
          out_field !== e.f) begin
        failures++; $display("got %h %b%b%b exp %h %b%b%b", out_pix, out_sol, out_eol, out_sof,
                             e.p, e.sol, e.eol, e.sof);
      end
    end
  end

  initial begin
    in_valid = 0; in_pix = '0; in_sol = 0; in_eol = 0; in_sof = 0; in_field = 0;
    enable = 1; threshold = 11'd20;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int l = 0; l < 30; l++) send_line($urandom_range(1, 40), l % 10 == 0, l[3]);
    enable = 0;
    for (int l = 0; l < 5; l++) send_line($urandom_range(1, 40), 0, 0);
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0 || n_smoothed == 0 || n_kept == 0) begin
      failures++; $display("left %0d, smoothed %0d kept %0d", q.size(), n_smoothed, n_kept);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

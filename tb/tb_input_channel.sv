// tb_input_channel: sends two fields of embedded-timing 4:2:2 video (blanking
// lines with V=1, then active lines with random samples) and checks every
// 4:4:4 pixel that comes out: Y, the Cb/Cr of its pair, sol/eol/sof flags,
// the field bit, and that exactly W*LINES pixels arrive per field.
module tb_input_channel;
  import vfc_pkg::*;
  localparam int W = 16, LINES = 5, HBLANK = 12;
  logic clk = 0, rst_n = 0;
  logic [9:0] yin, uvin;
  logic pix_valid, sol, eol, sof, field, trs_error;
  pixel_t pix;
  int checks = 0, failures = 0;
  typedef struct { pixel_t p; logic sol, eol, sof, f; } exp_t;
  exp_t q[$];

  input_channel dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic put(input logic [9:0] a, input logic [9:0] b);
    yin = a; uvin = b; @(posedge clk);
  endtask
  task automatic trs4(input logic f, v, h);
    put(10'h3FF, 10'h3FF); put(0, 0); put(0, 0); put(trs_xyz(f, v, h), trs_xyz(f, v, h));
  endtask
  task automatic line(input logic f, input logic v, input logic first);
    trs4(f, v, 1);                                   // EAV
    for (int i = 0; i < HBLANK; i++) put(10'h040, 10'h200);
    trs4(f, v, 0);                                   // SAV
    for (int i = 0; i < W; i += 2) begin
      logic [9:0] y0, y1, cb, cr;
      y0 = 10'($urandom_range(64, 940)); y1 = 10'($urandom_range(64, 940));
      cb = 10'($urandom_range(64, 960)); cr = 10'($urandom_range(64, 960));
      if (v) begin y0 = 10'h040; y1 = 10'h040; cb = 10'h200; cr = 10'h200; end
      else begin
        q.push_back('{'{y: y0, cb: cb, cr: cr}, i == 0, 1'b0, first && i == 0, f});
        q.push_back('{'{y: y1, cb: cb, cr: cr}, 1'b0, i == W - 2, 1'b0, f});
      end
      put(y0, cb); put(y1, cr);
    end
  endtask

  int got = 0;
  always @(posedge clk) if (rst_n && pix_valid) begin
    got++;
    checks++;
    if (q.size() == 0) begin failures++; $display("unexpected pixel"); end
    else begin
      exp_t e; e = q.pop_front();
      if (pix !== e.p || sol !== e.sol || eol !== e.eol || sof !== e.sof || field !== e.f) begin
        failures++;
        $display("pix %h sol%b eol%b sof%b f%b  exp %h %b %b %b %b", pix, sol, eol, sof, field,
                 e.p, e.sol, e.eol, e.sof, e.f);
      end
    end
  end
  always @(posedge clk) if (rst_n && trs_error) begin failures++; $display("trs_error"); end

  initial begin
    yin = 10'h040; uvin = 10'h200;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int fld = 0; fld < 2; fld++) begin
      for (int l = 0; l < 3; l++) line(fld[0], 1, 0);
      for (int l = 0; l < LINES; l++) line(fld[0], 0, l == 0);
    end
    line(0, 1, 0);
    repeat (10) @(posedge clk);
    checks++;
    if (got != 2 * W * LINES || q.size() != 0) begin
      failures++; $display("pixel count %0d, expected %0d", got, 2 * W * LINES);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

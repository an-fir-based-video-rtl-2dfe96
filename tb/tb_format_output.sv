// tb_format_output: runs a small raster (20 x 6 words, 8 x 4 active) with a
// pixel source that depends on the requested (x, y), and checks every output
// word on both buses: EAV/SAV with the right XYZ (V set in blanking lines),
// blanking levels, luma, and chroma folded to Cb(even), Cr(even). Then
// pulses out_sync mid-frame and checks that the raster restarts at line 0.
module tb_format_output;
  import vfc_pkg::*;
  localparam int HT = 20, HA = 8, VT = 6, VA = 4, HB = HT - HA;
  logic clk = 0, rst_n = 0;
  logic [12:0] h_total, v_total;
  logic [11:0] h_active, v_active;
  logic out_sync, req, blank, frame_start;
  logic [11:0] x, y;
  pixel_t pix;
  logic [9:0] yout, uvout;
  int checks = 0, failures = 0, frames = 0;

  format_output dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always_comb pix = '{y: 10'(64 + x + 16 * y), cb: 10'(100 + x + y), cr: 10'(300 + x + y)};

  function automatic logic [19:0] expect_word(int hc, int vc);
    logic v; logic [9:0] xyz;
    v = (vc >= VA);
    if (hc == 0 || hc == HB - 4) return {10'h3FF, 10'h3FF};
    if (hc == 1 || hc == 2 || hc == HB - 3 || hc == HB - 2) return 20'h0;
    if (hc == 3) begin xyz = {1'b1, 1'b0, v, 1'b1, v ^ 1'b1, 1'b1, v, v ^ 1'b1, 2'b00}; return {xyz, xyz}; end
    if (hc == HB - 1) begin xyz = {1'b1, 1'b0, v, 1'b0, v, 1'b0, v, v, 2'b00}; return {xyz, xyz}; end
    if (hc < HB || v) return {10'h040, 10'h200};
    begin
      int px, ev;
      px = hc - HB; ev = px & ~1;
      return {10'(64 + px + 16 * vc), (px % 2 == 0) ? 10'(100 + ev + vc) : 10'(300 + ev + vc)};
    end
  endfunction

  always @(posedge clk) if (frame_start) frames++;

  task automatic check_frame(int start_line, int nlines);
    for (int vc = start_line; vc < start_line + nlines; vc++)
      for (int hc = 0; hc < HT; hc++) begin
        @(posedge clk); #1;
        checks++;
        if ({yout, uvout} !== expect_word(hc, vc % VT)) begin
          failures++; $display("hc %0d vc %0d: %h %h exp %h", hc, vc, yout, uvout, expect_word(hc, vc % VT));
        end
      end
  endtask

  initial begin
    h_total = HT; h_active = HA; v_total = VT; v_active = VA; out_sync = 0;
    @(posedge clk); #1 rst_n = 1;
    check_frame(0, 2 * VT);
    // restart mid-frame
    repeat (7) @(posedge clk);
    #1 out_sync = 1; @(posedge clk); #1 out_sync = 0;
    check_frame(0, VT);
    checks++;
    if (frames != 4) begin failures++; $display("frame_start count %0d", frames); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

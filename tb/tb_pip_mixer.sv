// tb_pip_mixer: drives the mixer with a raster of positions and two source
// FIFO models holding numbered pictures (pixel = x, y, source), and checks
// every output pixel: slave background everywhere, master inside the
// window, black with pip_en low outside the master picture; that a source
// starts a picture only at its origin; that an out-of-step source (one
// extra pixel) is flushed in blanking and locks again (resync); and that an
// empty source gives an underflow.
module tb_pip_mixer;
  import vfc_pkg::*;
  localparam int OW = 12, OH = 8, WX = 3, WY = 2, WW = 5, WH = 4;
  logic clk = 0, rst_n = 0;
  logic pip_en, req, blank, underflow, resync;
  logic [11:0] out_w, out_h, win_x, win_y, win_w, win_h, x, y;
  logic [1:0] src_valid, src_sof, src_ready;
  pixel_t [1:0] src_pix;
  pixel_t pix;
  int checks = 0, failures = 0, resyncs = 0, underflows = 0;

  pip_mixer dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // source FIFO models
  typedef struct { pixel_t p; logic sof; } ent_t;
  ent_t fq [2][$];
  function automatic void refresh();
    for (int s = 0; s < 2; s++) begin
      src_valid[s] = fq[s].size() != 0;
      src_pix[s] = src_valid[s] ? fq[s][0].p : '0;
      src_sof[s] = src_valid[s] ? fq[s][0].sof : 1'b0;
    end
  endfunction
  // FIFO heads change just after the edge, like registered FIFO outputs
  always @(posedge clk) #1 refresh();
  always @(posedge clk) begin
    for (int s = 0; s < 2; s++) if (src_ready[s]) void'(fq[s].pop_front());
    resyncs += int'(resync); underflows += int'(underflow);
  end

  task automatic load(int s, int w, int h, int extra);
    for (int e = 0; e < extra; e++) fq[s].push_back('{'{y: 10'h3AA, cb: 0, cr: 0}, 1'b0});
    for (int j = 0; j < h; j++) for (int i = 0; i < w; i++)
      fq[s].push_back('{'{y: 10'(s), cb: 10'(i), cr: 10'(j)}, i == 0 && j == 0});
    refresh();
  endtask

  // one frame: OH active lines with 4 blanking cycles each, then 6 blank cycles
  task automatic frame(bit check);
    
    for (int j = 0; j < OH; j++) begin
      req = 0; blank = 1; repeat (4) begin @(posedge clk); #1; end
      for (int i = 0; i < OW; i++) begin
        pixel_t e; bit inw;
        req = 1; blank = 0; x = 12'(i); y = 12'(j);
        inw = (i >= (pip_en ? WX : 0)) && (i < (pip_en ? WX : 0) + WW) &&
              (j >= (pip_en ? WY : 0)) && (j < (pip_en ? WY : 0) + WH);
        if (inw) e = '{y: 10'd1, cb: 10'(i - (pip_en ? WX : 0)), cr: 10'(j - (pip_en ? WY : 0))};
        else if (pip_en) e = '{y: 10'd0, cb: 10'(i), cr: 10'(j)};
        else e = '{y: Y_BLANK, cb: C_BLANK, cr: C_BLANK};
        #1;
        if (check) begin
          checks++;
          if (pix !== e) begin failures++; $display("(%0d,%0d) %h exp %h", i, j, pix, e); end
        end
        begin @(posedge clk); #1; end
      end
    end
    req = 0; blank = 1; repeat (6) begin @(posedge clk); #1; end
  endtask

  initial begin
    pip_en = 1; out_w = OW; out_h = OH; win_x = WX; win_y = WY; win_w = WW; win_h = WH;
    req = 0; blank = 1; x = 0; y = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // frame 1: both sources in step
    load(0, OW, OH, 0); load(1, WW, WH, 0);
    frame(1);
    // frame 2: master has one stray pixel in front: that frame is wrong, it re-locks
    load(0, OW, OH, 0); load(1, WW, WH, 1); load(1, WW, WH, 0);
    frame(0);
    load(0, OW, OH, 0);
    frame(1);
    checks++;
    if (resyncs == 0) begin failures++; $display("no resync"); end
    // pip off: master at origin, black elsewhere
    pip_en = 0; load(1, WW, WH, 0);
    frame(1);
    // underflow: nothing loaded
    pip_en = 1;
    frame(0);
    checks++;
    if (underflows == 0) begin failures++; $display("no underflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_frame_buffer: writes numbered pictures into the buffer (pixel = picture
// id, x, y) and reads them back through the read FIFO with random
// back-pressure, core and memory clocks unrelated. Checks, for every picture
// read, that its pixels come in the configured order (transposed: columns;
// otherwise rows), carry one picture id, and start with out_sof. Scenarios:
// (1) transpose, no repeat, reader keeps up: every picture read once, in
// order; (2) reader stopped: pictures overwritten (drops), then the newest
// one read; (3) repeat enabled, one picture: read again and again;
// (4) two woven fields (parity 0, then 1) read back as one interleaved frame.
module tb_frame_buffer;
  import vfc_pkg::*;
  localparam int W = 6, H = 5, AW = 22;
  logic cclk = 0, mclk = 0, crst_n = 0, mrst_n = 0;
  logic in_valid, overflow, out_valid, out_ready, out_sof;
  pixel_t in_pix, out_pix;
  tag_t in_tag;
  logic [11:0] width, height;
  logic wr_col, rd_col, repeat_en;
  logic [1:0] mem_en, mem_we;
  logic [1:0][AW-1:0] mem_addr;
  pixel_t [1:0] mem_wdata, mem_rdata;
  logic ev_swap, ev_repeat, ev_drop;
  int checks = 0, failures = 0, swaps = 0, repeats = 0, drops = 0;

  frame_buffer #(.RDEPTH(8)) dut (.*);
  for (genvar c = 0; c < 2; c++) begin : g_mem
    mem_model #(.AW(AW)) u_mem (.clk(mclk), .en(mem_en[c]), .we(mem_we[c]), .addr(mem_addr[c]),
                                .wdata(mem_wdata[c]), .rdata(mem_rdata[c]));
  end
  always #6 cclk = ~cclk;
  always #4 mclk = ~mclk;
  initial begin
    #5000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge mclk) begin
    swaps += int'(ev_swap); repeats += int'(ev_repeat); drops += int'(ev_drop);
  end

  // reader / checker
  int rd_pos = 0, rd_id = -1, pics_read[$], ready_pct = 70;
  bit weave_check = 0;
  always @(posedge cclk) if (crst_n) begin
    if (out_valid && out_ready) begin
      int ex, ey;
      if (out_sof) begin
        checks++;
        if (rd_pos != 0 && rd_pos != W * H) begin failures++; $display("sof at pos %0d", rd_pos); end
        rd_pos = 0; rd_id = out_pix.y; pics_read.push_back(rd_id);
      end
      if (rd_col) begin ex = rd_pos / H; ey = rd_pos % H; end
      else begin ex = rd_pos % W; ey = rd_pos / W; end
      checks++;
      if (out_pix.cb != 10'(ex) || out_pix.cr != 10'(ey) ||
          (weave_check ? (out_pix.y != 10'(ey % 2)) : (out_pix.y != 10'(rd_id)))) begin
        failures++; $display("pos %0d: got id %0d x %0d y %0d, exp id %0d x %0d y %0d", rd_pos,
                             out_pix.y, out_pix.cb, out_pix.cr, rd_id, ex, ey);
      end
      rd_pos++;
    end
    #1 out_ready = ($urandom_range(0, 99) < ready_pct);
  end

  task automatic write_pic(int id, bit weave, bit par, bit commit);
    for (int j = (weave ? par : 0); j < H; j += (weave ? 2 : 1))
      for (int i = 0; i < W; i++) begin
        @(posedge cclk); #1;
        in_valid = 1; in_pix = '{y: 10'(id), cb: 10'(i), cr: 10'(j)};
        in_tag = (i == 0 && j == (weave ? par : 0)) ? '{1'b1, weave, par, commit} : '0;
      end
    @(posedge cclk); #1 in_valid = 0; in_tag = '0;
  endtask

  task automatic do_reset(bit col, bit rep);
    crst_n = 0; mrst_n = 0;
    wr_col = 0; rd_col = col; repeat_en = rep; width = W; height = H;
    #50 crst_n = 1; mrst_n = 1;
    rd_pos = 0; rd_id = -1; pics_read.delete(); swaps = 0; repeats = 0; drops = 0;
  endtask

  initial begin
    in_valid = 0; in_pix = '0; in_tag = '0; out_ready = 0;
    // (1) transpose, each picture read once
    do_reset(1, 0);
    for (int p = 1; p <= 4; p++) begin write_pic(p, 0, 0, 1); repeat (120) @(posedge cclk); end
    repeat (200) @(posedge cclk);
    checks++;
    if (pics_read.size() != 4 || pics_read[0] != 1 || pics_read[3] != 4 || repeats != 0) begin
      failures++; $display("(1) read %p repeats %0d", pics_read, repeats);
    end
    // (2) reader stopped: later pictures overwrite pending ones
    ready_pct = 0;
    for (int p = 5; p <= 8; p++) write_pic(p, 0, 0, 1);
    repeat (50) @(posedge cclk);
    ready_pct = 70;
    repeat (600) @(posedge cclk);
    checks++;
    if (drops == 0 || pics_read[pics_read.size() - 1] != 8) begin
      failures++; $display("(2) drops %0d read %p", drops, pics_read);
    end
    // (3) repeat
    do_reset(0, 1);
    write_pic(9, 0, 0, 1);
    repeat (600) @(posedge cclk);
    checks++;
    if (pics_read.size() < 3 || repeats < 2 || overflow) begin
      failures++; $display("(3) read %p repeats %0d", pics_read, repeats);
    end
    // (4) weave two fields into one frame, rows out
    do_reset(0, 0);
    weave_check = 1;
    write_pic(0, 1, 0, 0);
    write_pic(1, 1, 1, 1);
    repeat (300) @(posedge cclk);
    checks++;
    if (pics_read.size() != 1 || rd_pos != W * H) begin
      failures++; $display("(4) read %p pos %0d", pics_read, rd_pos);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

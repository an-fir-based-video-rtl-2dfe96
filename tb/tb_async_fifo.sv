// tb_async_fifo: writes a numbered sequence on a 75-unit clock and reads it
// on an unrelated 100-unit clock, both sides pausing at random, and checks
// order, no loss or duplication, that full stops at DEPTH entries and that
// the FIFO drains to empty.
module tb_async_fifo;
  localparam int W = 16, DEPTH = 16;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wen, wfull, ren, rempty;
  logic [W-1:0] wdata, rdata;
  logic [4:0] wlevel, rlevel;
  int checks = 0, failures = 0, nw = 0, nr = 0, saw_full = 0;

  async_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #7 wclk = ~wclk;
  always #5 rclk = ~rclk;
  initial begin
    #2000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int wslow = 0, rslow = 0;
  always @(posedge wclk) if (wrst_n) begin
    if (wen && !wfull) nw++;
    if (wfull) begin
      saw_full++; checks++;
      if (wlevel != 5'(DEPTH)) begin failures++; $display("full at level %0d", wlevel); end
    end
    #1;
    wen = (nw < 3000) && ($urandom_range(0, 9) >= wslow) && !wfull;
    wdata = W'(nw);
  end
  always @(posedge rclk) if (rrst_n) begin
    if (ren && !rempty) begin
      checks++;
      if (rdata !== W'(nr)) begin failures++; $display("read %0d exp %0d", rdata, nr); end
      nr++;
    end
    #1;
    ren = ($urandom_range(0, 9) >= rslow) && !rempty;
  end

  initial begin
    wen = 0; ren = 0; wdata = 0;
    #30 wrst_n = 1; rrst_n = 1;
    rslow = 9; wslow = 0;          // writer fast: FIFO fills
    #20000 rslow = 0; wslow = 8;   // reader fast: FIFO runs empty
    wait (nr == 3000);
    #200;
    checks++;
    if (!rempty || nw != 3000 || saw_full == 0) begin
      failures++; $display("end: empty %b nw %0d full seen %0d", rempty, nw, saw_full);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

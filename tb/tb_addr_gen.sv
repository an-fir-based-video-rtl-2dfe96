// tb_addr_gen: walks pictures of random size in row order, column order and
// woven-field row/column order, and checks every (x, y) against the
// expected scan and every address against the tiled formula
// {y[hi], x[hi], y[lo], x[lo]}; also checks that the walk length and `last`
// are right and that no address repeats within a picture.
module tb_addr_gen;
  localparam int XB = 11, YB = 11, TB = 3;
  logic clk = 0, rst_n = 0;
  logic start, col_order, y_first, y_step2, next, busy, last;
  logic [XB:0] width;
  logic [YB:0] height;
  logic [21:0] addr;
  logic [XB-1:0] x;
  logic [YB-1:0] y;
  int checks = 0, failures = 0;

  addr_gen #(.XB(XB), .YB(YB), .TB(TB)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic walk(int w, int h, bit col, bit weave, bit par);
    int xs[$], ys[$];
    bit seen [int];
    if (col) begin
      for (int i = 0; i < w; i++) for (int j = (weave ? par : 0); j < h; j += (weave ? 2 : 1)) begin
        xs.push_back(i); ys.push_back(j);
      end
    end else begin
      for (int j = (weave ? par : 0); j < h; j += (weave ? 2 : 1)) for (int i = 0; i < w; i++) begin
        xs.push_back(i); ys.push_back(j);
      end
    end
    width = (XB+1)'(w); height = (YB+1)'(h); col_order = col; y_step2 = weave; y_first = par;
    start = 1; @(posedge clk); #1 start = 0;
    for (int k = 0; k < xs.size(); k++) begin
      logic [21:0] ea; logic [10:0] ex, ey;
      next = $urandom_range(0, 3) != 0;
      ex = 11'(xs[k]); ey = 11'(ys[k]);
      ea = {ey[10:3], ex[10:3], ey[2:0], ex[2:0]};
      checks++;
      if (!busy || x != ex || y != ey || addr != ea || last != (k == xs.size() - 1) ||
          seen.exists(int'(addr))) begin
        failures++; $display("k=%0d busy %b x %0d y %0d addr %h last %b exp %0d %0d %h", k, busy,
                             x, y, addr, last, ex, ey, ea);
        break;
      end
      if (!next) begin @(posedge clk); #1; next = 1; end
      seen[int'(addr)] = 1;
      @(posedge clk); #1;
    end
    next = 0;
    checks++;
    if (busy) begin failures++; $display("still busy"); end
  endtask

  initial begin
    start = 0; next = 0; width = 0; height = 0; col_order = 0; y_first = 0; y_step2 = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    walk(1920, 3, 0, 0, 0);
    walk(5, 1080, 1, 0, 0);
    for (int i = 0; i < 30; i++)
      walk($urandom_range(1, 40), $urandom_range(2, 40), $urandom, $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_trs_decoder: drives random non-TRS words with TRS sequences inserted at
// random places (random F/V/H, some with corrupted protection bits) and
// checks that `trs` fires exactly on each XYZ word with the right bits and
// protection verdict, and that `in_trs` covers the four words.
module tb_trs_decoder;
  import vfc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [9:0] y;
  logic trs, xyz_ok, tf, tv, th, f, v, h, in_trs;
  int checks = 0, failures = 0;

  trs_decoder #(.DW(10)) dut (.*, .trs_f(tf), .trs_v(tv), .trs_h(th));

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic word(input logic [9:0] w, input logic exp_trs, input logic exp_in,
                      input logic [2:0] fvh, input logic ok);
    y = w;
    #1;
    checks++;
    if (trs !== exp_trs || in_trs !== exp_in) begin
      failures++; $display("word %h: trs=%b exp %b in_trs=%b exp %b", w, trs, exp_trs, in_trs, exp_in);
    end
    if (exp_trs) begin
      checks++;
      if ({tf, tv, th} !== fvh || xyz_ok !== ok) begin
        failures++; $display("xyz %h: fvh=%b%b%b exp %b ok=%b exp %b", w, tf, tv, th, fvh, xyz_ok, ok);
      end
    end
    @(posedge clk); #1;
    if (exp_trs && ok) begin
      checks++;
      if ({f, v, h} !== fvh) begin failures++; $display("registered fvh wrong"); end
    end
  endtask

  initial begin
    y = 10'h100;
    repeat (3) @(posedge clk);
    rst_n = 1; #1;
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(0, 9) == 0) begin
        logic [2:0] fvh; logic [9:0] x; logic bad;
        fvh = 3'($urandom); bad = ($urandom_range(0, 3) == 0);
        x = trs_xyz(fvh[2], fvh[1], fvh[0]);
        if (bad) x[2 + $urandom_range(0, 3)] ^= 1'b1;
        word(10'h3FF, 0, 1, 0, 0);
        word(10'h000, 0, 1, 0, 0);
        word(10'h000, 0, 1, 0, 0);
        word(x, 1, 1, fvh, !bad);
      end else begin
        word(10'($urandom_range(4, 1019)), 0, 0, 0, 0);   // legal video range
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

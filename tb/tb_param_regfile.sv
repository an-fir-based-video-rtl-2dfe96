// tb_param_regfile: writes random contents into every parameter group
// through the byte interface (group select byte, then the group's bytes,
// most significant first), checks each group's outputs against the bytes
// written, checks that reading a group returns its bytes from the top and
// leaves it unchanged, that a short write shifts the group by whole bytes,
// and that a write into CoefParam gives exactly one coef_we at STOP.
module tb_param_regfile;
  import vfc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_valid, wr_first, rd_next, stop_evt, coef_we;
  logic [7:0] wr_byte, rd_byte;
  static_param_t p_static;
  pan_param_t p_pan;
  zoom_param_t p_zoom;
  pip_param_t p_pip;
  coef_param_t p_coef;
  int checks = 0, failures = 0, coef_wes = 0;

  param_regfile dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (rst_n) coef_wes += int'(coef_we);

  localparam int NB [5] = '{13, 3, 11, 4, 4};

  task automatic wbyte(logic [7:0] b, logic first);
    wr_valid = 1; wr_byte = b; wr_first = first; @(posedge clk); #1; wr_valid = 0; wr_first = 0;
    repeat (2) @(posedge clk); #1;
  endtask
  task automatic stop(); stop_evt = 1; @(posedge clk); #1 stop_evt = 0; @(posedge clk); #1; endtask

  function automatic logic [103:0] group_val(int g);
    case (g)
      0: return 104'(p_static);
      1: return 104'(p_pan);
      2: return 104'(p_zoom);
      3: return 104'(p_pip);
      default: return 104'(p_coef);
    endcase
  endfunction

  initial begin
    logic [103:0] v, want;
    wr_valid = 0; wr_first = 0; wr_byte = 0; rd_next = 0; stop_evt = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    checks++;
    if (p_static.in_line_len != 12'd1920 || p_zoom.h_step != 20'h10000 || p_pip.pip_en) begin
      failures++; $display("reset values wrong");
    end
    for (int round = 0; round < 3; round++)
      for (int g = 0; g < 5; g++) begin
        want = '0;
        wbyte(8'(g), 1);
        for (int i = 0; i < NB[g]; i++) begin
          logic [7:0] b; b = 8'($urandom);
          want = {want[95:0], b};
          wbyte(b, 0);
        end
        stop();
        v = group_val(g);
        checks++;
        if (v != want) begin failures++; $display("group %0d: %h exp %h", g, v, want); end
        // read back all bytes
        for (int i = NB[g] - 1; i >= 0; i--) begin
          checks++;
          if (rd_byte != want[8*i +: 8]) begin failures++; $display("read g%0d byte %0d", g, i); end
          rd_next = 1; @(posedge clk); #1 rd_next = 0; @(posedge clk); #1;
        end
        checks++;
        if (group_val(g) != want) begin failures++; $display("read changed group %0d", g); end
      end
    checks++;
    if (coef_wes != 3) begin failures++; $display("coef_we count %0d", coef_wes); end
    // short write to PanningParam: one byte shifts the group up by a byte
    want = 104'(p_pan);
    wbyte(8'd1, 1); wbyte(8'hA5, 0); stop();
    checks++;
    if (p_pan != pan_param_t'({want[15:0], 8'hA5})) begin failures++; $display("short write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

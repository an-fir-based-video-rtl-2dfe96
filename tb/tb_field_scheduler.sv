// tb_field_scheduler: sends fields of numbered pixels in every mode and
// cadence phase and checks, per field, whether it is passed or dropped and
// the tag on its first pixel (weave, parity, commit), against the 3:2 / 2:2
// cadence tables worked out here; also counts the drop and weave pulses.
module tb_field_scheduler;
  import vfc_pkg::*;
  logic clk = 0, rst_n = 0;
  film_mode_e mode;
  logic [2:0] cadence_phase;
  logic in_valid, in_sof, in_field;
  pixel_t in_pix, out_pix;
  logic out_valid, field_dropped, frame_woven;
  tag_t out_tag;
  int checks = 0, failures = 0, drops = 0, woven = 0, exp_drops = 0, exp_woven = 0;
  typedef struct { pixel_t p; tag_t t; } exp_t;
  exp_t q[$];

  field_scheduler dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (field_dropped) drops++;
    if (frame_woven) woven++;
    if (out_valid) begin
      checks++;
      if (q.size() == 0) begin failures++; $display("unexpected pixel"); end
      else begin
        exp_t e; e = q.pop_front();
        if (out_pix !== e.p || out_tag !== e.t) begin
          failures++; $display("got %h tag %b, exp %h tag %b", out_pix, out_tag, e.p, e.t);
        end
      end
    end
  end

  // expected behaviour of field number k (counted from the mode change)
  task automatic send_field(int k, int npix);
    int pos; logic wr, weave, commit, f;
    f = k[0];
    wr = 1; weave = 0; commit = 1;
    case (mode)
      MODE_FILM22: begin pos = (k + cadence_phase) % 2; weave = 1; commit = (pos == 1); end
      MODE_FILM32: begin
        pos = (k + cadence_phase) % 5; weave = 1;
        wr = (pos != 2); commit = (pos == 1 || pos == 4);
      end
      default: ;
    endcase
    if (!wr) exp_drops++;
    if (wr && weave && commit) exp_woven++;
    for (int i = 0; i < npix; i++) begin
      pixel_t p;
      p = '{y: 10'(k), cb: 10'(i), cr: 10'($urandom)};
      if (wr) q.push_back('{p, (i == 0) ? tag_t'{1'b1, weave, f, commit} : tag_t'('0)});
      in_valid = 1; in_pix = p; in_sof = (i == 0); in_field = f;
      @(posedge clk);
      in_valid = 0; in_sof = 0;
      repeat ($urandom_range(0, 2)) @(posedge clk);
    end
  endtask

  initial begin
    in_valid = 0; in_sof = 0; in_field = 0; in_pix = '0;
    for (int m = 0; m < 4; m++) begin
      for (int ph = 0; ph < ((m == 3) ? 5 : (m == 2 ? 2 : 1)); ph++) begin
        rst_n = 0; mode = film_mode_e'(m); cadence_phase = 3'(ph);
        repeat (2) @(posedge clk); rst_n = 1;
        for (int k = 0; k < 11; k++) send_field(k, 6);
        repeat (3) @(posedge clk);
      end
    end
    checks++;
    if (q.size() != 0 || drops != exp_drops || woven != exp_woven || drops == 0) begin
      failures++; $display("left %0d drops %0d/%0d woven %0d/%0d", q.size(), drops, exp_drops,
                           woven, exp_woven);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

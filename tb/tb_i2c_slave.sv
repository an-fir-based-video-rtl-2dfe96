// tb_i2c_slave: a bit-level I2C master (open-drain bus modelled as wired
// AND) writes byte strings to the slave's address and to a foreign address
// and reads bytes back. Checks the ACK/NACK of every byte, the received
// bytes and wr_first flag, the START/STOP events, and the bytes read
// (served from a counter that advances on rd_next) including the stop after
// the master's final NACK.
module tb_i2c_slave;
  logic clk = 0, rst_n = 0;
  logic scl, sda_i, sda_oe, m_low;
  logic wr_valid, wr_first, rd_next, start_evt, stop_evt;
  logic [7:0] wr_byte, rd_byte;
  int checks = 0, failures = 0, starts = 0, stops = 0;
  logic [7:0] got[$]; logic firsts[$];

  i2c_slave #(.DEV_ADDR(7'h2C)) dut (.*);
  assign sda_i = !(m_low || sda_oe);
  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) begin
    if (wr_valid) begin got.push_back(wr_byte); firsts.push_back(wr_first); end
    if (rd_next) rd_byte <= rd_byte + 8'd7;
    if (rst_n) begin starts += int'(start_evt); stops += int'(stop_evt); end
  end

  localparam int Q = 12;   // quarter SCL period in clocks
  task automatic q(); repeat (Q) @(posedge clk); endtask
  task automatic start(); m_low = 0; scl = 1; q(); m_low = 1; q(); scl = 0; q(); endtask
  task automatic stop(); m_low = 1; q(); scl = 1; q(); m_low = 0; q(); q(); endtask
  task automatic bit_out(logic b); m_low = !b; q(); scl = 1; q(); q(); scl = 0; q(); endtask
  task automatic bit_in(output logic b); m_low = 0; q(); scl = 1; q(); b = sda_i; q(); scl = 0; q(); endtask
  task automatic byte_out(logic [7:0] v, output logic ack);
    logic b;
    for (int i = 7; i >= 0; i--) bit_out(v[i]);
    bit_in(b); ack = !b;
  endtask
  task automatic byte_in(output logic [7:0] v, input logic ack);
    for (int i = 7; i >= 0; i--) bit_in(v[i]);
    bit_out(!ack);
  endtask

  initial begin
    logic ack; logic [7:0] v, exp_rd;
    scl = 1; m_low = 0; rd_byte = 8'h11;
    repeat (3) @(posedge clk); rst_n = 1; q();
    // write to this device
    for (int t = 0; t < 3; t++) begin
      logic [7:0] bytes[$];
      for (int i = 0; i < 2 + t; i++) bytes.push_back(8'($urandom));
      got.delete(); firsts.delete();
      start(); byte_out({7'h2C, 1'b0}, ack);
      checks++; if (!ack) begin failures++; $display("no address ack"); end
      foreach (bytes[i]) begin
        byte_out(bytes[i], ack);
        checks++; if (!ack) begin failures++; $display("no data ack"); end
      end
      stop();
      checks++;
      if (got.size() != bytes.size()) begin failures++; $display("got %0d bytes", got.size()); end
      else foreach (bytes[i]) if (got[i] != bytes[i] || firsts[i] != (i == 0)) begin
        failures++; $display("byte %0d: %h/%b exp %h", i, got[i], firsts[i], bytes[i]);
      end
    end
    // other address: no ack, no bytes
    got.delete();
    start(); byte_out({7'h2D, 1'b0}, ack);
    checks++; if (ack) begin failures++; $display("acked foreign address"); end
    byte_out(8'h55, ack); stop();
    checks++; if (got.size() != 0) begin failures++; $display("took foreign bytes"); end
    // read 4 bytes
    exp_rd = rd_byte;
    start(); byte_out({7'h2C, 1'b1}, ack);
    checks++; if (!ack) begin failures++; $display("no read address ack"); end
    for (int i = 0; i < 4; i++) begin
      byte_in(v, i < 3);
      checks++;
      if (v != exp_rd) begin failures++; $display("read %h exp %h", v, exp_rd); end
      exp_rd += 8'd7;
    end
    stop();
    checks++;
    if (starts != 5 || stops != 5) begin failures++; $display("starts %0d stops %0d", starts, stops); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

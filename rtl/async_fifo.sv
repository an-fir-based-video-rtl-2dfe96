// async_fifo: dual-clock first-in first-out buffer (RDFIFO / WRFIFO).
//
// It carries pixel data between the core clock and the memory clock. The
// write and read pointers are binary counters one bit wider than the address;
// each is also kept in Gray code and passed through a two-flop synchroniser
// into the other clock domain, where full, empty and the fill levels are
// computed. The read side is first-word-fall-through: `rdata` shows the head
// entry whenever `rempty` is low, and `ren` removes it.
//
// The document states that read and write FIFOs move the data safely between
// the two clock domains and smooth the bursty memory access; the Gray-code
// pointer scheme is this design's choice. DEPTH must be a power of two.
//
// Timing: a write becomes visible to the reader two to three read-clock
// edges later; freed space becomes visible to the writer likewise. `wlevel`
// and `rlevel` are conservative (they may over-state fullness / emptiness).
module async_fifo #(
  parameter int W     = 34,
  parameter int DEPTH = 64,
  localparam int AB   = $clog2(DEPTH)
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         wen,
  input  logic [W-1:0] wdata,
  output logic         wfull,
  output logic [AB:0]  wlevel,
  input  logic         rclk,
  input  logic         rrst_n,
  input  logic         ren,
  output logic [W-1:0] rdata,
  output logic         rempty,
  output logic [AB:0]  rlevel
);
  logic [W-1:0] mem [DEPTH];
  logic [AB:0] wbin, wgray, rbin, rgray;
  logic [AB:0] wq1, wq2;   // write pointer (Gray) in the read domain
  logic [AB:0] rq1, rq2;   // read pointer (Gray) in the write domain

  function automatic logic [AB:0] bin2gray(input logic [AB:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AB:0] gray2bin(input logic [AB:0] g);
    logic [AB:0] b;
    for (int i = AB; i >= 0; i--) b[i] = (i == AB) ? g[i] : (b[i+1] ^ g[i]);
    return b;
  endfunction

  // write side
  logic [AB:0] rbin_w;
  assign rbin_w = gray2bin(rq2);
  assign wlevel = wbin - rbin_w;
  assign wfull  = (wlevel == (AB+1)'(DEPTH));

  always_ff @(posedge wclk) begin
    if (wen && !wfull) mem[wbin[AB-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rq1 <= '0; rq2 <= '0;
    end else begin
      rq1 <= rgray; rq2 <= rq1;
      if (wen && !wfull) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  // read side
  logic [AB:0] wbin_r;
  assign wbin_r = gray2bin(wq2);
  assign rlevel = wbin_r - rbin;
  assign rempty = (rlevel == '0);
  assign rdata  = mem[rbin[AB-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wq1 <= '0; wq2 <= '0;
    end else begin
      wq1 <= wgray; wq2 <= wq1;
      if (ren && !rempty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  // a write into a full FIFO or a read from an empty one loses data
  a_no_overflow: assert property (@(posedge wclk) disable iff (!wrst_n) !(wen && wfull))
    else $error("async_fifo: write while full");
  a_no_underflow: assert property (@(posedge rclk) disable iff (!rrst_n) !(ren && rempty))
    else $error("async_fifo: read while empty");
endmodule

// frame_buffer: frame/field buffer controller for one channel.
//
// Pixels from the core enter a write FIFO (WRFIFO) and leave through a read
// FIFO (RDFIFO); between them, in the memory clock domain, a write AddressGen
// stores them in one of two external memory chips and a read AddressGen
// fetches the previous picture from the other chip. Reads and writes thus
// never compete for one chip (ping-pong). The chips swap roles at picture
// boundaries:
//   * the writer finishes a picture whose tag says `commit` -> it is pending;
//   * the reader, between pictures, takes a pending picture by swapping chips;
//   * with no pending picture and `repeat_en` set it reads the same picture
//     again (frame repeat, used for frame-rate up-conversion); otherwise it
//     waits;
//   * if a new picture starts while one is still pending, the pending one is
//     overwritten (frame drop).
// A field tagged `weave` is written to every second row from row `parity`,
// so two fields build one frame. `wr_col` / `rd_col` select column order for
// writing / reading; opposite settings transpose the picture.
//
// Following the document: RDFIFO, WRFIFO and AddressGen around an external
// memory bank, core and memory clocks, read and write kept on different chips
// (ping-pong), and hold/discard of pictures for rate conversion and film
// merging. The document draws one AddressGen issuing both read and write
// addresses; here each direction has its own addr_gen instance. The document does not give the SDRAM command protocol: the chip
// ports here are single-word synchronous ports (enable, write, address, data;
// read data one cycle later), and the repeat/drop rules are this design's.
// width/height/order/repeat_en are static configuration and must be stable
// while pictures are in flight.
//
// Timing: input has no back-pressure (live video); `overflow` is sticky and
// reports a lost pixel. Output is a valid/ready stream with `out_sof` on the
// first pixel of every picture read. ev_* are one-cycle pulses in the memory
// clock domain.
module frame_buffer
  import vfc_pkg::*;
#(
  parameter int XB     = 11,
  parameter int YB     = 11,
  parameter int TB     = 3,
  parameter int WDEPTH = 64,
  parameter int RDEPTH = 64,
  localparam int AW    = XB + YB
) (
  // core clock domain
  input  logic          cclk,
  input  logic          crst_n,
  input  logic          in_valid,
  input  pixel_t        in_pix,
  input  tag_t          in_tag,
  output logic          overflow,
  output logic          out_valid,
  input  logic          out_ready,
  output pixel_t        out_pix,
  output logic          out_sof,
  // static configuration
  input  logic [XB:0]   width,
  input  logic [YB:0]   height,
  input  logic          wr_col,
  input  logic          rd_col,
  input  logic          repeat_en,
  // memory clock domain
  input  logic          mclk,
  input  logic          mrst_n,
  output logic [1:0]    mem_en,
  output logic [1:0]    mem_we,
  output logic [1:0][AW-1:0] mem_addr,
  output pixel_t [1:0]  mem_wdata,
  input  pixel_t [1:0]  mem_rdata,
  output logic          ev_swap,
  output logic          ev_repeat,
  output logic          ev_drop
);
  localparam int WFW = $bits(pixel_t) + TAGW;
  localparam int RFW = $bits(pixel_t) + 1;
  localparam int RAB = $clog2(RDEPTH);

  // ---------------- WRFIFO ----------------
  logic           wf_full, wf_empty, wf_pop;
  logic [WFW-1:0] wf_head;
  tag_t           h_tag;
  pixel_t         h_pix;
  assign {h_tag, h_pix} = wf_head;

  async_fifo #(.W(WFW), .DEPTH(WDEPTH)) u_wrfifo (
    .wclk(cclk), .wrst_n(crst_n), .wen(in_valid && !wf_full), .wdata({in_tag, in_pix}),
    .wfull(wf_full), .wlevel(),
    .rclk(mclk), .rrst_n(mrst_n), .ren(wf_pop), .rdata(wf_head), .rempty(wf_empty),
    .rlevel()
  );

  always_ff @(posedge cclk or negedge crst_n)
    if (!crst_n) overflow <= 1'b0;
    else if (in_valid && wf_full) overflow <= 1'b1;

  // ---------------- ping-pong state (memory clock) ----------------
  logic wchip, pending, pic_open, have_pic, commit_end;
  logic sof_started;
  logic swap, rd_start;

  // writer
  logic          wg_start, wg_busy, wg_last, wg_next;
  logic [AW-1:0] wg_addr;
  logic          wr_do;

  addr_gen #(.XB(XB), .YB(YB), .TB(TB)) u_wag (
    .clk(mclk), .rst_n(mrst_n), .start(wg_start), .width, .height, .col_order(wr_col),
    .y_first(h_tag.weave & h_tag.parity), .y_step2(h_tag.weave),
    .next(wg_next), .busy(wg_busy), .addr(wg_addr), .last(wg_last), .x(), .y()
  );

  always_comb begin
    wg_start = 1'b0; wr_do = 1'b0; wf_pop = 1'b0;
    if (!wf_empty) begin
      if (h_tag.sof && !sof_started) wg_start = 1'b1;
      else if (wg_busy) begin wr_do = 1'b1; wf_pop = 1'b1; end
      else wf_pop = 1'b1;   // pixel outside any picture: dropped
    end
  end
  assign wg_next = wr_do;

  // reader
  logic          rg_busy, rg_last, rg_next;
  logic [AW-1:0] rg_addr;
  logic          rd_do, rd_first, rd_v1, rd_sof1, rd_chip1;
  logic [RAB:0]  rf_wlevel;
  logic          rf_full;

  assign swap     = !rg_busy && pending;
  assign rd_start = swap || (!rg_busy && !pending && have_pic && repeat_en);

  addr_gen #(.XB(XB), .YB(YB), .TB(TB)) u_rag (
    .clk(mclk), .rst_n(mrst_n), .start(rd_start), .width, .height, .col_order(rd_col),
    .y_first(1'b0), .y_step2(1'b0),
    .next(rg_next), .busy(rg_busy), .addr(rg_addr), .last(rg_last), .x(), .y()
  );

  // keep room for the read in flight and the synchroniser delay
  assign rd_do   = rg_busy && (rf_wlevel < (RAB+1)'(RDEPTH - 2));
  assign rg_next = rd_do;

  always_ff @(posedge mclk or negedge mrst_n) begin
    if (!mrst_n) begin
      wchip <= 1'b0; pending <= 1'b0; pic_open <= 1'b0; have_pic <= 1'b0;
      commit_end <= 1'b0; sof_started <= 1'b0; rd_first <= 1'b0;
      rd_v1 <= 1'b0; rd_sof1 <= 1'b0; rd_chip1 <= 1'b0;
      ev_swap <= 1'b0; ev_repeat <= 1'b0; ev_drop <= 1'b0;
    end else begin
      ev_swap <= swap; ev_repeat <= rd_start && !swap; ev_drop <= 1'b0;
      if (swap) begin
        wchip <= ~wchip; pending <= 1'b0; have_pic <= 1'b1;
      end
      // writer
      if (wg_start) begin
        sof_started <= 1'b1;
        commit_end <= h_tag.commit;
        if (!pic_open && pending && !swap) begin
          pending <= 1'b0; ev_drop <= 1'b1;
        end
      end
      if (wr_do) begin
        sof_started <= 1'b0;
        if (wg_last) begin
          if (commit_end) begin pending <= 1'b1; pic_open <= 1'b0; end
          else pic_open <= 1'b1;
        end
      end
      // reader
      if (rd_start) rd_first <= 1'b1;
      else if (rd_do) rd_first <= 1'b0;
      rd_v1 <= rd_do; rd_sof1 <= rd_do && rd_first; rd_chip1 <= ~wchip;
    end
  end

  // memory ports: the write chip serves the writer, the other the reader
  always_comb begin
    for (int c = 0; c < 2; c++) begin
      if (1'(c) == wchip) begin
        mem_en[c] = wr_do; mem_we[c] = 1'b1; mem_addr[c] = wg_addr; mem_wdata[c] = h_pix;
      end else begin
        mem_en[c] = rd_do; mem_we[c] = 1'b0; mem_addr[c] = rg_addr; mem_wdata[c] = '0;
      end
    end
  end

  // ---------------- RDFIFO ----------------
  logic [RFW-1:0] rf_head;
  logic           rf_empty;
  async_fifo #(.W(RFW), .DEPTH(RDEPTH)) u_rdfifo (
    .wclk(mclk), .wrst_n(mrst_n), .wen(rd_v1), .wdata({rd_sof1, mem_rdata[rd_chip1]}),
    .wfull(rf_full), .wlevel(rf_wlevel),
    .rclk(cclk), .rrst_n(crst_n), .ren(out_valid && out_ready), .rdata(rf_head),
    .rempty(rf_empty), .rlevel()
  );
  assign out_valid = !rf_empty;
  assign {out_sof, out_pix} = rf_head;

  a_rdfifo_room: assert property (@(posedge mclk) disable iff (!mrst_n) !(rd_v1 && rf_full));
endmodule

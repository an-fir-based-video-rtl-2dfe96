// mem_model: behavioural model of one external frame memory chip, as seen
// through the converter's single-word memory port: a write stores `wdata` at
// `addr` on the rising edge with en & we; a read (en & !we) returns the word
// on `rdata` after the next rising edge. Words never written read as zero.
// Stands in for the external SDRAM chips, which the converter does not
// contain; it counts the accesses it sees.
module mem_model
  import vfc_pkg::*;
#(
  parameter int AW = 22
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  pixel_t        wdata,
  output pixel_t        rdata
);
  pixel_t mem [logic [AW-1:0]];
  int writes = 0, reads = 0;
  initial rdata = '0;
  always @(posedge clk) begin
    if (en && we) begin mem[addr] = wdata; writes++; end
    else if (en) begin rdata <= mem.exists(addr) ? mem[addr] : '0; reads++; end
  end
endmodule

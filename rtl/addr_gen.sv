// addr_gen: picture scan and memory address generator (AddressGen).
//
// It walks the pixel positions of one picture, either line by line (row
// order) or column by column (column order), and maps each position (x, y)
// to a memory word address. The master channel writes a picture in one order
// and reads it in the other, which transposes it for the vertical filter.
// To keep row-order and column-order accesses equally local, the picture is
// stored in square tiles of 2^TB x 2^TB pixels, each tile in consecutive
// words:  addr = { y[YB-1:TB], x[XB-1:TB], y[TB-1:0], x[TB-1:0] }.
// A walk in either order then touches 2^TB consecutive words per tile row or
// column, so the reads and the writes see the same burst structure.
// For a woven field the walk starts at row `y_first` and steps two rows.
//
// The document states that AddressGen produces the transposing access
// addresses with an interleaved data distribution that balances the memory's
// input and output; the tiled mapping is this design's version of it.
//
// Timing: `start` loads the first position; `addr` is valid while `busy`;
// `next` moves to the following position; `last` flags the final one, and
// `next` on it ends the walk (busy falls in the next cycle).
module addr_gen #(
  parameter int XB = 11,
  parameter int YB = 11,
  parameter int TB = 3,
  localparam int AW = XB + YB
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [XB:0]   width,
  input  logic [YB:0]   height,
  input  logic          col_order,
  input  logic          y_first,
  input  logic          y_step2,
  input  logic          next,
  output logic          busy,
  output logic [AW-1:0] addr,
  output logic          last,
  output logic [XB-1:0] x,
  output logic [YB-1:0] y
);
  logic col, step2, yf;
  logic [YB:0] ynext;
  logic x_last, y_last;

  assign ynext  = {1'b0, y} + (step2 ? (YB+1)'(2) : (YB+1)'(1));
  assign x_last = ({1'b0, x} + 1'b1 >= width);
  assign y_last = (ynext >= height);
  assign last   = x_last && y_last;
  assign addr   = {y[YB-1:TB], x[XB-1:TB], y[TB-1:0], x[TB-1:0]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; x <= '0; y <= '0; col <= 1'b0; step2 <= 1'b0; yf <= 1'b0;
    end else if (start) begin
      busy <= 1'b1; x <= '0; y <= YB'(y_first && y_step2); col <= col_order; step2 <= y_step2;
      yf <= y_first && y_step2;
    end else if (busy && next) begin
      if (last) busy <= 1'b0;
      else if (!col) begin
        if (x_last) begin x <= '0; y <= ynext[YB-1:0]; end
        else x <= x + 1'b1;
      end else begin
        if (y_last) begin y <= YB'(yf); x <= x + 1'b1; end
        else y <= ynext[YB-1:0];
      end
    end
  end
endmodule

// x_last_data_ram: per-column state of the X decompressor (X_last_data_BRAM).
//
// One 15-bit word per source column: bits [14:10] hold the number of the next
// breakpoint word to check in that column's X table (array_last_breaks_x),
// bits [9:0] the last target X produced in that column (array_last_targets_x).
// 1024 x 15 bits, half of an 18-kbit block RAM as in the published design. One
// synchronous read port (data one clock after the address) and one write
// port; the X decompressor reads a column once per row and writes it back only
// when a breakpoint is reached. No reset: the words of a column are written
// on row 0 before they are first read.
module x_last_data_ram
  import clutr_pkg::*;
#(
  parameter int unsigned DEPTH  = IMG_W_DEF,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  last_data_t        wdata,
  input  logic [ADDR_W-1:0] raddr,
  output last_data_t        rdata
);

  last_data_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule

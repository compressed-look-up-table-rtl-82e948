// forwt_y_rom: compressed forward-mapping table of Y coordinates (ForwT_y).
//
// Holds BP_Y 18-bit breakpoint words per image row, row r at addresses
// r*BP_Y .. r*BP_Y+BP_Y-1 (1024x768: 768*24 = 18432 words, the capacity of 12
// 18-kbit block RAMs). In operation the table is read-only. Two synchronous
// read ports: port A serves the row-start preload of the Y decompressor,
// port B the fetch of the following breakpoints; read data appears one clock
// after the address. The write port only loads the table contents (the
// published design programs the block RAMs at configuration time); the second read
// port is a choice of this design so that breakpoints in adjacent columns and
// back-to-back rows need no stall. Addresses past the end read as zero.
module forwt_y_rom
  import clutr_pkg::*;
#(
  parameter int unsigned DEPTH  = IMG_H_DEF * BP_Y_DEF,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic                clk,
  // table load port
  input  logic                load_we,
  input  logic [ADDR_W-1:0]   load_addr,
  input  logic [ENTRY_W-1:0]  load_data,
  // read ports
  input  logic [ADDR_W-1:0]   addr_a,
  output logic [ENTRY_W-1:0]  rdata_a,
  input  logic [ADDR_W-1:0]   addr_b,
  output logic [ENTRY_W-1:0]  rdata_b
);

  logic [ENTRY_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (load_we && 32'(load_addr) < DEPTH) mem[load_addr] <= load_data;
  end

  always_ff @(posedge clk) begin
    rdata_a <= (32'(addr_a) < DEPTH) ? mem[addr_a] : '0;
    rdata_b <= (32'(addr_b) < DEPTH) ? mem[addr_b] : '0;
  end

endmodule

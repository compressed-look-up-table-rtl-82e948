// forwt_x_rom: compressed forward-mapping table of X coordinates (ForwT_x).
//
// Holds BP_X 18-bit breakpoint words per image column, column c at addresses
// c*BP_X .. c*BP_X+BP_X-1 (1024x768: 1024*20 = 20480 words, the capacity of 10
// 18-kbit block RAMs). One synchronous read port, read data one clock after
// the address, as the published design's single-port ROM. The write port only loads
// the table contents, standing in for configuration-time initialisation.
// Addresses past the end read as zero.
module forwt_x_rom
  import clutr_pkg::*;
#(
  parameter int unsigned DEPTH  = IMG_W_DEF * BP_X_DEF,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic                clk,
  // table load port
  input  logic                load_we,
  input  logic [ADDR_W-1:0]   load_addr,
  input  logic [ENTRY_W-1:0]  load_data,
  // read port
  input  logic [ADDR_W-1:0]   addr,
  output logic [ENTRY_W-1:0]  rdata
);

  logic [ENTRY_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (load_we && 32'(load_addr) < DEPTH) mem[load_addr] <= load_data;
  end

  always_ff @(posedge clk) begin
    rdata <= (32'(addr) < DEPTH) ? mem[addr] : '0;
  end

endmodule

// clutr_pkg: types and constants shared by the compressed look-up-table
// rectification (CLUT-R) hardware.
//
// Every compressed-table word is 18 bits wide: three behaviour bits on top of a
// 15-bit location field (the split and the bit positions follow the table
// coding of the breakpoint concatenation step). Bit 17 flags a double-targeted
// source pixel (Y table only), bit 16 a -1 step, bit 15 a +1 step. In the
// first word of a row (Y table) or column (X table), the initialisation word,
// the location field carries the initial target coordinate instead of a
// position. Target coordinates are 10 bits, locations are compared on 11 bits
// so that the dummy breakpoint placed one past the image edge (1024 or 768)
// can be represented. The X last-data word packs the next breakpoint number in
// bits [14:10] and the last target X in bits [9:0].
package clutr_pkg;

  localparam int unsigned ENTRY_W   = 18;  // compressed table word
  localparam int unsigned LOC_W     = 15;  // location / init value field
  localparam int unsigned LOC_CMP_W = 11;  // bits of the location compared with a coordinate
  localparam int unsigned TGT_W     = 10;  // target coordinate width (Y_rec, X_rec)
  localparam int unsigned CRD_W     = 10;  // source coordinate width (Y_ori, X_ori)
  localparam int unsigned BRK_W     = 5;   // breakpoint number inside a row/column

  // Default sizes of the main configuration.
  localparam int unsigned IMG_W_DEF = 1024;
  localparam int unsigned IMG_H_DEF = 768;
  localparam int unsigned BP_Y_DEF  = 24;  // table words per row of the Y table
  localparam int unsigned BP_X_DEF  = 20;  // table words per column of the X table

  // Input-to-output latency of one rectification module, in clock cycles.
  localparam int unsigned LATENCY   = 6;

  typedef struct packed {
    logic             dt;   // [17] double target
    logic             dec;  // [16] -1 step
    logic             inc;  // [15] +1 step
    logic [LOC_W-1:0] loc;  // [14:0] column/row number, or initial target
  } bp_entry_t;

  typedef struct packed {
    logic [BRK_W-1:0] brk;  // [14:10] index of the next breakpoint word to check
    logic [TGT_W-1:0] tgt;  // [9:0]   last target X of this column
  } last_data_t;

  // Apply the behaviour of a breakpoint word to the current target.
  function automatic logic [TGT_W-1:0] step_target(input logic [TGT_W-1:0] cur,
                                                   input logic             dec,
                                                   input logic             inc);
    if (dec)      return cur - 1'b1;
    else if (inc) return cur + 1'b1;
    else          return cur;
  endfunction

endpackage

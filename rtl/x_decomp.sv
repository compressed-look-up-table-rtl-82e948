// x_decomp: real-time decompression of the X table (target column of each pixel).
//
// The X table is coded column by column, but pixels arrive row by row, so the
// decompressor keeps, for every source column, the state it reached on the row
// above: the number of the next breakpoint word to check and the last target
// X. That state lives in the X last-data RAM (bits [14:10] and [9:0]).
//
// How it works, one pixel per clock, three stages:
//   stage 0  the pixel's X_ori addresses the last-data RAM directly (the
//            RAM's own address register is this stage, so last_raddr is
//            x_ori unregistered);
//   stage 1  the table address X_ori*BP_X + k is formed, with k = 0 on source
//            row 0 (the column's initialisation word) and otherwise the stored
//            breakpoint number, and sent to the X table;
//   stage 2  on row 0 the target is loaded from the initialisation word and
//            the state {1, target} is written back. On other rows the word's
//            location (bits [10:0]) is compared with Y_ori: on a match the
//            stored target is stepped by -1 (bit 16) or +1 (bit 15) and the
//            state {k+1, new target} is written back; otherwise the stored
//            target is used unchanged and nothing is written.
// Four output registers then bring the result to the module latency.
//
// Interface. in_valid qualifies y_ori/x_ori; out_valid and x_rec appear exactly
// LATENCY = 6 clocks later. Rows must be at least 4 pixels wide so that a
// column's state is written back before it is read for the next row.
//
// Follows the published design: the per-column last-break/last-target memory updated
// only when a breakpoint is reached, the multiply-by-BP_X column base, the
// 18-bit word coding and the -1/+1/load multiplexer in front of X_rect. This
// design's own choices: equality compare of the row location (the block
// diagram's comparators are drawn as a<b, their use is not described), the
// stage count and the padding to six clocks.
module x_decomp
  import clutr_pkg::*;
#(
  parameter int unsigned IMG_W   = IMG_W_DEF,
  parameter int unsigned BP_X    = BP_X_DEF,
  parameter int unsigned ROM_AW  = $clog2(IMG_W * BP_X),
  parameter int unsigned LAST_AW = $clog2(IMG_W)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [CRD_W-1:0]    y_ori,
  input  logic [CRD_W-1:0]    x_ori,
  // ForwT_x read port (synchronous, 1-clock read latency)
  output logic [ROM_AW-1:0]   rom_addr,
  input  bp_entry_t           rom_rdata,
  // X last-data RAM (synchronous read, 1-clock latency)
  output logic [LAST_AW-1:0]  last_raddr,
  input  last_data_t          last_rdata,
  output logic                last_we,
  output logic [LAST_AW-1:0]  last_waddr,
  output last_data_t          last_wdata,
  // result
  output logic                out_valid,
  output logic [TGT_W-1:0]    x_rec
);

  localparam int unsigned PAD = LATENCY - 2;  // stage 2 is two clocks after the input

  // stage registers
  logic             s1_valid, s2_valid;
  logic [CRD_W-1:0] s1_x, s1_y, s2_x, s2_y;
  logic [BRK_W-1:0] s2_k;
  logic [TGT_W-1:0] s2_tgt;

  assign last_raddr = LAST_AW'(x_ori);

  // stage 1: table address
  logic [BRK_W-1:0] s1_k;
  assign s1_k     = (s1_y == '0) ? '0 : last_rdata.brk;
  assign rom_addr = ROM_AW'(s1_x) * ROM_AW'(BP_X) + ROM_AW'(s1_k);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s2_valid <= 1'b0;
    end else begin
      s1_valid <= in_valid;
      s2_valid <= s1_valid;
    end
  end

  always_ff @(posedge clk) begin
    s1_x   <= x_ori;
    s1_y   <= y_ori;
    s2_x   <= s1_x;
    s2_y   <= s1_y;
    s2_k   <= s1_k;
    s2_tgt <= last_rdata.tgt;
  end

  // stage 2: compare and update
  logic             s2_init, s2_hit;
  logic [TGT_W-1:0] x_new;
  assign s2_init = (s2_y == '0);
  assign s2_hit  = !s2_init && (LOC_CMP_W'(s2_y) == rom_rdata.loc[LOC_CMP_W-1:0]);

  always_comb begin
    if (s2_init)     x_new = rom_rdata.loc[TGT_W-1:0];
    else if (s2_hit) x_new = step_target(s2_tgt, rom_rdata.dec, rom_rdata.inc);
    else             x_new = s2_tgt;
  end

  assign last_we    = s2_valid && (s2_init || s2_hit);
  assign last_waddr = LAST_AW'(s2_x);
  assign last_wdata = '{brk: s2_k + 1'b1, tgt: x_new};

  // output pipeline: X_rect register followed by padding stages
  logic [PAD-1:0]   v_q;
  logic [TGT_W-1:0] x_q [PAD];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q <= '0;
    else        v_q <= {v_q[PAD-2:0], s2_valid};
  end

  always_ff @(posedge clk) begin
    x_q[0] <= x_new;
    for (int i = 1; i < PAD; i++) x_q[i] <= x_q[i-1];
  end

  assign out_valid = v_q[PAD-1];
  assign x_rec     = x_q[PAD-1];

endmodule

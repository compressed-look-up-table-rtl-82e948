// y_decomp: real-time decompression of the Y table (target row of each pixel).
//
// Pixels arrive row by row, one per clock at most, as (Y_ori, X_ori). The Y
// table codes, for every source row, the initial target row followed by the
// breakpoints: the columns where the target row steps by -1 or +1 or where a
// double-targeted (DT) source pixel sits, closed by a dummy breakpoint one past
// the right edge. Word r*BP_Y+0 is the initialisation word.
//
// How it works. When a pixel with X_ori == 0 enters, a preload sequence reads
// the row's words 0, 1 and 2 through ROM port A into shadow registers (three
// reads, one per clock). The pixel itself travels down a 4-stage delay line to
// the decode stage. There, the first pixel of a row loads the Y_rect register
// from the initialisation word and takes over the shadow words as the "current"
// (next breakpoint to meet) and "following" breakpoint. Every later pixel
// compares X_ori with the current breakpoint's location (bits [10:0]); on a
// match Y_rect is stepped by the behaviour bits, DT is raised if bit 17 is
// set, the following word becomes current and the word after it is fetched
// through ROM port B. A fetched word arrives one clock later and is forwarded
// straight into the current-breakpoint register if the very next pixel also
// hits, so breakpoints in adjacent columns and rows sent back to back are
// decoded at one pixel per clock. A pixel with X_ori == 0 always restarts the
// row (as published: the hardware resets itself every time X_ori is zero).
//
// Interface. in_valid qualifies y_ori/x_ori. out_valid, y_rec and dt appear
// exactly LATENCY = 6 clocks after the pixel entered. dt is high for the
// pixel at a DT breakpoint (and for X_ori == 0 if the initialisation word has
// bit 17 set). Rows must be at least 5 pixels wide so that one row-start
// preload is finished before the next starts.
//
// Follows the published design: the 18-bit word coding, the multiply-by-BP_Y row
// base, the breakpoint counter, the equality compare on [10:0], the Y_rect
// register updated through a -1/+1/hold/load multiplexer and the DT flag. This
// design's own choices: the two-word lookahead with a second ROM read port,
// the exact stage count, the init word being selected by X_ori == 0 whatever
// its behaviour bits, and resetting the output valid only.
module y_decomp
  import clutr_pkg::*;
#(
  parameter int unsigned IMG_H    = IMG_H_DEF,
  parameter int unsigned BP_Y     = BP_Y_DEF,
  parameter int unsigned ROM_AW   = $clog2(IMG_H * BP_Y)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [CRD_W-1:0]    y_ori,
  input  logic [CRD_W-1:0]    x_ori,
  // ForwT_y read ports (synchronous, 1-clock read latency)
  output logic [ROM_AW-1:0]   rom_addr_a,
  input  bp_entry_t           rom_rdata_a,
  output logic [ROM_AW-1:0]   rom_addr_b,
  input  bp_entry_t           rom_rdata_b,
  // result
  output logic                out_valid,
  output logic [TGT_W-1:0]    y_rec,
  output logic                dt
);

  localparam int unsigned DSTAGES = 4;  // input to decode stage

  // ---------------------------------------------------------------- preload
  logic [1:0]        pre_step;       // 0 idle, 1/2: read word 1/2 next
  logic [ROM_AW-1:0] pre_base;       // row base of the row being preloaded
  logic [ROM_AW-1:0] in_base;
  logic [2:0]        cap_q;          // which shadow register rom_rdata_a fills
  bp_entry_t         sh_init, sh_cur, sh_nxt;
  logic [ROM_AW-1:0] sh_base;

  wire row_start_in = in_valid && (x_ori == '0);

  assign in_base = ROM_AW'(y_ori) * ROM_AW'(BP_Y);

  always_comb begin
    if (row_start_in)       rom_addr_a = in_base;
    else if (pre_step == 1) rom_addr_a = pre_base + ROM_AW'(1);
    else                    rom_addr_a = pre_base + ROM_AW'(2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre_step <= '0;
      cap_q    <= '0;
    end else begin
      cap_q <= {(pre_step == 2), (pre_step == 1), row_start_in};
      if (row_start_in)       pre_step <= 2'd1;
      else if (pre_step == 1) pre_step <= 2'd2;
      else                    pre_step <= 2'd0;
    end
  end

  always_ff @(posedge clk) begin
    if (row_start_in) pre_base <= in_base;
    if (cap_q[0]) begin
      sh_init <= rom_rdata_a;
      sh_base <= pre_base;
    end
    if (cap_q[1]) sh_cur <= rom_rdata_a;
    if (cap_q[2]) sh_nxt <= rom_rdata_a;
  end

  // ------------------------------------------------------ pixel delay line
  logic [DSTAGES-1:0] d_valid;
  logic [CRD_W-1:0]   d_x [DSTAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) d_valid <= '0;
    else        d_valid <= {d_valid[DSTAGES-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    d_x[0] <= x_ori;
    for (int i = 1; i < DSTAGES; i++) d_x[i] <= d_x[i-1];
  end

  wire              c_valid = d_valid[DSTAGES-1];
  wire [CRD_W-1:0]  c_x     = d_x[DSTAGES-1];

  // ----------------------------------------------------------- decode stage
  bp_entry_t         cur, nxt;       // next breakpoint to meet, and the one after
  logic              nxt_from_rom;   // following word is on rom_rdata_b this clock
  logic [BRK_W-1:0]  idx;            // word number of cur within the row
  logic [ROM_AW-1:0] row_base;
  logic [TGT_W-1:0]  y_rect;
  logic              dt_q, v_q;

  wire       c_row_start = c_valid && (c_x == '0);
  wire       c_hit       = c_valid && !c_row_start &&
                           (LOC_CMP_W'(c_x) == cur.loc[LOC_CMP_W-1:0]);
  bp_entry_t nxt_now;
  assign nxt_now    = nxt_from_rom ? rom_rdata_b : nxt;
  assign rom_addr_b = row_base + ROM_AW'(idx) + ROM_AW'(2);

  always_ff @(posedge clk) begin
    if (c_row_start) begin
      y_rect   <= sh_init.loc[TGT_W-1:0];
      cur      <= sh_cur;
      nxt      <= sh_nxt;
      idx      <= BRK_W'(1);
      row_base <= sh_base;
    end else if (c_hit) begin
      y_rect   <= step_target(y_rect, cur.dec, cur.inc);
      cur      <= nxt_now;
      idx      <= idx + 1'b1;
    end else if (nxt_from_rom) begin
      nxt      <= rom_rdata_b;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nxt_from_rom <= 1'b0;
      dt_q         <= 1'b0;
      v_q          <= 1'b0;
    end else begin
      nxt_from_rom <= c_hit;
      v_q          <= c_valid;
      dt_q         <= c_row_start ? sh_init.dt : (c_hit && cur.dt);
    end
  end

  // ----------------------------------------------------------- output stage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      dt        <= 1'b0;
    end else begin
      out_valid <= v_q;
      dt        <= dt_q;
    end
  end

  always_ff @(posedge clk) y_rec <= y_rect;

endmodule

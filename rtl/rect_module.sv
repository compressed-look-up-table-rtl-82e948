// rect_module: one CLUT-R rectification module (one camera).
//
// For every source pixel Ori(Y_ori, X_ori) delivered by the camera interface,
// in raster order at up to one pixel per clock, the module produces the
// integer target coordinates (Y_rec, X_rec) of the pixel in the rectified
// image and the DT flag that marks a double-targeted source pixel (the pixel
// must also be written one row below its target to fill a void). The pixel
// value leaves with its coordinates, 6 clocks after it entered, with no
// stall: rows may follow each other without blanking.
//
// Inside: the Y decompressor with its ForwT_y table (BP_Y words per row), the
// X decompressor with its ForwT_x table (BP_X words per column) and the
// per-column X last-data RAM, and the 6-stage pixel delay, as in the
// module-level block diagram.
//
// Table loading. tbl_we writes tbl_data into the Y table (tbl_sel = 0) or the
// X table (tbl_sel = 1) at tbl_addr. This port stands in for the
// configuration-time initialisation of the block RAMs; load the tables
// before streaming pixels. The tables are produced off-line from the camera
// calibration. An assertion checks that the Y, X and pixel paths deliver their
// valid bits on the same clock; its 'disable iff' is the only synchronous use
// of rst_n, which is otherwise an asynchronous reset.
module rect_module
  import clutr_pkg::*;
#(
  parameter int unsigned IMG_W  = IMG_W_DEF,
  parameter int unsigned IMG_H  = IMG_H_DEF,
  parameter int unsigned BP_Y   = BP_Y_DEF,
  parameter int unsigned BP_X   = BP_X_DEF,
  parameter int unsigned PIX_W  = 8,
  parameter int unsigned TBL_AW = $clog2((IMG_H * BP_Y > IMG_W * BP_X) ? IMG_H * BP_Y : IMG_W * BP_X)
) (
  input  logic               clk,
  input  logic               rst_n,
  // table load port
  input  logic               tbl_we,
  input  logic               tbl_sel,
  input  logic [TBL_AW-1:0]  tbl_addr,
  input  logic [ENTRY_W-1:0] tbl_data,
  // source pixel stream from the camera interface
  input  logic               in_valid,
  input  logic [CRD_W-1:0]   y_ori,
  input  logic [CRD_W-1:0]   x_ori,
  input  logic [PIX_W-1:0]   ori_pix,
  // rectified stream towards the line-buffer controller
  output logic               out_valid,
  output logic [TGT_W-1:0]   y_rec,
  output logic [TGT_W-1:0]   x_rec,
  output logic [PIX_W-1:0]   rec_pix,
  output logic               dt
);

  localparam int unsigned YDEPTH  = IMG_H * BP_Y;
  localparam int unsigned XDEPTH  = IMG_W * BP_X;
  localparam int unsigned YAW     = $clog2(YDEPTH);
  localparam int unsigned XAW     = $clog2(XDEPTH);
  localparam int unsigned LAST_AW = $clog2(IMG_W);

  // ForwT_y
  logic [YAW-1:0] y_addr_a, y_addr_b;
  bp_entry_t      y_rdata_a, y_rdata_b;

  forwt_y_rom #(.DEPTH(YDEPTH), .ADDR_W(YAW)) u_forwt_y (
    .clk       (clk),
    .load_we   (tbl_we && !tbl_sel),
    .load_addr (YAW'(tbl_addr)),
    .load_data (tbl_data),
    .addr_a    (y_addr_a),
    .rdata_a   (y_rdata_a),
    .addr_b    (y_addr_b),
    .rdata_b   (y_rdata_b)
  );

  // ForwT_x
  logic [XAW-1:0] x_addr;
  bp_entry_t      x_rdata;

  forwt_x_rom #(.DEPTH(XDEPTH), .ADDR_W(XAW)) u_forwt_x (
    .clk       (clk),
    .load_we   (tbl_we && tbl_sel),
    .load_addr (XAW'(tbl_addr)),
    .load_data (tbl_data),
    .addr      (x_addr),
    .rdata     (x_rdata)
  );

  // X last-data RAM
  logic [LAST_AW-1:0] last_raddr, last_waddr;
  last_data_t         last_rdata, last_wdata;
  logic               last_we;

  x_last_data_ram #(.DEPTH(IMG_W), .ADDR_W(LAST_AW)) u_x_last (
    .clk   (clk),
    .we    (last_we),
    .waddr (last_waddr),
    .wdata (last_wdata),
    .raddr (last_raddr),
    .rdata (last_rdata)
  );

  // decompressors
  logic y_valid, x_valid, p_valid;

  y_decomp #(.IMG_H(IMG_H), .BP_Y(BP_Y), .ROM_AW(YAW)) u_y_decomp (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_valid    (in_valid),
    .y_ori       (y_ori),
    .x_ori       (x_ori),
    .rom_addr_a  (y_addr_a),
    .rom_rdata_a (y_rdata_a),
    .rom_addr_b  (y_addr_b),
    .rom_rdata_b (y_rdata_b),
    .out_valid   (y_valid),
    .y_rec       (y_rec),
    .dt          (dt)
  );

  x_decomp #(.IMG_W(IMG_W), .BP_X(BP_X), .ROM_AW(XAW), .LAST_AW(LAST_AW)) u_x_decomp (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .y_ori      (y_ori),
    .x_ori      (x_ori),
    .rom_addr   (x_addr),
    .rom_rdata  (x_rdata),
    .last_raddr (last_raddr),
    .last_rdata (last_rdata),
    .last_we    (last_we),
    .last_waddr (last_waddr),
    .last_wdata (last_wdata),
    .out_valid  (x_valid),
    .x_rec      (x_rec)
  );

  pixel_delay #(.WIDTH(PIX_W), .DEPTH(LATENCY)) u_pixel_delay (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_data   (ori_pix),
    .out_valid (p_valid),
    .out_data  (rec_pix)
  );

  assign out_valid = p_valid;

  // The three paths are the same length; their valid bits must agree.
  a_valid_aligned: assert property (@(posedge clk) disable iff (!rst_n)
                                    (y_valid == p_valid) && (x_valid == p_valid));

endmodule

// clutr_stereo_top: rectification front end of a stereo disparity system.
//
// Two independent CLUT-R rectification modules, one per camera, each placed
// between its camera interface and the line-buffer (BRAM) controller of the
// stereo-matching hardware. Each camera side has its own table load port,
// source pixel stream in and rectified stream out; both run on one clock,
// which assumes the two cameras are synchronised (common clock), as the
// published design requires for operation without external memory. The camera
// interfaces, the line-buffer controllers and the stereo matcher are outside
// this design: their signals are the ports below. Latency is 6 clocks per
// side, throughput one pixel per clock per side.
module clutr_stereo_top
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
  // table load ports, index 0 = left camera, 1 = right camera
  input  logic [1:0]         tbl_we,
  input  logic [1:0]         tbl_sel,
  input  logic [TBL_AW-1:0]  tbl_addr [2],
  input  logic [ENTRY_W-1:0] tbl_data [2],
  // source pixel streams from the camera interfaces
  input  logic [1:0]         in_valid,
  input  logic [CRD_W-1:0]   y_ori    [2],
  input  logic [CRD_W-1:0]   x_ori    [2],
  input  logic [PIX_W-1:0]   ori_pix  [2],
  // rectified streams towards the line-buffer controllers
  output logic [1:0]         out_valid,
  output logic [TGT_W-1:0]   y_rec    [2],
  output logic [TGT_W-1:0]   x_rec    [2],
  output logic [PIX_W-1:0]   rec_pix  [2],
  output logic [1:0]         dt
);

  for (genvar cam = 0; cam < 2; cam++) begin : g_cam
    rect_module #(
      .IMG_W (IMG_W), .IMG_H (IMG_H), .BP_Y (BP_Y), .BP_X (BP_X),
      .PIX_W (PIX_W), .TBL_AW(TBL_AW)
    ) u_rect (
      .clk       (clk),
      .rst_n     (rst_n),
      .tbl_we    (tbl_we[cam]),
      .tbl_sel   (tbl_sel[cam]),
      .tbl_addr  (tbl_addr[cam]),
      .tbl_data  (tbl_data[cam]),
      .in_valid  (in_valid[cam]),
      .y_ori     (y_ori[cam]),
      .x_ori     (x_ori[cam]),
      .ori_pix   (ori_pix[cam]),
      .out_valid (out_valid[cam]),
      .y_rec     (y_rec[cam]),
      .x_rec     (x_rec[cam]),
      .rec_pix   (rec_pix[cam]),
      .dt        (dt[cam])
    );
  end

endmodule

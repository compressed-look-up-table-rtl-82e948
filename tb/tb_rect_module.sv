// tb_rect_module: self-checking test of one rectification module.
//
// Uses a reduced table geometry (12 Y words per row, 10 X words per column)
// on a 40x30 image with dense breakpoints, so that many rows and columns use
// every table word. Tables are loaded through the table port; two frames are
// streamed, back to back and then with random idle clocks. Every pixel's
// Y_rec, X_rec, DT and value are checked against the uncompressed maps, with
// the result due exactly 6 clocks after the pixel.
module tb_rect_module;
  import clutr_pkg::*;
  import clutr_tb_pkg::*;

  localparam int unsigned W = 40, H = 30, BPY = 12, BPX = 10;
  localparam int unsigned PIX_W = 10, TBL_AW = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               tbl_we = 0, tbl_sel = 0;
  logic [TBL_AW-1:0]  tbl_addr = '0;
  logic [ENTRY_W-1:0] tbl_data = '0;
  logic               in_valid = 0;
  logic [CRD_W-1:0]   y_ori = '0, x_ori = '0;
  logic [PIX_W-1:0]   ori_pix = '0;
  logic               out_valid, dt;
  logic [TGT_W-1:0]   y_rec, x_rec;
  logic [PIX_W-1:0]   rec_pix;

  rect_module #(.IMG_W(W), .IMG_H(H), .BP_Y(BPY), .BP_X(BPX),
                .PIX_W(PIX_W), .TBL_AW(TBL_AW)) dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  clut_model m;
  typedef struct { int due; int y; int x; int pix; } exp_t;
  exp_t q[$];

  task automatic step(bit v, int y, int x);
    int pix;
    @(negedge clk);
    cycle++;
    if (q.size() > 0 && q[0].due == cycle) begin
      exp_t e;
      int i;
      e = q.pop_front();
      i = e.y * int'(W) + e.x;
      checks++;
      if (!out_valid || y_rec != TGT_W'(m.ymap[i]) || x_rec != TGT_W'(m.xmap[i]) ||
          dt != m.dtmap[i][0] || rec_pix != PIX_W'(e.pix)) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH (%0d,%0d): v=%0b y=%0d/%0d x=%0d/%0d dt=%0b/%0d pix=%0d/%0d",
                   e.y, e.x, out_valid, y_rec, m.ymap[i], x_rec, m.xmap[i], dt, m.dtmap[i],
                   rec_pix, e.pix);
      end
    end else if (out_valid) begin
      failures++;
      $display("unexpected out_valid at cycle %0d", cycle);
    end
    pix = int'($urandom_range((1 << PIX_W) - 1));
    in_valid = v; y_ori = CRD_W'(y); x_ori = CRD_W'(x); ori_pix = PIX_W'(pix);
    if (v) q.push_back('{due: cycle + 6, y: y, x: x, pix: pix});
  endtask

  initial begin
    m = new(W, H, BPY, BPX);
    m.generate_maps(350, 350, 300);
    repeat (3) @(negedge clk);
    for (int i = 0; i < int'(H * BPY); i++) begin
      @(negedge clk); tbl_we = 1; tbl_sel = 0; tbl_addr = TBL_AW'(i); tbl_data = ENTRY_W'(m.ytab[i]);
    end
    for (int i = 0; i < int'(W * BPX); i++) begin
      @(negedge clk); tbl_we = 1; tbl_sel = 1; tbl_addr = TBL_AW'(i); tbl_data = ENTRY_W'(m.xtab[i]);
    end
    @(negedge clk); tbl_we = 0;
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < int'(H); y++)
        for (int x = 0; x < int'(W); x++) begin
          if (f == 1 && $urandom_range(4) == 0) step(0, 0, 0);
          step(1, y, x);
        end
    repeat (10) step(0, 0, 0);
    if (q.size() != 0) begin failures++; $display("%0d outputs missing", q.size()); end
    if (m.n_y_full == 0 || m.n_x_full == 0 || m.n_y_adjacent == 0 || m.n_x_adjacent == 0) begin
      failures++; $display("tables lack full rows/columns or adjacent breakpoints");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

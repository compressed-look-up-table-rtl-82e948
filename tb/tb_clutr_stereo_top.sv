// tb_clutr_stereo_top: end-to-end test of the stereo rectification front end.
//
// Each camera side gets its own random mapping, coded into Y and X tables
// with the default table geometry (24 words per row, 20 per column) and
// loaded through its table port. Two frames of a 64x48 image are then
// streamed into both sides at once, as from two synchronised cameras: the
// first frame back to back at one pixel per clock, the second with random
// idle clocks. For every pixel the testbench checks Y_rec, X_rec, DT and the
// pixel value against the uncompressed maps, and that the result leaves
// exactly 6 clocks after the pixel entered.
//
// It counts how often each mechanism of the decompressors was exercised and
// fails if one never was: Y steps -1/+1, DT-only and DT-with-step
// breakpoints, DT on the first pixel of a row, breakpoints in adjacent
// columns, rows using every table word, X steps -1/+1, adjacent X
// breakpoints, full X columns, back-to-back rows and idle clocks.
module tb_clutr_stereo_top;
  import clutr_pkg::*;
  import clutr_tb_pkg::*;

  localparam int unsigned W = 64, H = 48;
  localparam int unsigned BPY = BP_Y_DEF, BPX = BP_X_DEF;
  localparam int unsigned PIX_W = 8, TBL_AW = 16;
  localparam int unsigned P_Y = 300, P_X = 300, P_DT = 300;
  localparam int unsigned FRAMES = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0]         tbl_we = '0, tbl_sel = '0;
  logic [TBL_AW-1:0]  tbl_addr [2];
  logic [ENTRY_W-1:0] tbl_data [2];
  logic [1:0]         in_valid = '0;
  logic [CRD_W-1:0]   y_ori [2], x_ori [2];
  logic [PIX_W-1:0]   ori_pix [2];
  logic [1:0]         out_valid, dt;
  logic [TGT_W-1:0]   y_rec [2], x_rec [2];
  logic [PIX_W-1:0]   rec_pix [2];

  clutr_stereo_top #(.IMG_W(W), .IMG_H(H), .BP_Y(BPY), .BP_X(BPX),
                     .PIX_W(PIX_W), .TBL_AW(TBL_AW)) dut (
    .clk(clk), .rst_n(rst_n),
    .tbl_we(tbl_we), .tbl_sel(tbl_sel), .tbl_addr(tbl_addr), .tbl_data(tbl_data),
    .in_valid(in_valid), .y_ori(y_ori), .x_ori(x_ori), .ori_pix(ori_pix),
    .out_valid(out_valid), .y_rec(y_rec), .x_rec(x_rec), .rec_pix(rec_pix), .dt(dt));

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_idle = 0, n_b2b_rows = 0, n_dt_out = 0;
  clut_model m [2];
  typedef struct { int due; int y; int x; int pix0; int pix1; } exp_t;
  exp_t q[$];

  function automatic int pix_of(int cam, int y, int x);
    return (y * 7 + x * 13 + cam * 101) & ((1 << PIX_W) - 1);
  endfunction

  // One clock: on the falling edge, check the result that is due, then drive
  // the next pixel (the same coordinates into both sides).
  task automatic step(bit v, int y, int x);
    @(negedge clk);
    cycle++;
    if (q.size() > 0 && q[0].due == cycle) begin
      exp_t e;
      e = q.pop_front();
      for (int c = 0; c < 2; c++) begin
        int i;
        i = e.y * int'(W) + e.x;
        checks++;
        if (!out_valid[c] || y_rec[c] != TGT_W'(m[c].ymap[i]) || x_rec[c] != TGT_W'(m[c].xmap[i]) ||
            dt[c] != m[c].dtmap[i][0] || rec_pix[c] != PIX_W'(c == 0 ? e.pix0 : e.pix1)) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH cam%0d (%0d,%0d): v=%0b y=%0d/%0d x=%0d/%0d dt=%0b/%0d pix=%0d",
                     c, e.y, e.x, out_valid[c], y_rec[c], m[c].ymap[i], x_rec[c], m[c].xmap[i],
                     dt[c], m[c].dtmap[i], rec_pix[c]);
        end
        if (dt[c]) n_dt_out++;
      end
    end else if (out_valid != 2'b00) begin
      failures++;
      $display("unexpected out_valid at cycle %0d", cycle);
    end
    if (!v) n_idle++;
    for (int c = 0; c < 2; c++) begin
      y_ori[c] = CRD_W'(y); x_ori[c] = CRD_W'(x); ori_pix[c] = PIX_W'(pix_of(c, y, x));
    end
    in_valid = {v, v};
    if (v) q.push_back('{due: cycle + 6, y: y, x: x, pix0: pix_of(0, y, x), pix1: pix_of(1, y, x)});
  endtask

  task automatic load_tables();
    for (int c = 0; c < 2; c++) begin
      for (int i = 0; i < int'(H * BPY); i++) begin
        @(negedge clk);
        tbl_we[c] = 1; tbl_sel[c] = 0; tbl_addr[c] = TBL_AW'(i); tbl_data[c] = ENTRY_W'(m[c].ytab[i]);
      end
      for (int i = 0; i < int'(W * BPX); i++) begin
        @(negedge clk);
        tbl_we[c] = 1; tbl_sel[c] = 1; tbl_addr[c] = TBL_AW'(i); tbl_data[c] = ENTRY_W'(m[c].xtab[i]);
      end
      @(negedge clk);
      tbl_we[c] = 0;
    end
  endtask

  task automatic need(string what, int n);
    if (n == 0) begin failures++; $display("mechanism never exercised: %s", what); end
  endtask

  initial begin
    for (int c = 0; c < 2; c++) begin
      tbl_addr[c] = '0; tbl_data[c] = '0; y_ori[c] = '0; x_ori[c] = '0; ori_pix[c] = '0;
      m[c] = new(W, H, BPY, BPX);
      m[c].generate_maps(P_Y, P_X, P_DT);
    end
    repeat (3) @(negedge clk);
    load_tables();
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int f = 0; f < int'(FRAMES); f++)
      for (int y = 0; y < int'(H); y++) begin
        if (y > 0 && (f == 0 || $urandom_range(1) == 0)) n_b2b_rows++;
        else step(0, 0, 0);
        for (int x = 0; x < int'(W); x++) begin
          if (f == 1 && $urandom_range(7) == 0) step(0, 0, 0);
          step(1, y, x);
        end
      end
    repeat (10) step(0, 0, 0);
    if (q.size() != 0) begin failures++; $display("%0d outputs missing", q.size()); end
    for (int c = 0; c < 2; c++) begin
      $display("cam%0d: Y dec=%0d inc=%0d dt_only=%0d dt_step=%0d dt_init=%0d adjacent=%0d full=%0d | X dec=%0d inc=%0d adjacent=%0d full=%0d",
               c, m[c].n_y_dec, m[c].n_y_inc, m[c].n_dt_only, m[c].n_dt_step, m[c].n_dt_init,
               m[c].n_y_adjacent, m[c].n_y_full, m[c].n_x_dec, m[c].n_x_inc, m[c].n_x_adjacent, m[c].n_x_full);
      need("Y -1 step", m[c].n_y_dec);         need("Y +1 step", m[c].n_y_inc);
      need("DT-only breakpoint", m[c].n_dt_only); need("DT with step", m[c].n_dt_step);
      need("DT on first pixel", m[c].n_dt_init);  need("adjacent Y breakpoints", m[c].n_y_adjacent);
      need("full Y row", m[c].n_y_full);          need("X -1 step", m[c].n_x_dec);
      need("X +1 step", m[c].n_x_inc);            need("adjacent X breakpoints", m[c].n_x_adjacent);
      need("full X column", m[c].n_x_full);
    end
    $display("stream: back-to-back rows=%0d idle clocks=%0d dt outputs=%0d", n_b2b_rows, n_idle, n_dt_out);
    need("back-to-back rows", n_b2b_rows);
    need("idle clocks", n_idle);
    need("DT output", n_dt_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

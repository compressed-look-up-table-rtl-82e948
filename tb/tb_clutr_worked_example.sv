// tb_clutr_worked_example: the small worked example of the CLUT-R coding.
//
// A 5-column by 4-row source image. Its integer forward map, after unmapped
// pixels are filled, is
//   target rows     target columns
//   1 1 0 0 0       1 0 3 2 3
//   2 2 1 1 1       0 0 2 2 3
//   2 2 2 2 2       0 0 1 2 3
//   3 3 3 3 3       0 0 1 2 3
// and is coded as (position, step) pairs, with the initial value in the
// first pair and a dummy pair one past the edge:
//   Y rows:    (1,0)(2,-1)(5,0) | (2,0)(2,-1)(5,0) | (2,0)(5,0) | (3,0)(5,0)
//   X columns: (1,0)(1,-1)(4,0) | (0,0)(4,0) | (3,0)(1,-1)(2,-1)(4,0) |
//              (2,0)(4,0) | (3,0)(4,0)
// The tables are built from these pairs in the 18-bit word format (4 words
// per row and per column), loaded into one rectification module, and the
// image is streamed twice at one pixel per clock with rows back to back. Each
// Y_rec and X_rec is checked against the map above, with the 6-clock latency.
module tb_clutr_worked_example;
  import clutr_pkg::*;

  localparam int unsigned W = 5, H = 4, BPY = 4, BPX = 4;
  localparam int unsigned PIX_W = 8, TBL_AW = 5;

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

  // expected maps
  int ymap [H][W] = '{'{1,1,0,0,0}, '{2,2,1,1,1}, '{2,2,2,2,2}, '{3,3,3,3,3}};
  int xmap [H][W] = '{'{1,0,3,2,3}, '{0,0,2,2,3}, '{0,0,1,2,3}, '{0,0,1,2,3}};
  // coded pairs {position or initial value, step}, unused slots = dummy
  int ypair [H][BPY][2] = '{
    '{'{1,0}, '{2,-1}, '{5,0}, '{5,0}},
    '{'{2,0}, '{2,-1}, '{5,0}, '{5,0}},
    '{'{2,0}, '{5,0},  '{5,0}, '{5,0}},
    '{'{3,0}, '{5,0},  '{5,0}, '{5,0}}};
  int xpair [W][BPX][2] = '{
    '{'{1,0}, '{1,-1}, '{4,0},  '{4,0}},
    '{'{0,0}, '{4,0},  '{4,0},  '{4,0}},
    '{'{3,0}, '{1,-1}, '{2,-1}, '{4,0}},
    '{'{2,0}, '{4,0},  '{4,0},  '{4,0}},
    '{'{3,0}, '{4,0},  '{4,0},  '{4,0}}};

  function automatic logic [ENTRY_W-1:0] code(int loc, int stp);
    bp_entry_t e;
    e = '{dt: 1'b0, dec: (stp < 0), inc: (stp > 0), loc: LOC_W'(loc)};
    return e;
  endfunction

  int checks = 0, failures = 0;
  int cycle = 0;
  typedef struct { int due; int y; int x; } exp_t;
  exp_t q[$];

  task automatic step(bit v, int y, int x);
    @(negedge clk);
    cycle++;
    if (q.size() > 0 && q[0].due == cycle) begin
      exp_t e;
      e = q.pop_front();
      checks++;
      if (!out_valid || y_rec != TGT_W'(ymap[e.y][e.x]) || x_rec != TGT_W'(xmap[e.y][e.x]) || dt) begin
        failures++;
        $display("MISMATCH (%0d,%0d): v=%0b y_rec=%0d exp %0d x_rec=%0d exp %0d dt=%0b",
                 e.y, e.x, out_valid, y_rec, ymap[e.y][e.x], x_rec, xmap[e.y][e.x], dt);
      end
    end else if (out_valid) begin
      failures++;
      $display("unexpected out_valid at cycle %0d", cycle);
    end
    in_valid = v; y_ori = CRD_W'(y); x_ori = CRD_W'(x); ori_pix = PIX_W'(y * 16 + x);
    if (v) q.push_back('{due: cycle + 6, y: y, x: x});
  endtask

  initial begin
    repeat (2) @(negedge clk);
    for (int r = 0; r < int'(H); r++)
      for (int k = 0; k < int'(BPY); k++) begin
        @(negedge clk);
        tbl_we = 1; tbl_sel = 0; tbl_addr = TBL_AW'(r * BPY + k);
        tbl_data = code(ypair[r][k][0], ypair[r][k][1]);
      end
    for (int c = 0; c < int'(W); c++)
      for (int k = 0; k < int'(BPX); k++) begin
        @(negedge clk);
        tbl_we = 1; tbl_sel = 1; tbl_addr = TBL_AW'(c * BPX + k);
        tbl_data = code(xpair[c][k][0], xpair[c][k][1]);
      end
    @(negedge clk); tbl_we = 0;
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < int'(H); y++)
        for (int x = 0; x < int'(W); x++) step(1, y, x);
    repeat (10) step(0, 0, 0);
    if (q.size() != 0) begin failures++; $display("%0d outputs missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

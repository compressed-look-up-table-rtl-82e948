// tb_y_decomp: self-checking test of the Y decompressor with its table.
//
// A random 24x10 mapping with many breakpoints (many in adjacent columns, some
// rows using all table words) is coded into the Y table, loaded through the
// table port, and two frames are streamed through, the first back to back,
// the second with random idle clocks. Each output is checked against the
// uncompressed map (Y_rec, DT) and must appear exactly 6 clocks after its
// pixel.
module tb_y_decomp;
  import clutr_pkg::*;
  import clutr_tb_pkg::*;

  localparam int unsigned W = 24, H = 10, BPY = 8;
  localparam int unsigned DEPTH = H * BPY;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             load_we = 0;
  logic [AW-1:0]    load_addr = '0;
  logic [ENTRY_W-1:0] load_data = '0;
  logic [AW-1:0]    addr_a, addr_b;
  bp_entry_t        rdata_a, rdata_b;
  logic             in_valid = 0;
  logic [CRD_W-1:0] y_ori = '0, x_ori = '0;
  logic             out_valid, dt;
  logic [TGT_W-1:0] y_rec;

  forwt_y_rom #(.DEPTH(DEPTH), .ADDR_W(AW)) u_rom (
    .clk(clk), .load_we(load_we), .load_addr(load_addr), .load_data(load_data),
    .addr_a(addr_a), .rdata_a(rdata_a), .addr_b(addr_b), .rdata_b(rdata_b));

  y_decomp #(.IMG_H(H), .BP_Y(BPY), .ROM_AW(AW)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .y_ori(y_ori), .x_ori(x_ori),
    .rom_addr_a(addr_a), .rom_rdata_a(rdata_a), .rom_addr_b(addr_b), .rom_rdata_b(rdata_b),
    .out_valid(out_valid), .y_rec(y_rec), .dt(dt));

  int checks = 0, failures = 0;
  int cycle = 0;
  clut_model m;
  typedef struct { int due; int y; int x; } exp_t;
  exp_t q[$];

  // One clock of the test: on the falling edge, check what is due, then drive
  // the next input. Everything runs in this one thread.
  task automatic step(bit v, int y, int x);
    @(negedge clk);
    cycle++;
    if (q.size() > 0 && q[0].due == cycle) begin
      exp_t e;
      e = q.pop_front();
      checks++;
      if (!out_valid || y_rec != TGT_W'(m.ymap[e.y*W + e.x]) || dt != m.dtmap[e.y*W + e.x][0]) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH (%0d,%0d): valid=%0b y_rec=%0d exp %0d dt=%0b exp %0d",
                   e.y, e.x, out_valid, y_rec, m.ymap[e.y*W + e.x], dt, m.dtmap[e.y*W + e.x]);
      end
    end else if (out_valid) begin
      failures++;
      $display("unexpected out_valid at cycle %0d", cycle);
    end
    in_valid = v; y_ori = CRD_W'(y); x_ori = CRD_W'(x);
    if (v) q.push_back('{due: cycle + 6, y: y, x: x});
  endtask

  initial begin
    m = new(W, H, BPY, 1);
    m.generate_maps(400, 0, 300);
    repeat (3) @(negedge clk);
    for (int i = 0; i < int'(DEPTH); i++) begin
      @(negedge clk);
      load_we <= 1; load_addr <= AW'(i); load_data <= ENTRY_W'(m.ytab[i]);
    end
    @(negedge clk) load_we <= 0;
    rst_n <= 1;
    repeat (2) @(negedge clk);
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < int'(H); y++)
        for (int x = 0; x < int'(W); x++) begin
          if (f == 1 && $urandom_range(3) == 0) step(0, 0, 0);
          step(1, y, x);
        end
    repeat (10) step(0, 0, 0);
    if (q.size() != 0) begin failures++; $display("%0d outputs missing", q.size()); end
    if (m.n_y_adjacent == 0 || m.n_dt_only == 0 || m.n_y_full == 0) begin
      failures++; $display("table lacks adjacent/DT-only/full rows");
    end
    $display("coverage: dec=%0d inc=%0d dt_only=%0d dt_step=%0d dt_init=%0d adjacent=%0d full_rows=%0d",
             m.n_y_dec, m.n_y_inc, m.n_dt_only, m.n_dt_step, m.n_dt_init, m.n_y_adjacent, m.n_y_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

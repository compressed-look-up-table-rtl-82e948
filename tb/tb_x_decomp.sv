// tb_x_decomp: self-checking test of the X decompressor with its table and
// per-column last-data RAM.
//
// A random 12x24 mapping with many breakpoints down each column (adjacent
// rows, columns using all table words) is coded into the X table and loaded.
// Two frames are streamed through: back to back, then with random idle
// clocks; the second frame checks that row 0 re-initialises every column.
// Each X_rec is compared with the uncompressed map and must appear exactly 6
// clocks after its pixel.
module tb_x_decomp;
  import clutr_pkg::*;
  import clutr_tb_pkg::*;

  localparam int unsigned W = 12, H = 24, BPX = 8;
  localparam int unsigned DEPTH = W * BPX;
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned LAW = $clog2(W);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               load_we = 0;
  logic [AW-1:0]      load_addr = '0;
  logic [ENTRY_W-1:0] load_data = '0;
  logic [AW-1:0]      rom_addr;
  bp_entry_t          rom_rdata;
  logic [LAW-1:0]     last_raddr, last_waddr;
  last_data_t         last_rdata, last_wdata;
  logic               last_we;
  logic               in_valid = 0;
  logic [CRD_W-1:0]   y_ori = '0, x_ori = '0;
  logic               out_valid;
  logic [TGT_W-1:0]   x_rec;

  forwt_x_rom #(.DEPTH(DEPTH), .ADDR_W(AW)) u_rom (
    .clk(clk), .load_we(load_we), .load_addr(load_addr), .load_data(load_data),
    .addr(rom_addr), .rdata(rom_rdata));

  x_last_data_ram #(.DEPTH(W), .ADDR_W(LAW)) u_last (
    .clk(clk), .we(last_we), .waddr(last_waddr), .wdata(last_wdata),
    .raddr(last_raddr), .rdata(last_rdata));

  x_decomp #(.IMG_W(W), .BP_X(BPX), .ROM_AW(AW), .LAST_AW(LAW)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .y_ori(y_ori), .x_ori(x_ori),
    .rom_addr(rom_addr), .rom_rdata(rom_rdata),
    .last_raddr(last_raddr), .last_rdata(last_rdata),
    .last_we(last_we), .last_waddr(last_waddr), .last_wdata(last_wdata),
    .out_valid(out_valid), .x_rec(x_rec));

  int checks = 0, failures = 0;
  int cycle = 0;
  clut_model m;
  typedef struct { int due; int y; int x; } exp_t;
  exp_t q[$];

  // One clock of the test: on the falling edge, check what is due, then drive
  // the next input.
  task automatic step(bit v, int y, int x);
    @(negedge clk);
    cycle++;
    if (q.size() > 0 && q[0].due == cycle) begin
      exp_t e;
      e = q.pop_front();
      checks++;
      if (!out_valid || x_rec != TGT_W'(m.xmap[e.y*W + e.x])) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH (%0d,%0d): valid=%0b x_rec=%0d exp %0d",
                   e.y, e.x, out_valid, x_rec, m.xmap[e.y*W + e.x]);
      end
    end else if (out_valid) begin
      failures++;
      $display("unexpected out_valid at cycle %0d", cycle);
    end
    in_valid = v; y_ori = CRD_W'(y); x_ori = CRD_W'(x);
    if (v) q.push_back('{due: cycle + 6, y: y, x: x});
  endtask

  initial begin
    m = new(W, H, 1, BPX);
    m.generate_maps(0, 450, 0);
    repeat (3) @(negedge clk);
    for (int i = 0; i < int'(DEPTH); i++) begin
      @(negedge clk);
      load_we <= 1; load_addr <= AW'(i); load_data <= ENTRY_W'(m.xtab[i]);
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
    if (m.n_x_adjacent == 0 || m.n_x_full == 0 || m.n_x_dec == 0 || m.n_x_inc == 0) begin
      failures++; $display("table lacks adjacent/full columns or a step direction");
    end
    $display("coverage: dec=%0d inc=%0d adjacent=%0d full_columns=%0d",
             m.n_x_dec, m.n_x_inc, m.n_x_adjacent, m.n_x_full);
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

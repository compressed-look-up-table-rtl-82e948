// tb_x_last_data_ram: checks the per-column last-data RAM. Random writes and
// reads on every clock against a reference array; read data must show the
// word as it was before a write in the same clock (read-before-write), one
// clock after the address.
module tb_x_last_data_ram;
  import clutr_pkg::*;
  localparam int unsigned DEPTH = 32;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 0;
  always #5 clk = ~clk;
  logic          we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  last_data_t    wdata = '0, rdata;

  x_last_data_ram #(.DEPTH(DEPTH), .ADDR_W(AW)) dut (.*);

  int checks = 0, failures = 0;
  last_data_t ref_mem [DEPTH];
  last_data_t expected;

  initial begin
    // fill
    for (int i = 0; i < int'(DEPTH); i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = '{brk: BRK_W'(i), tgt: TGT_W'(i * 31)};
      ref_mem[i] = wdata;
    end
    // random traffic
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      raddr = AW'($urandom_range(DEPTH - 1));
      expected = ref_mem[raddr];
      we = $urandom_range(1);
      waddr = (n % 5 == 0) ? raddr : AW'($urandom_range(DEPTH - 1));
      wdata = last_data_t'($urandom);
      if (we) ref_mem[waddr] = wdata;
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== expected) begin
        failures++;
        $display("read %0d: got %h expected %h", raddr, rdata, expected);
      end
    end
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

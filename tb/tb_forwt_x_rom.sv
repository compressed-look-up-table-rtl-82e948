// tb_forwt_x_rom: checks the X table memory. Loads every word with a value
// computed from its address, reads them back in a scrambled order checking
// the one-clock read latency. The depth is a power of two, so the whole
// address range is valid (past-the-end reads are covered by tb_forwt_y_rom).
module tb_forwt_x_rom;
  import clutr_pkg::*;
  localparam int unsigned DEPTH = 64;  // a power of two: every address is in range
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 0;
  always #5 clk = ~clk;
  logic               load_we = 0;
  logic [AW-1:0]      load_addr = '0, addr = '0;
  logic [ENTRY_W-1:0] load_data = '0, rdata;

  forwt_x_rom #(.DEPTH(DEPTH), .ADDR_W(AW)) dut (.*);

  int checks = 0, failures = 0;
  function automatic logic [ENTRY_W-1:0] pat(int a);
    return ENTRY_W'((a * 40503 + 12345) ^ (a << 9));
  endfunction

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) begin
      @(negedge clk); load_we = 1; load_addr = AW'(i); load_data = pat(i);
    end
    @(negedge clk); load_we = 0;
    for (int k = 0; k < int'(DEPTH); k++) begin
      int i;
      i = (k * 7) % int'(DEPTH);
      @(negedge clk); addr = AW'(i);
      @(negedge clk);
      checks++;
      if (rdata !== pat(i)) begin failures++; $display("addr %0d: got %h expected %h", i, rdata, pat(i)); end
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

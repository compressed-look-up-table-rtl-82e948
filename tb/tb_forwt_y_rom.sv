// tb_forwt_y_rom: checks the Y table memory. Loads every word with a value
// computed from its address, then reads all addresses through both ports at
// once (port B at a different address), checking the one-clock read latency,
// and reads past the end, which must return zero.
module tb_forwt_y_rom;
  import clutr_pkg::*;
  localparam int unsigned DEPTH = 100;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 0;
  always #5 clk = ~clk;
  logic               load_we = 0;
  logic [AW-1:0]      load_addr = '0, addr_a = '0, addr_b = '0;
  logic [ENTRY_W-1:0] load_data = '0, rdata_a, rdata_b;

  forwt_y_rom #(.DEPTH(DEPTH), .ADDR_W(AW)) dut (.*);

  int checks = 0, failures = 0;
  function automatic logic [ENTRY_W-1:0] pat(int a);
    return ENTRY_W'((a * 2654435761) >> 7);
  endfunction

  task automatic expect_eq(logic [ENTRY_W-1:0] got, logic [ENTRY_W-1:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) begin
      @(negedge clk); load_we = 1; load_addr = AW'(i); load_data = pat(i);
    end
    @(negedge clk); load_we = 0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      @(negedge clk);
      addr_a = AW'(i); addr_b = AW'(DEPTH - 1 - i);
      @(negedge clk);
      expect_eq(rdata_a, pat(i), "port A");
      expect_eq(rdata_b, pat(DEPTH - 1 - i), "port B");
    end
    @(negedge clk); addr_a = AW'(DEPTH); addr_b = AW'(DEPTH + 5);
    @(negedge clk);
    expect_eq(rdata_a, '0, "past end A");
    expect_eq(rdata_b, '0, "past end B");
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

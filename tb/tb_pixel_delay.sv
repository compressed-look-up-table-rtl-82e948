// tb_pixel_delay: checks the 6-clock pixel delay. Random pixels with random
// valid are driven every clock; each output must equal the input of exactly
// 6 clocks earlier, valid included, and valid must be low after reset.
module tb_pixel_delay;
  localparam int unsigned WIDTH = 8, DEPTH = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic             in_valid = 0, out_valid;
  logic [WIDTH-1:0] in_data = '0, out_data;

  pixel_delay #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  logic             hv [$];
  logic [WIDTH-1:0] hd [$];

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (out_valid !== 1'b0) begin failures++; $display("valid not cleared by reset"); end
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      if (hv.size() == DEPTH) begin
        logic ev;
        logic [WIDTH-1:0] ed;
        ev = hv.pop_front();
        ed = hd.pop_front();
        checks++;
        if (out_valid !== ev || (ev && out_data !== ed)) begin
          failures++;
          $display("clock %0d: got %0b/%h expected %0b/%h", n, out_valid, out_data, ev, ed);
        end
      end
      in_valid = (n < 10) ? 1'b1 : 1'($urandom_range(1));
      in_data  = WIDTH'($urandom);
      hv.push_back(in_valid);
      hd.push_back(in_data);
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

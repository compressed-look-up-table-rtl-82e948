// pixel_delay: the chain of DFFs that delays the source pixel value.
//
// The published design delays Ori(Y_ori, X_ori) by six clock cycles so that it leaves
// the rectification module together with its Y_rec, X_rec and DT. This is a
// DEPTH-stage shift register for the pixel value with a parallel valid bit;
// only the valid bits are reset (asynchronous, active-low rst_n). DEPTH=6 and
// the plain register chain follow the published design; the valid bit is this
// design's addition.
module pixel_delay #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  output logic [WIDTH-1:0] out_data
);

  logic [WIDTH-1:0] data_q  [DEPTH];
  logic [DEPTH-1:0] valid_q;

  always_ff @(posedge clk) begin
    data_q[0] <= in_data;
    for (int i = 1; i < DEPTH; i++) data_q[i] <= data_q[i-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= '0;
    else        valid_q <= {valid_q[DEPTH-2:0], in_valid};
  end

  assign out_data  = data_q[DEPTH-1];
  assign out_valid = valid_q[DEPTH-1];

endmodule

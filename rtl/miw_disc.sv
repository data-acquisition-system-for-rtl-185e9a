// miw_disc: 15-bit discriminator on the moving integrating window.
//
// Compares the 15 most significant bits of the 18-bit window sum with a
// threshold and registers hit (sum[17:3] >= thr) on every cycle in which ce
// is high. The comparison sense is this design's choice.
module miw_disc #(
  parameter int unsigned SUM_W = 18,
  parameter int unsigned THR_W = 15
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ce,
  input  logic [SUM_W-1:0] sum,
  input  logic [THR_W-1:0] thr,
  output logic             hit
);
  always_ff @(posedge clk) begin
    if (rst)     hit <= 1'b0;
    else if (ce) hit <= (sum[SUM_W-1 -: THR_W] >= thr);
  end
endmodule

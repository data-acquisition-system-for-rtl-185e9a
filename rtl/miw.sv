// miw: 18-bit moving integrating window of a TPC digitizer channel.
//
// The integrator works on the 11 most significant bits of each reading. On
// every sample strobe it adds the new value and subtracts the one that
// entered `width` samples earlier, so sum is the total of the last `width`
// values (width 1..127). 127 * 2047 fits the 18-bit sum exactly. The history
// lives in a 128-entry circular memory; until the window has filled nothing
// is subtracted, so the memory needs no clearing. clear (given at the start
// of a run, and needed after a width change) empties the window. sum is
// registered: it includes the reading of the latest strobe one cycle later.
module miw
  import proton_pkg::*;
#(
  parameter int unsigned SUM_W = 18,
  parameter int unsigned IN_W  = 11,
  parameter int unsigned MAXW  = 127
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic             ce,
  input  logic [ADC_W-1:0] sample,
  input  logic [6:0]       width,
  output logic [SUM_W-1:0] sum
);
  localparam int unsigned HW = $clog2(MAXW + 1);
  logic [IN_W-1:0] hist [2**HW];
  logic [HW-1:0]   wp;
  logic [HW:0]     fill;     // samples held, saturates at MAXW
  logic [IN_W-1:0] x, old;

  assign x   = sample[ADC_W-1 -: IN_W];
  assign old = (fill >= (HW+1)'(width)) ? hist[wp - HW'(width)] : '0;

  always_ff @(posedge clk) begin
    if (ce) hist[wp] <= x;
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      wp   <= '0;
      fill <= '0;
      sum  <= '0;
    end else if (ce) begin
      wp  <= wp + 1'b1;
      sum <= sum + SUM_W'(x) - SUM_W'(old);
      if (fill < (HW+1)'(MAXW)) fill <= fill + 1'b1;
    end
  end
endmodule

// amp_disc: 12-bit amplitude discriminator of a digitizer channel.
//
// On every sample strobe (ce) the reading is compared with a programmable
// threshold; hit is registered and stays valid until the next strobe. A hit
// means reading >= thr (positive-going signals; the polarity is this design's
// choice). rise pulses for one cycle when hit goes from 0 to 1, which is the
// self-trigger of a tracker channel.
module amp_disc
  import proton_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             ce,
  input  logic [ADC_W-1:0] sample,
  input  logic [ADC_W-1:0] thr,
  output logic             hit,
  output logic             rise
);
  always_ff @(posedge clk) begin
    if (rst) begin
      hit  <= 1'b0;
      rise <= 1'b0;
    end else begin
      rise <= 1'b0;
      if (ce) begin
        hit  <= (sample >= thr);
        rise <= (sample >= thr) && !hit;
      end
    end
  end
endmodule

// tr_select: trigger-request (TR) source of one TPC digitizer channel.
//
// A channel may raise TR from its amplitude discriminator, from its moving
// window discriminator, or from their coincidence (both at once); mode TR_OFF
// keeps the channel out of the trigger, which is how only chosen anode rings
// take part. Combinational; the mode encoding is this design's choice.
module tr_select
  import proton_pkg::*;
(
  input  logic     amp_hit,
  input  logic     miw_hit,
  input  tr_mode_e mode,
  output logic     tr
);
  always_comb begin
    unique case (mode)
      TR_AMP:  tr = amp_hit;
      TR_MIW:  tr = miw_hit;
      TR_COIN: tr = amp_hit && miw_hit;
      default: tr = 1'b0;
    endcase
  end
endmodule

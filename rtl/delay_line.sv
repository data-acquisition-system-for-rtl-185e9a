// delay_line: programmable pipeline delay of a channel's reading stream.
//
// It holds readings long enough for the trigger (or self-trigger) decision
// to arrive, so that a recorded event can start before the moment that
// caused it. A circular memory of DEPTH readings is written on every sample
// strobe; in the same cycle the reading written `delay` strobes earlier is
// read into dout (delay = 0 passes the reading through). dout is valid one
// cycle after ce, and only once `delay` readings have been written since
// reset. The maximum delay (DEPTH-1 samples, 41 us at 25 MHz) is this
// design's choice.
module delay_line
  import proton_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ce,
  input  logic [ADC_W-1:0] din,
  input  logic [AW-1:0]    delay,
  output logic [ADC_W-1:0] dout
);
  logic [ADC_W-1:0] mem [DEPTH];
  logic [AW-1:0]    wp;

  always_ff @(posedge clk) begin
    if (ce) mem[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp   <= '0;
      dout <= '0;
    end else if (ce) begin
      wp   <= wp + 1'b1;
      dout <= (delay == '0) ? din : mem[wp - delay];
    end
  end
endmodule

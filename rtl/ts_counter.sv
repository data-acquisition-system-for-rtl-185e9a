// ts_counter: the 44-bit event timestamp of a device.
//
// The counter is cleared and starts counting on the "start run" command and
// holds its value after "stop run". It counts the 100 MHz system clock, so it
// wraps after 2^44 cycles, about 48 hours, and is a unique event identifier
// within a run. Every device of the tree receives the broadcast start command
// in the same cycle as its peers, so their counters agree (up to the fixed
// delay of one serial-link hop between tiers). Start wins over stop.
module ts_counter
  import proton_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic start_run,
  input  logic stop_run,
  output ts_t  ts,
  output logic running
);
  always_ff @(posedge clk) begin
    if (rst) begin
      ts      <= '0;
      running <= 1'b0;
    end else if (start_run) begin
      ts      <= '0;
      running <= 1'b1;
    end else begin
      if (stop_run) running <= 1'b0;
      if (running)  ts <= ts + 1'b1;
    end
  end
endmodule

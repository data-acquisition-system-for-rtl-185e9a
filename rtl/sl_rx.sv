// sl_rx: receiver of a 100 Mbps serial link, the counterpart of sl_tx.
//
// Sender and receiver share the system clock, which the concentrators
// distribute over the same cable, so the receiver needs no clock recovery:
// while idle it waits for a 1 (start bit), then shifts in the 18 bits of type,
// payload and parity and checks the stop bit. A good frame gives a one-cycle
// valid pulse with is_cmd and word, 19 cycles after the start bit entered. A
// frame with bad parity or a missing stop bit is dropped and pulses frame_err.
module sl_rx
  import proton_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  sdi,
  output logic  valid,
  output logic  is_cmd,
  output word_t word,
  output logic  frame_err
);
  logic [18:0] shreg;   // type, payload, parity, stop
  logic [4:0]  cnt;     // bits still expected, 0 = idle

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '0;
      cnt       <= '0;
      valid     <= 1'b0;
      is_cmd    <= 1'b0;
      word      <= '0;
      frame_err <= 1'b0;
    end else begin
      valid     <= 1'b0;
      frame_err <= 1'b0;
      if (cnt == 0) begin
        if (sdi) cnt <= 5'd19;
      end else begin
        shreg <= {shreg[17:0], sdi};
        cnt   <= cnt - 1'b1;
        if (cnt == 1) begin
          // shreg[17:0] + sdi = type, payload[15:0], parity, stop
          if ((^shreg[17:0]) == 1'b0 && sdi == 1'b0) begin
            valid  <= 1'b1;
            is_cmd <= shreg[17];
            word   <= shreg[16:1];
          end else begin
            frame_err <= 1'b1;
          end
        end
      end
    end
  end
endmodule

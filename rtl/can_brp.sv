// can_brp: baud rate prescaler. Divides the system clock into CAN time quanta: tq_tick is high
// for one clock every (baud_r_presc + 1) clocks. restart (a hard synchronisation) clears the
// divider so that the next quantum starts one full quantum later. The 6-bit prescale value
// follows the controller's bit timing register; the divide-by-(value+1) rule is this design's
// choice.
module can_brp (
  input  logic       clk,
  input  logic       rst,
  input  logic [5:0] baud_r_presc,
  input  logic       restart,
  output logic       tq_tick
);

  logic [5:0] cnt;

  assign tq_tick = (cnt == baud_r_presc) && !restart;

  always_ff @(posedge clk) begin
    if (rst || restart || tq_tick) cnt <= '0;
    else                           cnt <= cnt + 6'd1;
  end

endmodule

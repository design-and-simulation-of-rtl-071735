// can_eml: error management logic (fault confinement).
// Keeps the transmit error counter (TEC, 9 bits so that it can pass 255) and the receive error
// counter (REC, 8 bits, saturating) and derives the node state from them:
//   error active  -> error passive  when REC > 127 or TEC > 127
//   error passive -> error active   when REC < 128 and TEC < 128
//   error passive -> bus off        when TEC > 255
//   bus off       -> error active   after 128 sequences of 11 consecutive recessive bits
//                                   (recessive_11 pulses once per sequence), counters cleared.
// Counter steps (one-clock pulses from the bit stream processor): tx_error +8, rx_error +1,
// tx_success -1, rx_success -1, never below zero. reset_mode clears the counters unless the node
// is bus off. The state diagram and the 127/255 limits follow the controller's error management;
// the counter step sizes are those of the CAN protocol, which the controller adopts without
// listing them.
module can_eml
  import can_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       reset_mode,
  input  logic       tx_error,
  input  logic       rx_error,
  input  logic       tx_success,
  input  logic       rx_success,
  input  logic       recessive_11,
  output logic [8:0] tec,
  output logic [7:0] rec,
  output err_state_t state,
  output logic       node_error_passive,
  output logic       node_bus_off
);

  logic [7:0] recovery_cnt;
  logic [8:0] tec_n;
  logic [7:0] rec_n;

  assign node_error_passive = (state != ERR_ACTIVE);
  assign node_bus_off       = (state == BUS_OFF);

  always_comb begin
    tec_n = tec;
    rec_n = rec;
    if (tx_error)
      tec_n = (tec > 9'd503) ? 9'd511 : tec + 9'd8;
    else if (tx_success && tec != 9'd0)
      tec_n = tec - 9'd1;
    if (rx_error && rec != 8'd255)
      rec_n = rec + 8'd1;
    else if (rx_success && rec != 8'd0)
      rec_n = rec - 8'd1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      tec          <= '0;
      rec          <= '0;
      state        <= ERR_ACTIVE;
      recovery_cnt <= '0;
    end else if (state == BUS_OFF) begin
      if (recessive_11) begin
        if (recovery_cnt == 8'(BUS_OFF_RECOVERY - 1)) begin
          state        <= ERR_ACTIVE;
          tec          <= '0;
          rec          <= '0;
          recovery_cnt <= '0;
        end else begin
          recovery_cnt <= recovery_cnt + 8'd1;
        end
      end
    end else if (reset_mode) begin
      tec          <= '0;
      rec          <= '0;
      state        <= ERR_ACTIVE;
      recovery_cnt <= '0;
    end else begin
      tec <= tec_n;
      rec <= rec_n;
      if (tec_n > 9'(BUS_OFF_LIMIT))
        state <= BUS_OFF;
      else if (tec_n > 9'(ERR_PASSIVE_LIMIT) || rec_n > 8'(ERR_PASSIVE_LIMIT))
        state <= ERR_PASSIVE;
      else
        state <= ERR_ACTIVE;
    end
  end

endmodule

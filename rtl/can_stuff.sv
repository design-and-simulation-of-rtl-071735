// can_stuff: bit stuffing monitor shared by the transmit and receive paths.
// It watches the destuffed-and-stuffed bit stream as sampled on the bus (bit_valid marks a
// sample point). start loads the first bit of the stuffed region (the start-of-frame bit); while
// enable is high every further sampled bit is counted. After five consecutive bits of equal
// value stuff_next goes high: the next bit on the bus is a stuff bit. The transmitter then sends
// stuff_value (the complement of the run) and the receiver discards the bit. If that bit arrives
// with the same value as the run, stuff_error is high during that bit_valid clock
// (combinational). A stuff bit starts a new run
// of length one. clear empties the run counter.
// The five-bit rule and the insert/delete behaviour follow the CAN protocol; sharing one counter
// between both directions (a transmitter reads back its own bits) is this design's choice.
module can_stuff (
  input  logic clk,
  input  logic rst,
  input  logic clear,
  input  logic start,
  input  logic enable,
  input  logic bit_valid,
  input  logic bit_in,
  output logic stuff_next,
  output logic stuff_value,
  output logic stuff_error
);

  logic       last_bit;
  logic [2:0] run;

  assign stuff_next  = (run == 3'd5);
  assign stuff_value = !last_bit;
  assign stuff_error = bit_valid && enable && !start && stuff_next && (bit_in == last_bit);

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      last_bit <= 1'b1;
      run      <= '0;
    end else begin
      if (bit_valid && start) begin
        last_bit <= bit_in;
        run      <= 3'd1;
      end else if (bit_valid && enable) begin
        if (stuff_next) begin
          last_bit <= bit_in;
          run      <= 3'd1;
        end else if (bit_in == last_bit && run != 3'd0) begin
          run <= run + 3'd1;
        end else begin
          last_bit <= bit_in;
          run      <= 3'd1;
        end
      end
    end
  end

endmodule

// can_ibo: inverse bit order. Output bit i is input bit WIDTH-1-i, so 8'b00001010 becomes
// 8'b01010000. Purely combinational, zero latency. The receive shift register of the bit stream
// processor shifts bits in from the top, so the first (most significant) bit of a byte ends up
// in bit 0; this block puts the byte back in order before it is stored.
// (The output is named dout because "do" is a SystemVerilog keyword.)
// The function and the 8-bit width follow the inverse bit order block of the controller;
// its use on received bytes inside the bit stream processor is this design's choice.
module can_ibo #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] di,
  output logic [WIDTH-1:0] dout
);

  always_comb begin
    for (int i = 0; i < WIDTH; i++) dout[i] = di[WIDTH-1-i];
  end

endmodule

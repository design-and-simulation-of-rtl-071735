// can_crc: serial CRC-15 generator/checker for CAN frames.
// Each clock with enable high shifts one message bit (data) into a 15-bit linear feedback shift
// register: the register is shifted left by one with a 0 entering the LSB, and if the bit
// leaving the top XORed with the new data bit is 1, the generator polynomial 0x4599 is XORed in.
// This is polynomial division of the bit stream by X^15+X^14+X^10+X^8+X^7+X^4+X^3+1, so after the
// last data bit crc holds the 15-bit frame check sequence. initialize clears the register (it
// takes priority over enable). Feeding a frame followed by its own CRC leaves crc at zero.
// The polynomial, the 15-bit shift register and the port names follow the controller's CRC
// module; the synchronous clear is this design's choice.
module can_crc
  import can_pkg::*;
(
  input  logic        clk,
  input  logic        data,
  input  logic        enable,
  input  logic        initialize,
  output logic [14:0] crc
);

  logic feedback;
  assign feedback = data ^ crc[14];

  always_ff @(posedge clk) begin
    if (initialize)
      crc <= '0;
    else if (enable)
      crc <= {crc[13:0], 1'b0} ^ (feedback ? CRC15_POLY : 15'd0);
  end

endmodule

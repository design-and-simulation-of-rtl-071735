// can_pkg: types and constants shared by the CAN controller blocks.
// The CRC generator polynomial X^15+X^14+X^10+X^8+X^7+X^4+X^3+1 (0x4599 without the X^15 term)
// and the error-counter limits 127/255 come from the CAN protocol as used by this controller.
// The frame record layout and the error state encoding are this design's own choices.
package can_pkg;

  // CRC-15 generator polynomial, X^15 term implied.
  localparam logic [14:0] CRC15_POLY = 15'h4599;

  // Error counter limits.
  localparam int unsigned ERR_PASSIVE_LIMIT = 127;   // counter > 127 -> error passive
  localparam int unsigned BUS_OFF_LIMIT     = 255;   // TEC > 255 -> bus off
  localparam int unsigned BUS_OFF_RECOVERY  = 128;   // sequences of 11 recessive bits

  // Fault confinement state of a node.
  typedef enum logic [1:0] {
    ERR_ACTIVE  = 2'd0,
    ERR_PASSIVE = 2'd1,
    BUS_OFF     = 2'd2
  } err_state_t;

  // One CAN message as held in the transmit buffer.
  // data[63:56] is data byte 0, which is sent first.
  typedef struct packed {
    logic        ide;    // 1: extended (29-bit) identifier
    logic        rtr;    // 1: remote frame
    logic [3:0]  dlc;    // data length code
    logic [28:0] id;     // standard frames use id[10:0]
    logic [63:0] data;
  } can_frame_t;

  // Number of data bytes a frame carries on the bus.
  function automatic logic [3:0] frame_bytes(input logic rtr, input logic [3:0] dlc);
    if (rtr)            return 4'd0;
    else if (dlc > 4'd8) return 4'd8;
    else                return dlc;
  endfunction

endpackage

// can_ram: two-port 64x8 RAM with a separate write clock and read clock.
// Write port: on a rising edge of wclk with we high, wdata is stored at waddr.
// Read port: on a rising edge of rclk with re high, the word at raddr is copied to rdata
// (synchronous read, one rclk of latency; rdata holds while re is low).
// The size, the separate clocks and enables, and the storage array named memory follow the
// controller's custom RAM; it is written as a plain array so that it maps to any FPGA's memory
// or to flip-flops and needs no vendor RAM primitive. Contents are not reset.
module can_ram #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ADDR_W = 6
) (
  input  logic              wclk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              rclk,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] memory [2**ADDR_W];

  always_ff @(posedge wclk) begin
    if (we) memory[waddr] <= wdata;
  end

  always_ff @(posedge rclk) begin
    if (re) rdata <= memory[raddr];
  end

endmodule

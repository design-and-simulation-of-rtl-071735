// can_register: a WIDTH-bit storage register with a write enable.
// On a rising clock edge with we high, data_in is captured; data_out always shows the stored
// value (one clock of latency from a write). A synchronous active-high reset loads RESET_VALUE.
// The 8-bit width, the we/data_in/data_out interface and the write-then-hold behaviour follow
// the controller's register module; the reset value is this design's addition so that the
// controller's configuration is defined after reset.
module can_register #(
  parameter int unsigned          WIDTH       = 8,
  parameter logic [WIDTH-1:0]     RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             we,
  input  logic [WIDTH-1:0] data_in,
  output logic [WIDTH-1:0] data_out
);

  always_ff @(posedge clk) begin
    if (rst)     data_out <= RESET_VALUE;
    else if (we) data_out <= data_in;
  end

endmodule

// tb_can_eml: checks the fault confinement counters and states.
//  * 16 transmit errors: TEC = 128, error passive; one success: TEC = 127, error active.
//  * REC: 128 receive errors -> passive; successes bring it back to 127 -> active.
//  * 32 more transmit errors: TEC > 255 -> bus off; errors are then ignored.
//  * 127 recovery sequences keep the node bus off, the 128th makes it error active with both
//    counters cleared.
//  * counters never go below zero.
// Expected values are the CAN rule numbers (+8, +1, -1), counted here.
// The thresholds (127, 255, 128 x 11 recessive bits) follow the error state diagram; the step
// sizes are those of the CAN standard, as the controller description leaves them open.
module tb_can_eml;
  import can_pkg::*;

  logic clk = 1'b0, rst, reset_mode, tx_error, rx_error, tx_success, rx_success, rec11;
  logic [8:0] tec;
  logic [7:0] rec;
  err_state_t state;
  logic passive, bus_off;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  can_eml dut (.clk(clk), .rst(rst), .reset_mode(reset_mode), .tx_error(tx_error),
               .rx_error(rx_error), .tx_success(tx_success), .rx_success(rx_success),
               .recessive_11(rec11), .tec(tec), .rec(rec), .state(state),
               .node_error_passive(passive), .node_bus_off(bus_off));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic pulse(input int which, input int times);
    for (int i = 0; i < times; i++) begin
      @(negedge clk);
      tx_error = (which == 0); rx_error = (which == 1);
      tx_success = (which == 2); rx_success = (which == 3); rec11 = (which == 4);
      @(negedge clk);
      {tx_error, rx_error, tx_success, rx_success, rec11} = '0;
    end
  endtask

  initial begin
    rst = 1; reset_mode = 0;
    {tx_error, rx_error, tx_success, rx_success, rec11} = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(state == ERR_ACTIVE && tec == 0 && rec == 0, "error active after reset");
    pulse(2, 3); pulse(3, 3);
    check(tec == 0 && rec == 0, "counters do not go below zero");

    pulse(0, 15);
    check(tec == 120 && !passive, "TEC 120 still active");
    pulse(0, 1);
    check(tec == 128 && passive && !bus_off, "TEC 128 error passive");
    pulse(2, 1);
    check(tec == 127 && !passive, "TEC 127 back to error active");
    pulse(2, 127);
    check(tec == 0, "TEC back to 0");

    pulse(1, 127);
    check(rec == 127 && !passive, "REC 127 active");
    pulse(1, 1);
    check(rec == 128 && passive, "REC 128 passive");
    pulse(3, 1);
    check(rec == 127 && !passive, "REC 127 active again");
    pulse(3, 127);

    pulse(0, 32);
    check(tec == 256 && bus_off && passive, $sformatf("TEC %0d bus off", tec));
    pulse(0, 3); pulse(1, 3); pulse(2, 3);
    check(tec == 256 && bus_off, "counters frozen while bus off");
    pulse(4, 127);
    check(bus_off, "still bus off after 127 recovery sequences");
    pulse(4, 1);
    check(!bus_off && !passive && tec == 0 && rec == 0, "recovered after 128 sequences");

    pulse(0, 5);
    @(negedge clk); reset_mode = 1; @(negedge clk); reset_mode = 0;
    check(tec == 0, "reset_mode clears the counters");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

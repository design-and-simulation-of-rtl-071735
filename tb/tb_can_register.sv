// tb_can_register: checks the 8-bit register. After reset the output is the reset value; a
// clock edge with we high loads data_in (the output follows one clock later); with we low the
// output holds whatever data_in does. Random data and enables are compared with a shadow copy.
module tb_can_register;

  logic       clk = 1'b0, rst, we;
  logic [7:0] data_in, data_out, shadow;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  can_register #(.WIDTH(8), .RESET_VALUE(8'h5A)) dut (
    .clk(clk), .rst(rst), .we(we), .data_in(data_in), .data_out(data_out));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    rst = 1; we = 0; data_in = 8'h00;
    @(negedge clk);
    @(negedge clk);
    check(data_out == 8'h5A, "reset value");
    rst = 0;
    shadow = 8'h5A;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      we = 1'($urandom);
      data_in = 8'($urandom);
      if (we) shadow = data_in;
      @(negedge clk);
      we = 1'b0;
      data_in = ~data_in;
      check(data_out == shadow, $sformatf("step %0d: %02h want %02h", i, data_out, shadow));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

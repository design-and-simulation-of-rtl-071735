// tb_can_brp: checks the baud rate prescaler. For several prescale values P the tick must
// come every P+1 clocks; after restart the next tick must come P+1 clocks after the restart.
// The P+1 relation is this design's choice; the prescaler itself is named by the controller.
module tb_can_brp;

  logic       clk = 1'b0, rst, restart, tq_tick;
  logic [5:0] presc;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  can_brp dut (.clk(clk), .rst(rst), .baud_r_presc(presc), .restart(restart), .tq_tick(tq_tick));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int last, now, cyc;
  always @(posedge clk) cyc++;

  initial begin
    automatic logic [5:0] pv [5] = '{6'd0, 6'd1, 6'd3, 6'd56, 6'd63};
    cyc = 0;
    rst = 1; restart = 0; presc = 0;
    repeat (2) @(negedge clk);
    foreach (pv[k]) begin
      rst = 1; presc = pv[k];
      @(negedge clk);
      rst = 0;
      last = -1;
      for (int t = 0; t < 5; t++) begin
        do @(negedge clk); while (!tq_tick);
        now = cyc;
        if (last >= 0) check(now - last == int'(pv[k]) + 1,
                             $sformatf("P=%0d interval %0d", pv[k], now - last));
        last = now;
      end
      // restart in the middle of a quantum
      if (pv[k] > 1) begin
        @(negedge clk);
        restart = 1;
        last = cyc;
        @(negedge clk);
        restart = 0;
        do @(negedge clk); while (!tq_tick);
        check(cyc - last == int'(pv[k]) + 1, $sformatf("P=%0d after restart %0d", pv[k],
                                                        cyc - last));
      end
    end
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

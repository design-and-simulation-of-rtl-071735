// tb_can_stuff: checks the stuffing monitor against a stuffing encoder written here.
// Random payloads (biased towards long runs) are stuffed by the reference rule (after five equal
// bits insert the complement; the stuff bit starts a new run) and fed as sampled bits, the
// first with start. Before every bit stuff_next must say whether the reference placed a stuff
// bit there, and stuff_value must equal it. Then a stream whose stuff bit is replaced by a
// sixth equal bit must raise stuff_error in that bit's clock.
// The five-bit rule follows the stuffing description; the separate stuffing module and its
// port timing are this design's choices.
module tb_can_stuff;

  logic clk = 1'b0, rst, clear, start, enable, bit_valid, bit_in;
  logic stuff_next, stuff_value, stuff_error;
  int checks = 0, failures = 0, n_stuff = 0;

  always #5 clk = !clk;

  can_stuff dut (.clk(clk), .rst(rst), .clear(clear), .start(start), .enable(enable),
                 .bit_valid(bit_valid), .bit_in(bit_in), .stuff_next(stuff_next),
                 .stuff_value(stuff_value), .stuff_error(stuff_error));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic payload [$];
  logic stream  [$];
  logic is_stuff [$];

  task automatic build();
    int run;
    logic last;
    stream = {}; is_stuff = {};
    run = 0; last = 1'b0;
    foreach (payload[i]) begin
      if (run == 5) begin
        stream.push_back(!last); is_stuff.push_back(1'b1);
        last = !last; run = 1;
      end
      stream.push_back(payload[i]); is_stuff.push_back(1'b0);
      if (run > 0 && payload[i] == last) run++;
      else begin
        last = payload[i]; run = 1;
      end
    end
  endtask

  task automatic feed(input bit corrupt_first_stuff, output bit saw_error);
    bit corrupted = 0;
    saw_error = 0;
    @(negedge clk);
    clear = 1; @(negedge clk); clear = 0;
    foreach (stream[i]) begin
      logic b;
      b = stream[i];
      if (i > 0 && !corrupted) begin
        check(stuff_next == is_stuff[i], $sformatf("bit %0d: stuff_next %0d want %0d", i,
                                                   stuff_next, is_stuff[i]));
        if (is_stuff[i]) check(stuff_value == stream[i], "stuff_value");
      end
      if (is_stuff[i]) n_stuff++;
      if (corrupt_first_stuff && is_stuff[i] && !corrupted) begin
        b = !b;
        corrupted = 1;
      end
      bit_valid = 1; bit_in = b; start = (i == 0); enable = (i > 0);
      #1;
      if (stuff_error) saw_error = 1;
      if (!corrupt_first_stuff) check(!stuff_error, "no stuff error on a legal stream");
      @(negedge clk);
      bit_valid = 0; start = 0;
      @(negedge clk);
    end
  endtask

  bit err;

  initial begin
    rst = 1; clear = 0; start = 0; enable = 0; bit_valid = 0; bit_in = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 100; t++) begin
      logic cur;
      payload = {};
      payload.push_back(1'b0);                // start of frame
      cur = 1'($urandom);
      for (int i = 0; i < 80; i++) begin
        if ($urandom % 4 == 0) cur = !cur;   // long runs are likely
        payload.push_back(cur);
      end
      build();
      feed(0, err);
      if (t % 10 == 0) begin
        automatic bit has_stuff = 0;
        foreach (is_stuff[i]) if (is_stuff[i]) has_stuff = 1;
        if (has_stuff) begin
          feed(1, err);
          check(err, "sixth equal bit raises stuff_error");
        end
      end
    end
    check(n_stuff > 100, "stuff bits were exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

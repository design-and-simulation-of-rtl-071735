// tb_can_crc: checks the CRC-15 shift register.
// 1. The seven CRC values printed for the reference bit stream 1,0,1,0,1,0,0 (starting from a
//    cleared register) must appear one clock after each bit.
// 2. For random messages of 1..100 bits the register must equal the remainder of
//    M(X)*X^15 divided by X^15+X^14+X^10+X^8+X^7+X^4+X^3+1, computed here by long division on a
//    bit array.
// 3. Feeding the message followed by its CRC must leave the register at zero (the frame is
//    exactly divisible by the generator).
// 4. enable low holds the value; initialize clears it.
module tb_can_crc;

  logic        clk = 1'b0;
  logic        data, enable, initialize;
  logic [14:0] crc;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  can_crc dut (.clk(clk), .data(data), .enable(enable), .initialize(initialize), .crc(crc));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic shift_bit(input logic b);
    @(negedge clk);
    data = b; enable = 1'b1; initialize = 1'b0;
    @(negedge clk);
    enable = 1'b0;
  endtask

  task automatic clear();
    @(negedge clk);
    initialize = 1'b1; enable = 1'b0;
    @(negedge clk);
    initialize = 1'b0;
  endtask

  // Remainder of msg * x^15 modulo the generator, by long division.
  function automatic logic [14:0] ref_crc(input logic msg [128], input int n);
    logic work [143];
    logic [15:0] gen;
    logic [14:0] r;
    gen = 16'hC599;  // x^15 + x^14 + x^10 + x^8 + x^7 + x^4 + x^3 + 1
    for (int i = 0; i < n + 15; i++) work[i] = (i < n) ? msg[i] : 1'b0;
    for (int i = 0; i < n; i++)
      if (work[i])
        for (int j = 0; j < 16; j++) work[i + j] ^= gen[15 - j];
    for (int j = 0; j < 15; j++) r[14 - j] = work[n + j];
    return r;
  endfunction

  logic [14:0] golden [7];
  logic        gbits  [7];
  logic        msg    [128];
  logic [14:0] expect_crc, held;
  int          n;

  initial begin
    data = 0; enable = 0; initialize = 0;
    golden[0] = 15'b100010110011001; golden[1] = 15'b100111010101011;
    golden[2] = 15'b001110101010110; golden[3] = 15'b011101010101100;
    golden[4] = 15'b011000011000001; golden[5] = 15'b110000110000010;
    golden[6] = 15'b000011010011101;
    gbits = '{1, 0, 1, 0, 1, 0, 0};

    clear();
    check(crc == 15'd0, "initialize clears the register");
    for (int i = 0; i < 7; i++) begin
      shift_bit(gbits[i]);
      check(crc == golden[i], $sformatf("reference step %0d: %b want %b", i, crc, golden[i]));
    end

    for (int t = 0; t < 200; t++) begin
      n = 1 + ($urandom % 100);
      for (int i = 0; i < n; i++) msg[i] = 1'($urandom);
      clear();
      for (int i = 0; i < n; i++) shift_bit(msg[i]);
      expect_crc = ref_crc(msg, n);
      check(crc == expect_crc, $sformatf("random %0d (n=%0d): %h want %h", t, n, crc, expect_crc));
      held = crc;
      repeat (3) @(negedge clk);
      check(crc == held, "enable low holds the CRC");
      for (int i = 14; i >= 0; i--) shift_bit(held[i]);
      check(crc == 15'd0, "message followed by its CRC leaves remainder 0");
    end

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

// tb_can_ibo: checks the bit order reversal with the six input/output pairs of the module's
// reference waveform (e.g. 00001010 -> 01010000) and with all 256 byte values against a
// reversal computed here bit by bit.
// The six pairs are the controller's own example values; the exhaustive sweep is added here.
module tb_can_ibo;

  logic [7:0] di, dout;
  int checks = 0, failures = 0;

  can_ibo #(.WIDTH(8)) dut (.di(di), .dout(dout));

  logic [7:0] vin  [6] = '{8'b00001010, 8'b00010100, 8'b00011110, 8'b00101000,
                           8'b00110010, 8'b00111100};
  logic [7:0] vout [6] = '{8'b01010000, 8'b00101000, 8'b01111000, 8'b00010100,
                           8'b01001100, 8'b00111100};

  initial begin
    for (int i = 0; i < 6; i++) begin
      di = vin[i];
      #1;
      checks++;
      if (dout !== vout[i]) begin
        failures++;
        $display("FAIL: %b -> %b, want %b", vin[i], dout, vout[i]);
      end
    end
    for (int v = 0; v < 256; v++) begin
      logic [7:0] r;
      di = 8'(v);
      for (int b = 0; b < 8; b++) r[b] = di[7 - b];
      #1;
      checks++;
      if (dout !== r) begin
        failures++;
        $display("FAIL: %b -> %b, want %b", di, dout, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

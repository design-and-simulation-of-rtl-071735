// tb_can_btl: checks the bit timing logic with one quantum per clock.
// Node setting: TSEG1 = 7 (8 quanta), TSEG2 = 6 (7 quanta), SJW = 3 (4 quanta): a bit is
// 1 + 8 + 7 = 16 quanta.
//  1. Idle bus: sample_point and tx_point come every 16 clocks.
//  2. A model transmitter sends frames (a dominant start bit, then random bits with runs of at
//     most two equal bits, so a recessive-to-dominant edge comes at least every 4 bits) with a bit time of 16, 17 and 15 clocks. The node hard-syncs on the
//     first edge and must sample every bit correctly; for 17 and 15 it must resynchronise.
//  3. Glitch: during a dominant bit the line goes recessive for the one clock that ends at
//     the sampling edge. Without triple sampling the bit reads recessive; with it, dominant.
//  4. A second node with the reference setting baud_r_presc = 56, sync_jump_width = 1,
//     time_segment1 = 3, time_segment2 = 1, triple_sampling = 1, fed by the baud rate
//     prescaler: a bit is (1 + 4 + 2) x 57 = 399 clocks. Idle bit time, then frames sent at 399,
//     422 and 376 clocks per bit. The +-23 clock error per bit adds up to 1.6 quanta between
//     two edges, so the full 2-quantum jump width is needed.
// The segment encoding (SYNC + TSEG1+1 + TSEG2+1 quanta, SJW+1) is this design's choice; hard
// synchronisation on a recessive-to-dominant edge follows the bit timing description.
module tb_can_btl;

  logic       clk = 1'b0, rst, rx, tx, hse, transmitting, triple;
  logic       sample_point, sampled_bit, sampled_bit_q, tx_point, hard_sync, resync;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = !clk;
  always @(posedge clk) cyc++;

  can_btl dut (
    .clk(clk), .rst(rst), .tq_tick(1'b1), .rx(rx), .tx(tx), .sync_jump_width(2'd3),
    .time_segment1(4'd7), .time_segment2(3'd6), .triple_sampling(triple),
    .hard_sync_enable(hse), .transmitting(transmitting), .sample_point(sample_point),
    .sampled_bit(sampled_bit), .sampled_bit_q(sampled_bit_q), .tx_point(tx_point),
    .hard_sync(hard_sync), .resync(resync));

  // node with the reference bit timing setting
  logic rx8, hse8, tq8, sp8, sb8, sbq8, txp8, hs8, rs8;
  logic got8 [$];
  int   n_hs8, n_rs8;
  can_brp u_brp8 (.clk(clk), .rst(rst), .baud_r_presc(6'd56), .restart(hs8), .tq_tick(tq8));
  can_btl dut8 (
    .clk(clk), .rst(rst), .tq_tick(tq8), .rx(rx8), .tx(1'b1), .sync_jump_width(2'd1),
    .time_segment1(4'd3), .time_segment2(3'd1), .triple_sampling(1'b1),
    .hard_sync_enable(hse8), .transmitting(1'b0), .sample_point(sp8),
    .sampled_bit(sb8), .sampled_bit_q(sbq8), .tx_point(txp8),
    .hard_sync(hs8), .resync(rs8));

  always @(posedge clk) begin
    if (sp8) got8.push_back(sb8);
    if (hs8) begin
      n_hs8++;
      got8 = {};
    end
    if (rs8) n_rs8++;
  end

  task automatic send_frame8(input int period);
    logic cur;
    int run;
    bits = {};
    bits.push_back(1'b0);
    cur = 1'b0; run = 1;
    for (int i = 0; i < 60; i++) begin
      logic b;
      b = 1'($urandom);
      if (run == 2) b = !cur;
      if (b == cur) run++; else run = 1;
      cur = b;
      bits.push_back(b);
    end
    for (int i = 0; i < 4; i++) bits.push_back(1'b1);
    repeat ($urandom % 400) @(negedge clk);
    hse8 = 1'b1;
    got8 = {};
    foreach (bits[i]) begin
      rx8 = bits[i];
      repeat (period) begin
        @(negedge clk);
        if (got8.size() > 0) hse8 = 1'b0;
      end
    end
    rx8 = 1'b1;
    hse8 = 1'b1;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic bits [$];
  logic got  [$];
  int   n_hs, n_rs;

  always @(posedge clk) begin
    if (sample_point) got.push_back(sampled_bit);
    if (hard_sync) begin
      n_hs++;
      got = {};                             // the frame starts here
    end
    if (resync) n_rs++;
  end

  task automatic send_frame(input int period);
    logic cur;
    int run;
    bits = {};
    bits.push_back(1'b0);
    cur = 1'b0; run = 1;
    for (int i = 0; i < 60; i++) begin
      logic b;
      b = 1'($urandom);
      if (run == 2) b = !cur;
      if (b == cur) run++; else run = 1;
      cur = b;
      bits.push_back(b);
    end
    for (int i = 0; i < 4; i++) bits.push_back(1'b1);
    repeat ($urandom % 16) @(negedge clk);
    hse = 1'b1;
    got = {};
    foreach (bits[i]) begin
      rx = bits[i];
      repeat (period) begin
        @(negedge clk);
        if (got.size() > 0) hse = 1'b0;     // bus no longer idle after the start bit
      end
    end
    rx = 1'b1;
    hse = 1'b1;
  endtask

  int last, n_sp;
  bit ok;

  initial begin
    rst = 1; rx = 1; tx = 1; hse = 1; transmitting = 0; triple = 0;
    n_hs = 0; n_rs = 0;
    rx8 = 1; hse8 = 1; n_hs8 = 0; n_rs8 = 0;
    repeat (3) @(negedge clk);
    rst = 0;

    // 1. free-running bit clock
    last = -1; n_sp = 0;
    for (int k = 0; k < 6; k++) begin
      do @(negedge clk); while (!sample_point);
      if (last >= 0) check(cyc - last == 16, $sformatf("idle bit time %0d", cyc - last));
      last = cyc;
    end
    last = -1;
    for (int k = 0; k < 4; k++) begin
      do @(negedge clk); while (!tx_point);
      if (last >= 0) check(cyc - last == 16, "tx_point period");
      last = cyc;
    end

    // 2. reception at three bit rates
    for (int pi = 0; pi < 3; pi++) begin
      int period;
      period = (pi == 0) ? 16 : (pi == 1) ? 17 : 15;
      for (int f = 0; f < 5; f++) begin
        int hs0, rs0;
        hs0 = n_hs; rs0 = n_rs;
        send_frame(period);
        repeat (40) @(negedge clk);
        check(n_hs - hs0 == 1, $sformatf("period %0d: one hard sync, got %0d", period,
                                         n_hs - hs0));
        ok = (got.size() >= bits.size());
        for (int i = 0; i < bits.size() && ok; i++) if (got[i] != bits[i]) ok = 0;
        if (!ok) begin
          foreach (bits[i]) $write("%0d", bits[i]); $display("");
          foreach (got[i]) $write("%0d", got[i]); $display("");
        end
        check(ok, $sformatf("period %0d frame %0d: all %0d bits sampled correctly", period, f,
                            bits.size()));
        if (period != 16) check(n_rs - rs0 > 0, $sformatf("period %0d: resynchronised",
                                                          period));
      end
    end

    // 3. glitch before the sample point of a dominant bit
    for (int m = 0; m < 2; m++) begin
      triple = 1'(m);
      hse = 1'b1;
      rx = 1'b1;
      repeat (40) @(negedge clk);
      rx = 1'b0;                            // dominant bit, hard sync
      do @(negedge clk); while (!hard_sync);
      do @(negedge clk); while (!sample_point);
      hse = 1'b0;
      check(sampled_bit == 1'b0, "dominant bit sampled");
      repeat (15) @(negedge clk);           // up to the next sampling edge
      rx = 1'b1;
      @(negedge clk);
      rx = 1'b0;
      while (!sample_point) @(negedge clk);
      if (m == 0) check(sampled_bit == 1'b1, "single sampling sees the glitch");
      else        check(sampled_bit == 1'b0, "triple sampling rejects the glitch");
      repeat (20) @(negedge clk);
      rx = 1'b1;
      repeat (40) @(negedge clk);
    end

    // 4. reference setting: 399 clocks per bit
    last = -1;
    for (int k = 0; k < 4; k++) begin
      do @(negedge clk); while (!sp8);
      if (last >= 0) check(cyc - last == 399, $sformatf("reference setting: bit time %0d, want 399",
                                                     cyc - last));
      last = cyc;
    end
    for (int pi = 0; pi < 3; pi++) begin
      int period;
      period = (pi == 0) ? 399 : (pi == 1) ? 422 : 376;
      for (int f = 0; f < 3; f++) begin
        int hs0, rs0;
        hs0 = n_hs8; rs0 = n_rs8;
        send_frame8(period);
        repeat (1000) @(negedge clk);
        check(n_hs8 - hs0 == 1, $sformatf("reference setting, period %0d: one hard sync", period));
        ok = (got8.size() >= bits.size());
        for (int i = 0; i < bits.size() && ok; i++) if (got8[i] != bits[i]) ok = 0;
        check(ok, $sformatf("reference setting, period %0d frame %0d: all bits sampled correctly",
                            period, f));
        if (period != 399) check(n_rs8 - rs0 > 0, "reference setting: resynchronised");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

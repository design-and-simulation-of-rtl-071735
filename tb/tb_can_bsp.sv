// tb_can_bsp: checks the bit stream processor on its own, with an ideal bit clock.
// Two can_bsp instances (A and B) share a wired-AND bus. A bit lasts 8 clocks: tx_point at
// count 0, the bus is sampled at count 5 (sampled_bit and sample_point registered as the bit
// timing logic does). The acceptance filter is replaced by id_ok = 1 and the error state inputs
// are driven by the testbench.
//  1. Random standard and extended data frames A -> B and B -> A. The testbench builds the
//     exact bus waveform itself (CRC by long division, stuffing after five equal bits, ACK slot
//     dominant, recessive delimiters and EOF) and compares every bus bit from SOF to the end of
//     EOF, which also checks the frame length in bit times. The receiver's FIFO bytes must equal
//     the message in buffer layout, and tx_done / tx_success / rx_success must pulse once.
//  2. Both request in the same bit: the lower identifier wins, the loser reports arb_lost and
//     sends its frame afterwards.
//  3. No receiver (B in reset mode): ACK error and tx_error at A; error-active A sends a
//     dominant flag, error-passive A a recessive one.
//  4. Six dominant bits forced into A's data field: bit error at A, stuff error at B, error
//     flags, then A's frame is repeated and received once.
//  5. A dominant bit forced into the first intermission bit: both nodes send an overload flag
//     (6 dominant bits) and an 8-bit delimiter; no error counter moves.
//  6. A dominant last EOF bit: overload frame at the receiver, form error at the transmitter.
// Scenario 3 also measures the error-passive retry gap: 6 recessive flag bits, 8 delimiter
// bits, 3 intermission bits and 8 suspend-transmission bits.
// Frame layout, stuffing rule, CRC polynomial, ACK and EOF follow the CAN frame description;
// the 8-clock ideal bit clock and the checked FIFO byte layout are this testbench's choices.
module tb_can_bsp;
  import can_pkg::*;

  logic clk = 1'b0, rst;
  always #5 clk = !clk;

  localparam int BIT = 8;
  int   bcnt;
  logic tx_point, sample_point, sampled_bit, bus, force_dom;
  logic txo [2];

  assign bus = txo[0] & txo[1] & !force_dom;

  always_ff @(posedge clk) begin
    if (rst) begin
      bcnt <= 0; tx_point <= 0; sample_point <= 0; sampled_bit <= 1;
    end else begin
      bcnt         <= (bcnt == BIT - 1) ? 0 : bcnt + 1;
      tx_point     <= (bcnt == BIT - 1);
      sample_point <= (bcnt == 4);
      if (bcnt == 4) sampled_bit <= bus;
    end
  end

  logic       reset_mode [2];
  logic       tx_request [2];
  can_frame_t tx_frame   [2];
  logic       passive    [2];
  logic       tx_pending [2], tx_done [2], fifo_wr [2], fifo_commit [2];
  logic [7:0] fifo_data  [2];
  logic       tx_error [2], rx_error [2], tx_success [2], rx_success [2];
  logic       arb_lost [2], bit_error [2], stuff_error [2], ack_error [2], ovl [2];

  for (genvar n = 0; n < 2; n++) begin : g_node
    logic        hse, transmitting, go_crc_lim, go_inter, go_err, rec11, receiving;
    logic [28:0] rid;
    logic        ride, rrtr, nb0, nb1, crc_e, form_e, stuff_b;
    logic [7:0]  d0, d1;
    can_bsp u_bsp (
      .clk(clk), .rst(rst), .reset_mode(reset_mode[n]), .self_test(1'b0),
      .sample_point(sample_point), .sampled_bit(sampled_bit), .tx_point(tx_point),
      .tx(txo[n]), .hard_sync_enable(hse), .transmitting(transmitting),
      .tx_request(tx_request[n]), .tx_frame(tx_frame[n]), .tx_pending(tx_pending[n]),
      .tx_done(tx_done[n]), .rx_id(rid), .rx_ide(ride), .rx_rtr(rrtr), .rx_data0(d0),
      .rx_data1(d1), .rx_no_byte0(nb0), .rx_no_byte1(nb1), .go_rx_crc_lim(go_crc_lim),
      .go_rx_inter(go_inter), .go_error_frame(go_err), .go_overload_frame(ovl[n]), .id_ok(1'b1),
      .fifo_wr(fifo_wr[n]), .fifo_data(fifo_data[n]), .fifo_commit(fifo_commit[n]),
      .node_error_passive(passive[n]), .node_bus_off(1'b0), .tx_error(tx_error[n]),
      .rx_error(rx_error[n]), .tx_success(tx_success[n]), .rx_success(rx_success[n]),
      .recessive_11(rec11), .receiving(receiving), .arb_lost(arb_lost[n]),
      .bit_error(bit_error[n]), .stuff_error(stuff_error[n]), .crc_error(crc_e),
      .form_error(form_e), .ack_error(ack_error[n]), .stuff_bit(stuff_b));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- monitors
  logic [7:0] rxq [2][$];       // bytes of the last committed message per node
  logic [7:0] cur [2][$];
  int n_commit [2], n_txdone [2], n_txerr [2], n_rxerr [2], n_arb [2], n_ack [2];
  int n_bit [2], n_stuff [2], n_txok [2], n_rxok [2], n_ovl [2];
  int ack_pos;                  // bus bit index of A's last ACK error
  logic busq [$];               // bus bits, recorded at sample points

  always @(posedge clk) begin
    for (int n = 0; n < 2; n++) begin
      if (fifo_wr[n]) cur[n].push_back(fifo_data[n]);
      if (fifo_commit[n]) begin
        rxq[n] = cur[n];
        cur[n] = {};
        n_commit[n]++;
      end
      n_txdone[n] += int'(tx_done[n]);
      n_txerr[n]  += int'(tx_error[n]);
      n_rxerr[n]  += int'(rx_error[n]);
      n_arb[n]    += int'(arb_lost[n]);
      n_ack[n]    += int'(ack_error[n]);
      n_bit[n]    += int'(bit_error[n]);
      n_stuff[n]  += int'(stuff_error[n]);
      n_txok[n]   += int'(tx_success[n]);
      n_rxok[n]   += int'(rx_success[n]);
      n_ovl[n]    += int'(ovl[n]);
    end
    if (ack_error[0]) ack_pos = busq.size();
    if (sample_point) busq.push_back(sampled_bit);
  end

  // ---------------------------------------------------------------- reference frame
  function automatic can_frame_t rand_frame(input bit ide);
    can_frame_t f;
    f.ide  = ide;
    f.rtr  = ($urandom % 5 == 0);
    f.dlc  = 4'($urandom % 10);
    f.id   = ide ? 29'($urandom) : {18'd0, 11'($urandom)};
    f.data = {$urandom, $urandom};
    if ($urandom % 3 == 0) f.data = '0;          // long runs: many stuff bits
    return f;
  endfunction

  // Unstuffed bits from SOF to the last data bit.
  function automatic void frame_bits(input can_frame_t f, ref logic q [$]);
    int nb;
    nb = f.rtr ? 0 : (f.dlc > 8 ? 8 : int'(f.dlc));
    q = {};
    q.push_back(1'b0);
    if (f.ide) begin
      for (int i = 28; i >= 18; i--) q.push_back(f.id[i]);
      q.push_back(1'b1); q.push_back(1'b1);
      for (int i = 17; i >= 0; i--) q.push_back(f.id[i]);
      q.push_back(f.rtr); q.push_back(1'b0); q.push_back(1'b0);
    end else begin
      for (int i = 10; i >= 0; i--) q.push_back(f.id[i]);
      q.push_back(f.rtr); q.push_back(1'b0); q.push_back(1'b0);
    end
    for (int i = 3; i >= 0; i--) q.push_back(f.dlc[i]);
    for (int i = 63; i >= 64 - 8 * nb; i--) q.push_back(f.data[i]);
  endfunction

  // Expected bus bits from SOF to the last EOF bit.
  function automatic void bus_bits(input can_frame_t f, ref logic q [$]);
    logic m [$];
    logic s [$];
    logic work [$];
    logic [15:0] gen;
    logic last;
    int run;
    frame_bits(f, m);
    // CRC: remainder of m * x^15 over the generator
    gen = 16'hC599;
    work = m;
    for (int i = 0; i < 15; i++) work.push_back(1'b0);
    for (int i = 0; i < m.size(); i++)
      if (work[i]) for (int j = 0; j < 16; j++) work[i + j] ^= gen[15 - j];
    begin
      int nm;
      nm = m.size();
      for (int j = 0; j < 15; j++) m.push_back(work[nm + j]);
    end
    // stuffing over SOF .. CRC
    s = {}; run = 0; last = 1'b1;
    foreach (m[i]) begin
      if (run == 5) begin
        s.push_back(!last); last = !last; run = 1;
      end
      s.push_back(m[i]);
      if (run > 0 && m[i] == last) run++;
      else begin last = m[i]; run = 1; end
    end
    if (run == 5) s.push_back(!last);
    s.push_back(1'b1);                // CRC delimiter
    s.push_back(1'b0);                // ACK slot, driven by the receiver
    for (int i = 0; i < 8; i++) s.push_back(1'b1);   // ACK delimiter + EOF
    q = s;
  endfunction

  function automatic void layout(input can_frame_t f, ref logic [7:0] q [$]);
    int nb;
    logic [31:0] idb;
    nb = f.rtr ? 0 : (f.dlc > 8 ? 8 : int'(f.dlc));
    q = {};
    q.push_back({f.ide, f.rtr, 2'b00, f.dlc});
    idb = f.ide ? {f.id, 3'b000} : {f.id[10:0], 21'd0};
    for (int i = 0; i < (f.ide ? 4 : 2); i++) q.push_back(idb[31 - 8 * i -: 8]);
    for (int i = 0; i < nb; i++) q.push_back(f.data[63 - 8 * i -: 8]);
  endfunction

  task automatic request(input int n);
    @(negedge clk); tx_request[n] = 1; @(negedge clk); tx_request[n] = 0;
  endtask

  task automatic wait_done(input int n, input int was, output bit ok);
    ok = 0;
    for (int c = 0; c < 400 * BIT; c++) begin
      @(negedge clk);
      if (n_txdone[n] > was) begin ok = 1; break; end
    end
    repeat (20 * BIT) @(negedge clk);   // intermission and FIFO write
  endtask

  // Index of the first dominant bit in the recorded bus bits from position p.
  function automatic int first_dom(input int p);
    for (int i = p; i < busq.size(); i++) if (!busq[i]) return i;
    return -1;
  endfunction

  logic       expb [$];
  logic [7:0] expl [$];
  bit ok;

  initial begin
    rst = 1; force_dom = 0;
    for (int n = 0; n < 2; n++) begin
      reset_mode[n] = 0; tx_request[n] = 0; passive[n] = 0; tx_frame[n] = '0;
    end
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (15 * BIT) @(negedge clk);      // 11 recessive bits to join the bus

    // 1. random frames
    for (int t = 0; t < 40; t++) begin
      int s, r, p0, d0, txd0, rxc0, txok0, rxok0, ofs;
      s = t % 2; r = 1 - s;
      tx_frame[s] = rand_frame(t % 4 >= 2);
      bus_bits(tx_frame[s], expb);
      layout(tx_frame[s], expl);
      d0 = n_txdone[s]; rxc0 = n_commit[r]; txok0 = n_txok[s]; rxok0 = n_rxok[r];
      p0 = busq.size();
      request(s);
      wait_done(s, d0, ok);
      check(ok, $sformatf("frame %0d transmitted", t));
      ofs = first_dom(p0);
      ok = (ofs >= 0) && (busq.size() >= ofs + expb.size());
      for (int i = 0; ok && i < expb.size(); i++)
        if (busq[ofs + i] != expb[i]) begin
          ok = 0;
          $display("frame %0d: bus bit %0d is %0d, want %0d", t, i, busq[ofs + i], expb[i]);
        end
      check(ok, $sformatf("frame %0d: %0d bus bits SOF..EOF match", t, expb.size()));
      check(n_commit[r] == rxc0 + 1, $sformatf("frame %0d stored once at receiver", t));
      check(rxq[r] == expl, $sformatf("frame %0d: receiver bytes match", t));
      check(n_txok[s] == txok0 + 1 && n_rxok[r] == rxok0 + 1, "success pulses");
    end

    // 2. arbitration
    for (int t = 0; t < 6; t++) begin
      int w, l, c0, c1;
      tx_frame[0] = rand_frame(t % 2 != 0);
      tx_frame[1] = rand_frame(t % 2 != 0);
      tx_frame[1].id[3] = ~tx_frame[0].id[3];
      tx_frame[1].id[28:4] = tx_frame[0].id[28:4];
      w = (tx_frame[0].id < tx_frame[1].id) ? 0 : 1;
      l = 1 - w;
      c0 = n_arb[l]; c1 = n_commit[w];
      @(negedge clk); tx_request[0] = 1; tx_request[1] = 1;
      @(negedge clk); tx_request[0] = 0; tx_request[1] = 0;
      wait_done(w, n_txdone[w], ok);
      check(ok, "arbitration winner done");
      check(n_arb[l] == c0 + 1, $sformatf("arbitration %0d: loser %0d reported arb_lost", t, l));
      layout(tx_frame[w], expl);
      check(rxq[l] == expl, "loser received the winner's frame");
      wait_done(l, n_txdone[l], ok);
      check(ok, "arbitration loser sent afterwards");
      layout(tx_frame[l], expl);
      check(rxq[w] == expl && n_commit[w] == c1 + 1, "winner received the loser's frame");
    end

    // 3. no acknowledgement
    reset_mode[1] = 1;
    tx_frame[0] = rand_frame(0);
    begin
      int e0, a0;
      e0 = n_txerr[0];
      a0 = n_ack[0];
      request(0);
      wait (n_ack[0] > a0);
      repeat (40 * BIT) @(negedge clk);
      check(n_txerr[0] > e0, "ACK error reported to the error logic");
      // error active: the dominant flag follows the ACK slot at once
      check(first_dom(ack_pos + 1) == ack_pos + 1, "active error flag right after the ACK slot");
      passive[0] = 1;
      a0 = n_ack[0];
      wait (n_ack[0] > a0);
      repeat (40 * BIT) @(negedge clk);
      // error passive: 6 recessive flag bits, 8 delimiter bits, 3 intermission bits and
      // 8 suspend-transmission bits before the retry's start of frame
      check(first_dom(ack_pos + 1) - ack_pos - 1 == 25,
            $sformatf("passive flag + suspend: %0d recessive bits before the retry (want 25)",
                      first_dom(ack_pos + 1) - ack_pos - 1));
      repeat (100 * BIT) @(negedge clk);
      check(n_ack[0] > a0 + 1, "repeated attempts without ACK");
    end
    // B back, A active again: the pending frame goes through
    passive[0] = 0;
    reset_mode[1] = 0;
    begin
      int d0;
      d0 = n_txdone[0];
      wait_done(0, d0, ok);
      check(ok, "pending frame sent once a receiver is back");
      layout(tx_frame[0], expl);
      check(rxq[1] == expl, "frame received after ACK errors");
    end

    // 4. disturbance in the data field
    begin
      int c1, be0, se0, re0;
      tx_frame[0] = rand_frame(0);
      tx_frame[0].rtr = 0; tx_frame[0].dlc = 4'd8;
      tx_frame[0].data = 64'h55AA_55AA_55AA_55AA;
      c1 = n_commit[1]; be0 = n_bit[0]; se0 = n_stuff[1]; re0 = n_rxerr[1];
      request(0);
      wait (g_node[0].u_bsp.state == 10);
      repeat (4 * BIT) @(negedge clk);
      force_dom = 1;
      repeat (6 * BIT) @(negedge clk);
      force_dom = 0;
      wait_done(0, n_txdone[0], ok);
      check(ok, "frame repeated after disturbance");
      check(n_bit[0] > be0, "bit error at the transmitter");
      check(n_stuff[1] > se0 && n_rxerr[1] > re0, "stuff error at the receiver");
      layout(tx_frame[0], expl);
      check(rxq[1] == expl && n_commit[1] == c1 + 1, "received exactly once after the error");
    end

    // 5. overload frame: dominant first intermission bit
    begin
      int p, o0, o1, te, re, c1;
      bit allok;
      tx_frame[0] = rand_frame(0);
      o0 = n_ovl[0]; o1 = n_ovl[1]; te = n_txerr[0]; re = n_rxerr[1]; c1 = n_commit[1];
      request(0);
      wait (g_node[0].u_bsp.state == 16);          // intermission
      @(posedge clk iff tx_point);
      @(negedge clk);
      p = busq.size();
      force_dom = 1;
      repeat (BIT) @(negedge clk);
      force_dom = 0;
      repeat (40 * BIT) @(negedge clk);
      check(n_ovl[0] == o0 + 1 && n_ovl[1] == o1 + 1, "both nodes start an overload frame");
      allok = 1;
      for (int i = 0; i < 7; i++) if (busq[p + i] != 1'b0) allok = 0;
      for (int i = 7; i < 15; i++) if (busq[p + i] != 1'b1) allok = 0;
      check(allok, "overload flag (6 dominant) and 8-bit delimiter on the bus");
      check(n_txerr[0] == te && n_rxerr[1] == re, "overload changes no error counter");
      check(n_commit[1] == c1 + 1, "frame before the overload stored once");
      tx_frame[0] = rand_frame(1);
      wait_done(0, n_txdone[0], ok);
      request(0);
      wait_done(0, n_txdone[0], ok);
      layout(tx_frame[0], expl);
      check(ok && rxq[1] == expl, "frame after the overload received");
    end

    // 6. dominant last EOF bit: overload at the receiver, form error at the transmitter
    begin
      int o1, f0, re;
      tx_frame[0] = rand_frame(0);
      o1 = n_ovl[1]; f0 = n_txerr[0]; re = n_rxerr[1];
      request(0);
      wait (g_node[1].u_bsp.state == 15 && g_node[1].u_bsp.bitcnt == 6);
      @(posedge clk iff tx_point);
      @(negedge clk);
      force_dom = 1;
      repeat (BIT) @(negedge clk);
      force_dom = 0;
      wait_done(0, n_txdone[0], ok);
      check(n_ovl[1] == o1 + 1 && n_rxerr[1] == re, "receiver: overload frame, no error");
      check(n_txerr[0] == f0 + 1 && ok, "transmitter: form error, then the frame is repeated");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_can_top: end-to-end test of two CAN controllers on one bus.
// Two can_top nodes (A and B), plus a third (C) used in one scenario, share a wired-AND bus (dominant 0 wins); the testbench can also
// pull the bus dominant itself to inject a disturbance. Each node is driven through its host
// register interface only. Expected results (received bytes, counters, flags) are computed in
// the testbench from the messages it sends and the CAN rules, not taken from the design.
// Scenarios, in order:
//   1  standard data frame A -> B, 2 data bytes
//   2  simultaneous requests: arbitration, the lower identifier wins, the loser retries
//   3  extended frame with 8 bytes of 0x00/0xFF (many stuff bits) B -> A
//   4  remote frame, and a frame rejected by B's acceptance filter
//   5  injected dominant bit during the data field: error frames and an automatic retry,
//      error counters TEC = 8 - 1, REC = 1 - 1
//   5b disturbance seen by B only: CRC error at B (a third node C acknowledges), retry
//   6  receive FIFO overrun at A (6 messages of 11 bytes into 64 bytes)
//   7  self test: A alone (B in reset mode) receives its own frame without an acknowledgement
//   8  no acknowledgement: A's TEC climbs through error passive to bus off, then A recovers
//      after 128 x 11 recessive bits and sends the frame once B is back
//   9  dominant bit in the first intermission bit: both nodes send an overload frame, no
//      error counter moves
// Each mechanism (arbitration loss, stuff bits, each error kind, error passive, bus off,
// recovery, overrun, filter rejection, overload, hard sync and resync) is counted and must
// occur.
// Bit time: node A 2 clocks per quantum x 9 quanta, node B 1 clock x 18 quanta = 18 clocks.
// Bit timing values, the register map and the three-node bus are this testbench's and this
// design's choices; the mechanisms counted are the ones the controller description names.
module tb_can_top;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = !clk;

  logic       cs   [3];
  logic       rd   [3];
  logic       wr   [3];
  logic [5:0] addr [3];
  logic [7:0] din  [3];
  logic [7:0] dout [3];
  logic       txo  [3];
  logic       inject, inject_b;
  logic       bus;

  assign bus = txo[0] & txo[1] & txo[2] & !inject;

  can_top dut_a (.clk(clk), .rst(rst), .cs(cs[0]), .rd(rd[0]), .wr(wr[0]), .addr(addr[0]),
                 .data_in(din[0]), .data_out(dout[0]), .rx(bus), .tx(txo[0]));
  can_top dut_b (.clk(clk), .rst(rst), .cs(cs[1]), .rd(rd[1]), .wr(wr[1]), .addr(addr[1]),
                 .data_in(din[1]), .data_out(dout[1]), .rx(bus & !inject_b), .tx(txo[1]));
  // Node C only acknowledges, in scenario 5b; otherwise it is held in reset mode.
  can_top dut_c (.clk(clk), .rst(rst), .cs(cs[2]), .rd(rd[2]), .wr(wr[2]), .addr(addr[2]),
                 .data_in(din[2]), .data_out(dout[2]), .rx(bus), .tx(txo[2]));

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------------ event counters
  int n_arb_lost, n_stuff_bits, n_bit_err, n_stuff_err, n_form_err, n_ack_err, n_crc_err;
  int n_hard_sync, n_resync, n_passive, n_bus_off, n_recovered, n_overrun, n_rejected;
  int n_overload;
  logic passive_q, bus_off_q;

  always @(posedge clk) begin
    if (!rst) begin
      n_arb_lost   += int'(dut_a.ev_arb_lost) + int'(dut_b.ev_arb_lost);
      n_stuff_bits += int'(dut_a.ev_stuff_bit) + int'(dut_b.ev_stuff_bit);
      n_bit_err    += int'(dut_a.ev_bit_error) + int'(dut_b.ev_bit_error);
      n_stuff_err  += int'(dut_a.ev_stuff_error) + int'(dut_b.ev_stuff_error);
      n_form_err   += int'(dut_a.ev_form_error) + int'(dut_b.ev_form_error);
      n_ack_err    += int'(dut_a.ev_ack_error) + int'(dut_b.ev_ack_error);
      n_crc_err    += int'(dut_a.ev_crc_error) + int'(dut_b.ev_crc_error);
      n_hard_sync  += int'(dut_a.hard_sync) + int'(dut_b.hard_sync);
      n_resync     += int'(dut_a.resync) + int'(dut_b.resync);
      n_overload   += int'(dut_a.go_overload_frame) + int'(dut_b.go_overload_frame);
      passive_q    <= dut_a.node_error_passive;
      bus_off_q    <= dut_a.node_bus_off;
      if (dut_a.node_error_passive && !passive_q && !dut_a.node_bus_off) n_passive++;
      if (dut_a.node_bus_off && !bus_off_q) n_bus_off++;
      if (!dut_a.node_bus_off && bus_off_q) n_recovered++;
    end
  end

  // ------------------------------------------------------------------ host bus tasks
  task automatic host_write(input int n, input logic [5:0] a, input logic [7:0] d);
    @(negedge clk);
    cs[n] = 1'b1; wr[n] = 1'b1; addr[n] = a; din[n] = d;
    @(negedge clk);
    cs[n] = 1'b0; wr[n] = 1'b0;
  endtask

  task automatic host_read(input int n, input logic [5:0] a, output logic [7:0] d);
    @(negedge clk);
    cs[n] = 1'b1; rd[n] = 1'b1; addr[n] = a;
    @(negedge clk);
    cs[n] = 1'b0; rd[n] = 1'b0;
    d = dout[n];
  endtask

  // Configure one node: bus timing, accept-all filter (or a given one), leave reset mode.
  task automatic configure(input int n, input logic [7:0] mode, input logic [7:0] acr0,
                           input logic [7:0] amr0);
    host_write(n, 6'd0, 8'h01);
    if (n == 0) begin
      host_write(n, 6'd6, 8'h41);          // SJW=1 (2 tq), BRP=1 -> 2 clocks per quantum
      host_write(n, 6'd7, 8'h24);          // TSEG2=2 (3 tq), TSEG1=4 (5 tq): 9 tq
    end else begin
      host_write(n, 6'd6, 8'hC0);          // SJW=3 (4 tq), BRP=0 -> 1 clock per quantum
      host_write(n, 6'd7, 8'h5A);          // TSEG2=5 (6 tq), TSEG1=10 (11 tq): 18 tq
    end
    host_write(n, 6'd8, acr0);
    for (int i = 9; i < 12; i++) host_write(n, 6'(i), 8'h00);
    host_write(n, 6'd12, amr0);
    for (int i = 13; i < 16; i++) host_write(n, 6'(i), 8'hFF);
    host_write(n, 6'd0, mode);
  endtask

  typedef struct {
    bit          ide;
    bit          rtr;
    logic [3:0]  dlc;
    logic [28:0] id;
    logic [7:0]  data [8];
  } msg_t;

  function automatic int msg_len(input msg_t m);
    int nb;
    nb = m.rtr ? 0 : ((m.dlc > 8) ? 8 : int'(m.dlc));
    return (m.ide ? 5 : 3) + nb;
  endfunction

  // Buffer layout of a message (independent of the design's encoder).
  function automatic logic [7:0] msg_byte(input msg_t m, input int i);
    logic [31:0] idb;
    int hdr;
    hdr = m.ide ? 5 : 3;
    idb = m.ide ? {m.id, 3'b000} : {m.id[10:0], 21'd0};
    if (i == 0) return {m.ide, m.rtr, 2'b00, m.dlc};
    if (i < hdr) return idb[31 - 8 * (i - 1) -: 8];
    return m.data[i - hdr];
  endfunction

  task automatic load_tx(input int n, input msg_t m);
    for (int i = 0; i < msg_len(m); i++) host_write(n, 6'(16 + i), msg_byte(m, i));
  endtask

  task automatic wait_status(input int n, input int bitpos, input logic val,
                             input int max_cycles, output bit ok);
    logic [7:0] st;
    ok = 1'b0;
    for (int c = 0; c < max_cycles; c += 2) begin
      host_read(n, 6'd2, st);
      if (st[bitpos] == val) begin
        ok = 1'b1;
        break;
      end
    end
  endtask

  // Read the oldest message of node n and compare it with m; release it.
  task automatic expect_rx(input int n, input msg_t m, input string what);
    logic [7:0] d;
    bit ok;
    wait_status(n, 0, 1'b1, 20000, ok);
    check(ok, {what, ": message arrived"});
    if (ok) begin
      for (int i = 0; i < msg_len(m); i++) begin
        host_read(n, 6'(32 + i), d);
        check(d == msg_byte(m, i), $sformatf("%s: byte %0d got %02h want %02h", what, i, d,
                                             msg_byte(m, i)));
      end
    end
    host_write(n, 6'd1, 8'h04);
  endtask

  function automatic msg_t make_std(input logic [10:0] id, input int dlc, input int seed);
    msg_t m;
    m.ide = 1'b0;
    m.rtr = 1'b0;
    m.dlc = 4'(dlc);
    m.id  = {18'd0, id};
    for (int i = 0; i < 8; i++) m.data[i] = 8'(seed * 37 + i * 11 + 5);
    return m;
  endfunction

  // ------------------------------------------------------------------ test sequence
  logic [7:0] rdv;
  bit ok;
  msg_t m1, m2, m3, m4;
  int t_start;

  initial begin
    rst = 1'b1;
    inject = 1'b0;
    inject_b = 1'b0;
    for (int n = 0; n < 3; n++) begin
      cs[n] = 0; rd[n] = 0; wr[n] = 0; addr[n] = '0; din[n] = '0;
    end
    passive_q = 0; bus_off_q = 0;
    {n_arb_lost, n_stuff_bits, n_bit_err, n_stuff_err, n_form_err, n_ack_err, n_crc_err} = '0;
    {n_hard_sync, n_resync, n_passive, n_bus_off, n_recovered, n_overrun, n_rejected} = '0;
    n_overload = 0;
    repeat (5) @(posedge clk);
    rst = 1'b0;

    host_read(0, 6'd0, rdv);
    check(rdv == 8'h01, "node starts in reset mode");

    configure(0, 8'h00, 8'h00, 8'hFF);
    configure(1, 8'h00, 8'h00, 8'hFF);
    configure(2, 8'h01, 8'h00, 8'hFF);
    repeat (400) @(posedge clk);      // bus integration: 11 recessive bits

    // 1: standard frame A -> B
    m1 = make_std(11'h123, 2, 1);
    m1.data[0] = 8'hAA; m1.data[1] = 8'h55;
    load_tx(0, m1);
    t_start = int'($time);
    host_write(0, 6'd1, 8'h01);
    expect_rx(1, m1, "std A->B");
    wait_status(0, 3, 1'b1, 4000, ok);
    check(ok, "A reports transmission complete");
    host_read(0, 6'd2, rdv);
    check(rdv[2], "A transmit buffer free again");

    // 2: arbitration, both request in the same clock; B (0x0F0) beats A (0x100)
    m1 = make_std(11'h100, 3, 2);
    m2 = make_std(11'h0F0, 4, 3);
    load_tx(0, m1);
    load_tx(1, m2);
    @(negedge clk);
    cs[0] = 1; wr[0] = 1; addr[0] = 6'd1; din[0] = 8'h01;
    cs[1] = 1; wr[1] = 1; addr[1] = 6'd1; din[1] = 8'h01;
    @(negedge clk);
    cs[0] = 0; wr[0] = 0; cs[1] = 0; wr[1] = 0;
    expect_rx(0, m2, "arbitration winner B->A");
    expect_rx(1, m1, "arbitration loser A->B retried");
    check(n_arb_lost >= 1, "arbitration lost at least once");

    // 3: extended frame, 8 bytes of 00/FF, B -> A
    m3.ide = 1; m3.rtr = 0; m3.dlc = 4'd8; m3.id = 29'h1ABC_DE0F;
    for (int i = 0; i < 8; i++) m3.data[i] = (i % 2 != 0) ? 8'hFF : 8'h00;
    load_tx(1, m3);
    host_write(1, 6'd1, 8'h01);
    expect_rx(0, m3, "extended B->A");
    check(n_stuff_bits > 10, "stuff bits inserted and removed");

    // 4a: remote frame A -> B
    m4 = make_std(11'h7A5, 5, 4);
    m4.rtr = 1;
    load_tx(0, m4);
    host_write(0, 6'd1, 8'h01);
    expect_rx(1, m4, "remote A->B");

    // 4b: B accepts only identifiers with ID[10:3] = 0x24 exactly; A sends 0x123 (0x24) then
    // 0x3FF (rejected), B must hold only the first.
    host_write(1, 6'd0, 8'h01);
    host_write(1, 6'd8, 8'h24);
    host_write(1, 6'd12, 8'h00);
    host_write(1, 6'd0, 8'h00);
    repeat (400) @(posedge clk);
    m1 = make_std(11'h3FF, 1, 5);
    load_tx(0, m1);
    host_write(0, 6'd1, 8'h01);
    wait_status(0, 3, 1'b1, 6000, ok);
    check(ok, "rejected frame still transmitted (acknowledged)");
    repeat (100) @(posedge clk);
    host_read(1, 6'd3, rdv);
    check(rdv == 8'd0, "filter rejected 0x3FF");
    if (rdv == 8'd0) n_rejected++;
    m1 = make_std(11'h123, 1, 6);
    load_tx(0, m1);
    host_write(0, 6'd1, 8'h01);
    expect_rx(1, m1, "filter accepted 0x123");
    host_write(1, 6'd0, 8'h01);
    host_write(1, 6'd12, 8'hFF);
    host_write(1, 6'd0, 8'h00);
    repeat (400) @(posedge clk);

    // 5: disturbance in the data field of A's frame
    m1 = make_std(11'h055, 8, 7);
    load_tx(0, m1);
    host_write(0, 6'd1, 8'h01);
    wait (dut_a.u_bsp.state == 10);    // A's bit stream processor is in the data field
    forever begin                      // find a bit time in which A sends recessive
      @(posedge dut_a.tx_point);
      repeat (3) @(posedge clk);
      if (txo[0]) break;
    end
    inject = 1'b1;
    repeat (18) @(posedge clk);
    inject = 1'b0;
    expect_rx(1, m1, "retry after bus error");
    host_read(1, 6'd3, rdv);
    check(rdv == 8'd0, "exactly one copy received after error");
    host_read(0, 6'd5, rdv);
    check(rdv == 8'd7, $sformatf("TEC after one error and one success = 7, got %0d", rdv));
    host_read(1, 6'd4, rdv);
    check(rdv == 8'd0, $sformatf("REC after one error and one success = 0, got %0d", rdv));

    // 5b: disturbance seen by B only, in a data field of alternating bits (no stuff error can
    // follow): B finds a CRC error after the ACK delimiter (node C acknowledges, so A sees
    // no ACK error) and sends an error frame; A retries.
    host_write(2, 6'd0, 8'h00);
    repeat (400) @(posedge clk);
    m1 = make_std(11'h066, 2, 8);
    m1.data[0] = 8'h55; m1.data[1] = 8'hAA;
    load_tx(0, m1);
    host_write(0, 6'd1, 8'h01);
    wait (dut_a.u_bsp.state == 10);
    forever begin
      @(posedge dut_a.tx_point);
      repeat (3) @(posedge clk);
      if (txo[0]) break;
    end
    inject_b = 1'b1;
    repeat (18) @(posedge clk);
    inject_b = 1'b0;
    expect_rx(1, m1, "retry after CRC error");
    check(n_crc_err == 1, $sformatf("one CRC error detected, got %0d", n_crc_err));
    host_read(1, 6'd3, rdv);
    check(rdv == 8'd0, "exactly one copy received after CRC error");
    host_write(2, 6'd0, 8'h01);

    // 6: overrun. Five messages of 11 bytes fit in 64, the sixth does not.
    for (int k = 0; k < 6; k++) begin
      m2 = make_std(11'(11'h200 + k), 8, 10 + k);
      load_tx(1, m2);
      host_write(1, 6'd1, 8'h01);
      wait_status(1, 3, 1'b1, 8000, ok);
      check(ok, $sformatf("overrun test message %0d sent", k));
    end
    host_read(0, 6'd3, rdv);
    check(rdv == 8'd5, $sformatf("5 messages buffered, got %0d", rdv));
    host_read(0, 6'd2, rdv);
    check(rdv[1], "data overrun flagged");
    if (rdv[1]) n_overrun++;
    for (int k = 0; k < 5; k++) expect_rx(0, make_std(11'(11'h200 + k), 8, 10 + k),
                                          $sformatf("buffered message %0d", k));
    host_write(0, 6'd1, 8'h08);
    host_read(0, 6'd2, rdv);
    check(!rdv[1] && !rdv[0], "overrun cleared, buffer empty");

    // 7: self test, B held in reset mode (no acknowledgement on the bus)
    host_write(1, 6'd0, 8'h01);
    host_write(0, 6'd0, 8'h01);
    host_write(0, 6'd0, 8'h04);
    repeat (400) @(posedge clk);
    m1 = make_std(11'h50A, 1, 20);
    m1.data[0] = 8'h0A;
    load_tx(0, m1);
    host_write(0, 6'd1, 8'h01);
    expect_rx(0, m1, "self reception");
    host_read(0, 6'd5, rdv);
    check(rdv == 8'd0, "self test needs no ACK (TEC 0)");

    // 8: no acknowledgement -> error passive -> bus off -> recovery
    host_write(0, 6'd0, 8'h01);
    host_write(0, 6'd0, 8'h00);
    repeat (400) @(posedge clk);
    m1 = make_std(11'h011, 1, 21);
    load_tx(0, m1);
    host_write(0, 6'd1, 8'h01);
    wait_status(0, 6, 1'b1, 60000, ok);
    check(ok, "error passive reached");
    wait_status(0, 7, 1'b1, 80000, ok);
    check(ok, "bus off reached");
    host_read(0, 6'd5, rdv);
    check(dut_a.tec > 9'd255, "TEC above 255 at bus off");
    host_write(1, 6'd0, 8'h00);          // B back on the bus
    wait_status(0, 7, 1'b0, 60000, ok);
    check(ok, "bus off recovery after 128 x 11 recessive bits");
    expect_rx(1, m1, "frame delivered after recovery");

    // 9: dominant bit in the first intermission bit -> overload frame at both nodes
    begin
      int ov0;
      logic [7:0] tec0, rec0;
      repeat (400) @(posedge clk);
      host_read(0, 6'd5, tec0);
      host_read(1, 6'd4, rec0);
      ov0 = n_overload;
      m1 = make_std(11'h2A5, 2, 22);
      load_tx(0, m1);
      host_write(0, 6'd1, 8'h01);
      wait (dut_a.u_bsp.state == 16);    // intermission
      @(posedge dut_a.tx_point);
      repeat (3) @(posedge clk);
      inject = 1'b1;
      repeat (18) @(posedge clk);
      inject = 1'b0;
      expect_rx(1, m1, "frame before the overload frame");
      check(n_overload == ov0 + 2, $sformatf("overload frame at both nodes, got %0d", n_overload - ov0));
      host_read(1, 6'd4, rdv);
      check(rdv == ((rec0 == 0) ? 8'd0 : rec0 - 8'd1), "overload does not count as an error (REC)");
      host_read(0, 6'd5, rdv);
      check(rdv == ((tec0 == 0) ? 8'd0 : tec0 - 8'd1), "overload does not count as an error (TEC)");
    end

    // mechanism coverage
    check(n_arb_lost > 0,   "mechanism: arbitration lost");
    check(n_stuff_bits > 0, "mechanism: bit stuffing");
    check(n_bit_err > 0,    "mechanism: bit error");
    check(n_stuff_err + n_form_err > 0, "mechanism: stuff or form error at receivers");
    check(n_ack_err > 0,    "mechanism: ACK error");
    check(n_crc_err > 0,    "mechanism: CRC error");
    check(n_hard_sync > 0,  "mechanism: hard synchronisation");
    check(n_resync > 0,     "mechanism: resynchronisation");
    check(n_passive > 0,    "mechanism: error passive");
    check(n_bus_off > 0,    "mechanism: bus off");
    check(n_recovered > 0,  "mechanism: bus off recovery");
    check(n_overrun > 0,    "mechanism: FIFO overrun");
    check(n_rejected > 0,   "mechanism: acceptance filter rejection");
    check(n_overload > 0,   "mechanism: overload frame");
    $display("events: arb_lost=%0d stuff_bits=%0d bit_err=%0d stuff_err=%0d form_err=%0d ack_err=%0d crc_err=%0d hard_sync=%0d resync=%0d passive=%0d bus_off=%0d recovered=%0d",
             n_arb_lost, n_stuff_bits, n_bit_err, n_stuff_err, n_form_err, n_ack_err,
             n_crc_err, n_hard_sync, n_resync, n_passive, n_bus_off, n_recovered);
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

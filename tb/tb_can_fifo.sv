// tb_can_fifo: checks the receive message buffer.
// 1. The reference sequence 00001010, 00010100, 00011110, 00101000, 00110010 written as one
//    message reads back in order through the window (data one clock after the address).
// 2. Random messages of 3..13 bytes are queued and read back oldest first; info_cnt and
//    info_empty follow the number of complete messages; release_buffer drops the oldest.
// 3. Writing more bytes than the 64 free ones drops that message and sets overrun; earlier
//    messages are intact; clear_overrun clears the flag.
// 4. reset_mode empties the buffer.
// A queue of byte arrays in the testbench is the reference.
module tb_can_fifo;

  logic       clk = 1'b0, rst, reset_mode, wr, wli, rel, clr, sel;
  logic [7:0] data_in, data_out;
  logic [5:0] addr;
  logic       overrun, info_empty;
  logic [6:0] info_cnt;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  can_fifo #(.ADDR_W(6)) dut (
    .clk(clk), .rst(rst), .reset_mode(reset_mode), .wr(wr), .data_in(data_in),
    .write_length_info(wli), .release_buffer(rel), .clear_overrun(clr), .fifo_selected(sel),
    .addr(addr), .data_out(data_out), .overrun(overrun), .info_empty(info_empty),
    .info_cnt(info_cnt));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  typedef logic [7:0] msg_t [$];
  msg_t q [$];
  int   used;

  task automatic put(input msg_t m);
    foreach (m[i]) begin
      @(negedge clk);
      wr = 1; data_in = m[i];
    end
    @(negedge clk);
    wr = 0; wli = 1;
    @(negedge clk);
    wli = 0;
  endtask

  task automatic get_check(input msg_t m, input string what);
    foreach (m[i]) begin
      @(negedge clk);
      sel = 1; addr = 6'(i);
      @(negedge clk);
      sel = 0;
      check(data_out == m[i], $sformatf("%s byte %0d: %02h want %02h", what, i, data_out, m[i]));
    end
    @(negedge clk);
    rel = 1;
    @(negedge clk);
    rel = 0;
  endtask

  msg_t m, ref_m;

  initial begin
    rst = 1; reset_mode = 0; wr = 0; wli = 0; rel = 0; clr = 0; sel = 0;
    data_in = 0; addr = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    check(info_empty && info_cnt == 0, "empty after reset");

    ref_m = '{8'b00001010, 8'b00010100, 8'b00011110, 8'b00101000, 8'b00110010};
    put(ref_m);
    check(info_cnt == 1 && !info_empty, "one message after reference write");
    get_check(ref_m, "reference");
    check(info_cnt == 0 && info_empty, "empty after release");

    // random traffic, at most 40 bytes queued so nothing overflows
    used = 0;
    for (int t = 0; t < 300; t++) begin
      if (($urandom % 2 == 0) && used <= 40) begin
        m = {};
        for (int i = 0; i < 3 + $urandom % 11; i++) m.push_back(8'($urandom));
        put(m);
        q.push_back(m);
        used += m.size();
      end else if (q.size() > 0) begin
        m = q.pop_front();
        get_check(m, $sformatf("random %0d", t));
        used -= m.size();
      end
      check(info_cnt == 7'(q.size()), $sformatf("info_cnt %0d want %0d", info_cnt, q.size()));
      check(info_empty == (q.size() == 0), "info_empty");
      check(!overrun, "no overrun in random traffic");
    end
    while (q.size() > 0) begin
      m = q.pop_front();
      get_check(m, "drain");
    end

    // overrun: 5 x 13 = 65 bytes; the fifth message does not fit
    for (int k = 0; k < 5; k++) begin
      m = {};
      for (int i = 0; i < 13; i++) m.push_back(8'(k * 16 + i));
      put(m);
      if (k < 4) q.push_back(m);
    end
    check(overrun, "overrun set");
    check(info_cnt == 4, $sformatf("4 messages kept, got %0d", info_cnt));
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    check(!overrun, "overrun cleared");
    m = q.pop_front();
    get_check(m, "after overrun");
    check(info_cnt == 3, "3 left");

    @(negedge clk); reset_mode = 1; @(negedge clk); reset_mode = 0;
    check(info_empty && info_cnt == 0, "reset_mode empties the buffer");
    q = {};
    m = '{8'h11, 8'h22, 8'h33};
    put(m);
    get_check(m, "after reset_mode");

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

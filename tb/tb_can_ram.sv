// tb_can_ram: checks the two-port 64x8 RAM with unrelated write (period 10) and read
// (period 14) clocks. All 64 words are written with random data, then read back in random
// order; rdata must show the word one read clock after re. re low must hold rdata, and a write
// with we low must not change the memory.
// The 64x8 size, separate clocks and enables follow the RAM description; the one-clock read
// latency is this design's choice.
module tb_can_ram;

  logic       wclk = 1'b0, rclk = 1'b0;
  logic       we, re;
  logic [5:0] waddr, raddr;
  logic [7:0] wdata, rdata;
  logic [7:0] model [64];
  int checks = 0, failures = 0;

  always #5 wclk = !wclk;
  always #7 rclk = !rclk;

  can_ram #(.DATA_W(8), .ADDR_W(6)) dut (
    .wclk(wclk), .we(we), .waddr(waddr), .wdata(wdata),
    .rclk(rclk), .re(re), .raddr(raddr), .rdata(rdata));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic do_read(input logic [5:0] a, input logic [7:0] want);
    @(negedge rclk);
    re = 1'b1; raddr = a;
    @(negedge rclk);
    re = 1'b0;
    check(rdata == want, $sformatf("read %0d: %02h want %02h", a, rdata, want));
    raddr = ~a;
    @(negedge rclk);
    check(rdata == want, "rdata holds while re is low");
  endtask

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge wclk);
      we = 1; waddr = 6'(i); wdata = 8'($urandom); model[i] = wdata;
    end
    @(negedge wclk);
    we = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge wclk);
      waddr = 6'(i); wdata = ~model[i];   // we low: must not write
    end
    for (int k = 0; k < 200; k++) begin
      logic [5:0] a;
      a = 6'($urandom);
      do_read(a, model[a]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_can_acf: checks the acceptance filter in its three modes against a reference written
// here as one 32-bit comparison per filter: the frame fields are packed into a word in the
// order the acceptance code bytes cover them, and a message passes when all cared-for bits
// (mask 0, and field present) equal the code. Random identifiers, codes and masks are used, with
// codes often copied from the frame so that matches occur. id_ok must take the result at
// go_rx_crc_lim and clear on go_rx_inter, go_error_frame and reset_mode.
// The match rule checked here (mask bit 1 = don't care, SJA1000-style field layout) is this
// design's choice; the port set follows the controller's acceptance filter.
module tb_can_acf;

  logic        clk = 1'b0, rst;
  logic [28:0] id;
  logic        ide, rtr, no_byte0, no_byte1, reset_mode, afm, ext_mode;
  logic [7:0]  data0, data1;
  logic [7:0]  acr [4];
  logic [7:0]  amr [4];
  logic        go_crc_lim, go_inter, go_err, id_ok;
  int checks = 0, failures = 0, n_accept = 0, n_reject = 0;

  always #5 clk = !clk;

  can_acf dut (
    .clk(clk), .rst(rst), .id(id), .ide(ide), .rtr(rtr), .data0(data0), .data1(data1),
    .no_byte0(no_byte0), .no_byte1(no_byte1), .reset_mode(reset_mode),
    .acceptance_filter_mode(afm), .extended_mode(ext_mode),
    .acceptance_code_0(acr[0]), .acceptance_code_1(acr[1]), .acceptance_code_2(acr[2]),
    .acceptance_code_3(acr[3]), .acceptance_mask_0(amr[0]), .acceptance_mask_1(amr[1]),
    .acceptance_mask_2(amr[2]), .acceptance_mask_3(amr[3]), .go_rx_crc_lim(go_crc_lim),
    .go_rx_inter(go_inter), .go_error_frame(go_err), .id_ok(id_ok));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit pass32(input logic [31:0] v, input logic [31:0] code,
                                input logic [31:0] care);
    return ((v ^ code) & care) == 32'd0;
  endfunction

  function automatic bit reference();
    logic [31:0] code, mask, v, care;
    code = {acr[0], acr[1], acr[2], acr[3]};
    mask = {amr[0], amr[1], amr[2], amr[3]};
    if (!ext_mode) begin
      v = ide ? {id[28:21], 24'd0} : {id[10:3], 24'd0};
      return pass32(v, code, ~mask & 32'hFF00_0000);
    end
    if (afm) begin
      if (!ide) begin
        v    = {id[10:0], rtr, 4'h0, data0, data1};
        care = ~mask & {16'hFFF0, no_byte0 ? 8'h00 : 8'hFF, no_byte1 ? 8'h00 : 8'hFF};
      end else begin
        v    = {id[28:0], rtr, 2'b00};
        care = ~mask & 32'hFFFF_FFFC;
      end
      return pass32(v, code, care);
    end
    if (!ide) begin
      logic [31:0] c1, k1, v1, c2, k2, v2;
      // filter 1: ACR0, ACR1, ACR3[3:0]
      v1 = {id[10:0], rtr, data0[7:4], data0[3:0], 12'd0};
      c1 = {acr[0], acr[1], acr[3][3:0], 12'd0};
      k1 = {~amr[0], ~amr[1], ~amr[3][3:0], 12'd0}
         & (no_byte0 ? 32'hFFF0_0000 : 32'hFFFF_F000);
      // filter 2: ACR2, ACR3[7:4]
      v2 = {id[10:0], rtr, 20'd0};
      c2 = {acr[2], acr[3][7:4], 20'd0};
      k2 = {~amr[2], ~amr[3][7:4], 20'd0};
      return pass32(v1, c1, k1) || pass32(v2, c2, k2);
    end
    return pass32({id[28:13], 16'd0}, {acr[0], acr[1], 16'd0}, {~amr[0], ~amr[1], 16'd0})
        || pass32({id[28:13], 16'd0}, {acr[2], acr[3], 16'd0}, {~amr[2], ~amr[3], 16'd0});
  endfunction

  task automatic pulse_crc_lim();
    @(negedge clk); go_crc_lim = 1; @(negedge clk); go_crc_lim = 0;
  endtask

  initial begin
    rst = 1; reset_mode = 0; go_crc_lim = 0; go_inter = 0; go_err = 0;
    id = 0; ide = 0; rtr = 0; no_byte0 = 0; no_byte1 = 0; afm = 0; ext_mode = 0;
    data0 = 0; data1 = 0;
    for (int i = 0; i < 4; i++) begin acr[i] = 0; amr[i] = 0; end
    repeat (2) @(negedge clk);
    rst = 0;
    check(!id_ok, "id_ok low after reset");

    for (int t = 0; t < 3000; t++) begin
      bit want;
      @(negedge clk);
      id = 29'($urandom); ide = 1'($urandom); rtr = 1'($urandom);
      data0 = 8'($urandom); data1 = 8'($urandom);
      no_byte0 = ($urandom % 4 == 0); no_byte1 = no_byte0 | ($urandom % 4 == 0);
      ext_mode = ($urandom % 3 != 0); afm = 1'($urandom);
      for (int i = 0; i < 4; i++) begin
        acr[i] = 8'($urandom);
        amr[i] = ($urandom % 2 != 0) ? 8'($urandom) : (($urandom % 2 != 0) ? 8'hFF : 8'h00);
      end
      if ($urandom % 2 != 0) begin
        // copy frame fields into the codes so that matches are common
        if (ide) begin acr[0] = id[28:21]; acr[1] = id[20:13]; acr[2] = ext_mode && afm ? id[12:5] : id[28:21]; acr[3] = ext_mode && afm ? {id[4:0], rtr, 2'b00} : id[20:13]; end
        else begin acr[0] = id[10:3]; acr[1] = {id[2:0], rtr, data0[7:4]}; acr[2] = afm ? data0 : id[10:3]; acr[3] = afm ? data1 : {id[2:0], rtr, data0[3:0]}; end
        if ($urandom % 3 == 0) acr[$urandom % 4] ^= 8'(1 << ($urandom % 8));
      end
      want = reference();
      pulse_crc_lim();
      check(id_ok == want, $sformatf("t=%0d ext=%0d afm=%0d ide=%0d id=%h: id_ok=%0d want %0d",
                                     t, ext_mode, afm, ide, id, id_ok, want));
      if (want) n_accept++; else n_reject++;
      @(negedge clk);
      case (t % 3)
        0: begin go_inter = 1; @(negedge clk); go_inter = 0; end
        1: begin go_err = 1; @(negedge clk); go_err = 0; end
        default: begin reset_mode = 1; @(negedge clk); reset_mode = 0; end
      endcase
      check(!id_ok, "id_ok cleared");
    end
    check(n_accept > 300 && n_reject > 300, $sformatf("both outcomes seen (%0d/%0d)",
                                                      n_accept, n_reject));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

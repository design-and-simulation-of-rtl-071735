// can_fifo: receive message buffer.
// Received messages are stored byte by byte in a 64x8 custom RAM (can_ram) used as a circular
// buffer, and the length of each complete message is kept in a 64-entry length FIFO.
// Writing: the bit stream processor pulses wr for each byte of a message (data_in), then pulses
// write_length_info to close the message. If a byte does not fit, the whole message is dropped
// and overrun is set (it stays set until clear_overrun or reset_mode).
// Reading: the host sees the oldest message as a window; with fifo_selected high the byte at
// offset addr from the start of that message is read, and appears on data_out one clock later.
// release_buffer discards the oldest message. info_cnt is the number of complete messages and
// info_empty is high when there are none. reset_mode empties the buffer.
// The 64-byte RAM, the port names (wr, data_in, addr, fifo_selected, reset_mode, data_out,
// overrun, info_empty, info_cnt) follow the controller's FIFO; the message-length bookkeeping
// and the drop-on-overrun rule are this design's own. Both RAM ports run on the one clk.
module can_fifo #(
  parameter int unsigned ADDR_W = 6    // 2**ADDR_W bytes of message storage
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              reset_mode,
  input  logic              wr,
  input  logic [7:0]        data_in,
  input  logic              write_length_info,
  input  logic              release_buffer,
  input  logic              clear_overrun,
  input  logic              fifo_selected,
  input  logic [ADDR_W-1:0] addr,
  output logic [7:0]        data_out,
  output logic              overrun,
  output logic              info_empty,
  output logic [ADDR_W:0]   info_cnt
);

  localparam int unsigned DEPTH = 2 ** ADDR_W;

  logic [ADDR_W-1:0] wr_ptr, wr_start, rd_ptr;
  logic [ADDR_W:0]   used;        // bytes held by complete messages
  logic [ADDR_W:0]   cur_len;     // bytes of the message being written
  logic              cur_drop;    // message being written did not fit
  logic [ADDR_W:0]   len_mem [DEPTH];
  logic [ADDR_W-1:0] len_wr, len_rd;
  logic              ram_we, commit, release_ok;
  logic [ADDR_W:0]   head_len;

  assign info_empty = (info_cnt == '0);
  assign head_len   = len_mem[len_rd];
  assign ram_we     = wr && !cur_drop && !reset_mode
                      && (used + cur_len < (ADDR_W+1)'(DEPTH));
  assign commit     = write_length_info && !cur_drop && !reset_mode
                      && (info_cnt != (ADDR_W+1)'(DEPTH));
  assign release_ok = release_buffer && !info_empty && !reset_mode;

  can_ram #(.DATA_W(8), .ADDR_W(ADDR_W)) u_ram (
    .wclk (clk),
    .we   (ram_we),
    .waddr(wr_ptr),
    .wdata(data_in),
    .rclk (clk),
    .re   (fifo_selected),
    .raddr(rd_ptr + addr),
    .rdata(data_out)
  );

  always_ff @(posedge clk) begin
    if (rst || reset_mode) begin
      wr_ptr   <= '0;
      wr_start <= '0;
      rd_ptr   <= '0;
      used     <= '0;
      cur_len  <= '0;
      cur_drop <= 1'b0;
      len_wr   <= '0;
      len_rd   <= '0;
      info_cnt <= '0;
      overrun  <= 1'b0;
    end else begin
      if (clear_overrun) overrun <= 1'b0;

      if (ram_we) begin
        wr_ptr  <= wr_ptr + 1'b1;
        cur_len <= cur_len + 1'b1;
      end else if (wr && !cur_drop) begin
        cur_drop <= 1'b1;        // no room: drop this message
        overrun  <= 1'b1;
      end

      if (write_length_info) begin
        cur_len  <= '0;
        cur_drop <= 1'b0;
        if (commit) begin
          len_mem[len_wr] <= cur_len;
          len_wr          <= len_wr + 1'b1;
          wr_start        <= wr_ptr;
        end else begin
          wr_ptr <= wr_start;    // discard the partial message
          if (!cur_drop) overrun <= 1'b1;
        end
      end

      if (release_ok) begin
        rd_ptr <= rd_ptr + head_len[ADDR_W-1:0];
        len_rd <= len_rd + 1'b1;
      end

      info_cnt <= info_cnt + (ADDR_W+1)'(commit) - (ADDR_W+1)'(release_ok);
      used     <= used + (commit ? cur_len : '0) - (release_ok ? head_len : '0);
    end
  end

endmodule
